// tb_hf3: checks the 3-way hole filler against the reference model
// (smallest of the nearest valid disparities left, right and above) on
// random maps with about 40% holes, including holes at the frame edges. Frame
// 0 has input gaps, frame 1 runs with hole filling switched off (pixels must
// pass unchanged), frame 2 is continuous and checks the 2W+2 latency.
module tb_hf3;
  import pp_pkg::*;
  import pp_ref_pkg::*;

  localparam int W = 16, H = 6, NFRAMES = 3, LAT = 2 * W + 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  disp_t in_disp = '0;
  pix_t  in_pix = '0;
  logic out_valid, out_sof;
  disp_t out_disp;
  logic hf_en = 1;

  hf3 #(.W(W), .H(H)) dut (
    .clk, .rst_n, .in_valid, .in_sof, .in_disp, .hf_en,
    .out_valid, .out_sof, .out_disp
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  img_t din, pin, exp_o;
  int got[$];
  longint t_first_in, t_first_out;

  always @(posedge clk) if (rst_n && out_valid) begin
    if (got.size() == 0) begin
      t_first_out = $time;
      checks++;
      if (!out_sof) begin failures++; $display("FAIL: first output without sof"); end
    end
    got.push_back(int'(out_disp));
  end

  task automatic drive(input bit gaps, input int blank);
    for (int i = 0; i < W*H; i++) begin
      if (gaps) while ($urandom_range(3) == 0) begin
        in_valid <= 0; @(posedge clk);
      end
      in_valid <= 1; in_sof <= (i == 0);
      in_disp <= disp_t'(din[i]); in_pix <= pix_t'(pin[i]);
      @(posedge clk);
      if (i == 0) t_first_in = $time;
    end
    in_valid <= 0; in_sof <= 0;
    repeat (blank) @(posedge clk);
  endtask

  task automatic compare(input int f);
    checks++;
    if (got.size() != W*H) begin
      failures++; $display("FAIL: frame %0d got %0d pixels", f, got.size());
    end else
      foreach (exp_o[i]) begin
        checks++;
        if (got[i] != exp_o[i]) begin
          failures++;
          if (failures < 10) $display("FAIL: f%0d px %0d (x=%0d y=%0d) got %0d exp %0d", f, i, i % W, i / W, got[i], exp_o[i]);
        end
      end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_fill = 0, n_left = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      din = new[W*H]; pin = new[W*H];
      foreach (din[i]) din[i] = ($urandom_range(9) < 4) ? 0 : 1 + $urandom_range(60);
      hf_en = (f != 1);
      exp_o = hf_ref(din, W, H, hf_en);
      foreach (din[i]) if (din[i] == 0) begin
        if (exp_o[i] != 0) n_fill++; else n_left++;
      end
      got.delete();
      drive(f == 0, LAT + 20);
      compare(f);
      if (f == NFRAMES - 1) begin
        checks++;
        if ((t_first_out - t_first_in) / 10 != LAT) begin
          failures++; $display("FAIL: latency %0d, expected %0d", (t_first_out - t_first_in) / 10, LAT);
        end
      end

    end
    $display("holes filled=%0d left=%0d", n_fill, n_left);
    checks++;
    if (n_fill == 0 || n_left == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
