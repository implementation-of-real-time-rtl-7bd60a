// tb_vc: checks the variance check against the reference model (window
// mean, deviation of each pixel from its own mean, mean of the deviations,
// compare with 5.5). The pattern-on image has a random textured half and a
// flat half with slight noise, so both outcomes occur; the flat region
// borders the frame edges, where the window runs out of the frame.
module tb_vc;
  import pp_pkg::*;
  import pp_ref_pkg::*;

  localparam int W = 24, H = 16, N = 9, NFRAMES = 2, TH = 88;
  localparam int LAT = 2 * (((N - 1) / 2) * (W + 1) + 3) + 1;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  disp_t in_disp = '0;
  pix_t  in_pix = '0;
  logic out_valid, out_sof;
  disp_t out_disp;


  vc #(.W(W), .H(H), .N(N)) dut (
    .clk, .rst_n, .in_valid, .in_sof, .in_disp, .in_pix,
    .th_md(12'(TH)), .out_valid, .out_sof, .out_disp
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
    int n_pass = 0, n_drop = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      din = new[W*H]; pin = new[W*H];
      foreach (din[i]) begin
        din[i] = 1 + $urandom_range(200);
        pin[i] = (i % W < W / 2) ? $urandom_range(255) : 100 + $urandom_range(f);
      end
      exp_o = vc_ref(din, pin, W, H, N, TH);
      foreach (exp_o[i]) if (exp_o[i] != 0) n_pass++; else n_drop++;
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
    $display("passed=%0d dropped=%0d", n_pass, n_drop);
    checks++;
    if (n_pass == 0 || n_drop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
