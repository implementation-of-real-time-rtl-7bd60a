// tb_wmf: checks one weighted median filter pass against the reference
// model (Gaussian similarity and proximity weights from 11-bit tables, cut to
// 0..15, cumulative-histogram median, holes without a vote). The scene has
// two intensity regions with different disparities, salt-and-pepper outliers
// and holes. Frame 1 runs with the pass bypassed (pixels must come out
// unchanged); frame 2 is continuous and checks the R*W+R+4 latency.
module tb_wmf;
  import pp_pkg::*;
  import pp_ref_pkg::*;

  localparam int W = 16, H = 10, N = 7, NFRAMES = 3;
  localparam int LAT = ((N - 1) / 2) * (W + 1) + 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  disp_t in_disp = '0;
  pix_t  in_pix = '0;
  logic out_valid, out_sof;
  disp_t out_disp;
  logic en = 1;

  wmf #(.W(W), .H(H), .N(N)) dut (
    .clk, .rst_n, .in_valid, .in_sof, .in_disp, .in_pix, .en,
    .cfg_we(1'b0), .cfg_sel(1'b0), .cfg_addr(8'd0), .cfg_data(11'd0),
    .out_valid, .out_sof, .out_disp, .out_pix()
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
    int n_changed = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      din = new[W*H]; pin = new[W*H];
      foreach (din[i]) begin
        bit fg;
        fg = (i % W) > (W / 2) - 2 + (i / W) / 3;
        pin[i] = fg ? 180 + $urandom_range(4) : 60 + $urandom_range(4);
        din[i] = fg ? 40 : 12;
        if ($urandom_range(9) == 0) din[i] = $urandom_range(255);
        if ($urandom_range(9) == 0) din[i] = 0;
      end
      en = (f != 1);
      exp_o = en ? wmf_ref(din, pin, W, H, N, 3.0, 33.0) : din;
      foreach (din[i]) if (exp_o[i] != din[i]) n_changed++;
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
    $display("pixels changed by the filter=%0d", n_changed);
    checks++;
    if (n_changed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
