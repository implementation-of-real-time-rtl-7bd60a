// tb_wmf_chain: checks the iterated weighted median filter: three passes
// chained, run with 2, 0 and 3 iterations. The expected map is the reference
// pass applied that many times. The last frame checks the latency of the
// whole chain (three times one pass).
module tb_wmf_chain;
  import pp_pkg::*;
  import pp_ref_pkg::*;

  localparam int W = 12, H = 8, N = 7, MI = 3, NFRAMES = 3;
  localparam int LAT = MI * (((N - 1) / 2) * (W + 1) + 4);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  disp_t in_disp = '0;
  pix_t  in_pix = '0;
  logic out_valid, out_sof;
  disp_t out_disp;
  logic [1:0] iter = 2;

  wmf_chain #(.W(W), .H(H), .N(N), .MAX_ITER(MI)) dut (
    .clk, .rst_n, .in_valid, .in_sof, .in_disp, .in_pix, .iter,
    .cfg_we(1'b0), .cfg_sel(1'b0), .cfg_addr(8'd0), .cfg_data(11'd0),
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int iters[3] = '{2, 0, 3};
    int n_diff = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      din = new[W*H]; pin = new[W*H];
      foreach (din[i]) begin
        pin[i] = $urandom_range(3) + ((i % W) > 5 ? 120 : 30);
        din[i] = ($urandom_range(4) == 0) ? $urandom_range(255) : 20 + (i % W);
      end
      iter = 2'(iters[f]);
      exp_o = din;
      for (int k = 0; k < iters[f]; k++) exp_o = wmf_ref(exp_o, pin, W, H, N, 3.0, 33.0);
      if (iters[f] == 3) begin
        img_t one = wmf_ref(din, pin, W, H, N, 3.0, 33.0);
        foreach (one[i]) if (one[i] != exp_o[i]) n_diff++;
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
    $display("pixels where 3 passes differ from 1=%0d", n_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
