// tb_wmf_median: presents random weight and disparity windows, one per beat,
// and checks each weighted median two beats later against a histogram
// computation in the testbench. The windows range from a few clustered levels
// with heavy weights to all-hole and all-zero-weight windows (which must give
// a hole) and windows with a single valid tap.
module tb_wmf_median;
  import pp_pkg::*;
  import pp_ref_pkg::*;

  localparam int N = 7, NW = 300;

  logic clk = 0, rst_n = 0, adv = 0;
  logic [4:0] wgt [N][N];
  disp_t dsp [N][N];
  disp_t med;

  wmf_median #(.N(N)) dut (.clk, .rst_n, .adv, .wgt, .dsp, .med);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int expv[NW];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wv[], dv[];
    int n_hole = 0;
    wv = new[N*N]; dv = new[N*N];
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin wgt[i][j] = '0; dsp[i][j] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < NW + 2; k++) begin
      if (k < NW) begin
        int mode, base;
        mode = k % 5;
        base = $urandom_range(250);
        for (int t = 0; t < N*N; t++) begin
          wv[t] = $urandom_range(15);
          case (mode)
            0: dv[t] = $urandom_range(255);
            1: dv[t] = base + $urandom_range(5);
            2: dv[t] = ($urandom_range(1) == 0) ? 0 : base + $urandom_range(3);
            3: begin dv[t] = (t == 24) ? base + 1 : 0; end
            default: begin dv[t] = $urandom_range(255); if (k % 10 == 4) wv[t] = 0; if (k % 20 == 9) dv[t] = 0; end
          endcase
          wgt[t / N][t % N] = 5'(wv[t]);
          dsp[t / N][t % N] = disp_t'(dv[t]);
        end
        expv[k] = wmedian(wv, dv);
        if (expv[k] == 0) n_hole++;
      end
      adv = 1;
      @(posedge clk); #1;
      if (k >= 1 && k <= NW) begin
        checks++;
        if (int'(med) != expv[k-1]) begin
          failures++;
          if (failures < 10) $display("FAIL window %0d got %0d exp %0d", k - 1, med, expv[k-1]);
        end
      end
    end
    checks++;
    if (n_hole == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
