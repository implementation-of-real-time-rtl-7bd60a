// tb_wmf_mask: presents random 7 x 7 intensity windows (centre values chosen
// so that small and large differences both occur) and checks every tap
// weight against the Gaussian tables worked out in the testbench. Then
// rewrites one similarity entry and one proximity entry through the table
// port and checks that the weights follow the new tables.
module tb_wmf_mask;
  import pp_pkg::*;
  import pp_ref_pkg::*;

  localparam int N = 7, R = 3;

  logic clk = 0, rst_n = 0, adv = 0;
  pix_t pix [N][N];
  logic cfg_we = 0, cfg_sel = 0;
  logic [7:0] cfg_addr = '0;
  logic [10:0] cfg_data = '0;
  logic [4:0] wgt [N][N];

  wmf_mask #(.N(N)) dut (.clk, .rst_n, .adv, .pix, .cfg_we, .cfg_sel, .cfg_addr, .cfg_data, .wgt);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int sim_t[256], prox_t[32];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_window();
    int c, n_mid;
    c = $urandom_range(255);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int v;
        v = c + int'($urandom_range(16)) - 8;
        if ($urandom_range(3) == 0) v = $urandom_range(255);
        pix[i][j] = pix_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
      end
    adv = 1;
    @(posedge clk); #1;
    adv = 0;
    n_mid = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int a, e;
        a = iabs(int'(pix[R][R]) - int'(pix[i][j]));
        e = (sim_t[a] * prox_t[(i-R)*(i-R) + (j-R)*(j-R)]) >> 18;
        checks++;
        if (int'(wgt[i][j]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL tap %0d,%0d diff %0d got %0d exp %0d", i, j, a, wgt[i][j], e);
        end
      end
  endtask

  initial begin
    foreach (sim_t[a])  sim_t[a]  = sim_w(a, 3.0);
    foreach (prox_t[d]) prox_t[d] = prox_w(d, 33.0);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) pix[i][j] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (40) one_window();
    // Retune: similarity of difference 0 halved, proximity of distance^2 = 1 zeroed.
    cfg_we = 1; cfg_sel = 0; cfg_addr = 8'd0; cfg_data = 11'd1023;
    @(posedge clk); #1;
    cfg_sel = 1; cfg_addr = 8'd1; cfg_data = 11'd0;
    @(posedge clk); #1;
    cfg_we = 0;
    sim_t[0] = 1023; prox_t[1] = 0;
    repeat (40) one_window();
    // The centre tap always has difference 0 and distance 0: 1023*2047 >> 18 = 7.
    checks++;
    if (wgt[R][R] != 5'd7) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
