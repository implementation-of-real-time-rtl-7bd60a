// wmf_median: weighted median of an N x N window by cumulative histogram.
//
// One bin node per disparity level (256). The bin-node decoder turns each
// tap's disparity d into a thermometer code inc_en[n] = (d <= n), so bin
// node n adds the weights of all taps at or below level n: its sum is
// directly the cumulative histogram at n, with no carry between nodes. The
// median location calculator adds all weights and halves the total. Bin node
// n's comparator sets med_en[n] when its sum exceeds the median location, and
// a priority encoder returns the lowest such n: the weighted median.
//
// Taps whose disparity is a hole (0) get no vote, so the filter also fills
// holes that have enough valid neighbours. When no tap has weight the output
// is a hole.
//
// Interface: adv, tap weights wgt[N][N] and disparities dsp[N][N], med.
// Timing: two pipeline stages (bin sums, then compare and encode): med
// belongs to the window presented two beats earlier.
module wmf_median
  import pp_pkg::*;
#(
  parameter int N     = 7,
  parameter int NBINS = 1 << DISP_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adv,
  input  logic [WGT_W-1:0] wgt [N][N],
  input  disp_t            dsp [N][N],
  output disp_t            med
);

  localparam int SUM_W = WGT_W + $clog2(N * N + 1);

  logic [WGT_W-1:0] vw [N*N];         // weights of the taps that may vote
  logic [SUM_W-1:0] total;
  logic [SUM_W-1:0] node_sum [NBINS];
  logic [SUM_W-1:0] med_loc;
  logic [NBINS-1:0] med_en;
  disp_t            idx;

  // Holes do not vote.
  always_comb begin
    for (int t = 0; t < N * N; t++)
      vw[t] = (dsp[t / N][t % N] != HOLE) ? wgt[t / N][t % N] : '0;
  end

  // Median location calculator: sum of all weights.
  always_comb begin
    total = '0;
    for (int t = 0; t < N * N; t++) total += SUM_W'(vw[t]);
  end

  // Bin nodes. The decoder output inc_en[t] = (d_t <= n) is a thermometer
  // code, so the adder of node n sums the cumulative histogram at n.
  for (genvar n = 0; n < NBINS; n++) begin : g_bin
    logic [N*N-1:0]   inc_en;
    logic [SUM_W-1:0] s;

    always_comb begin
      for (int t = 0; t < N * N; t++) inc_en[t] = (int'(dsp[t / N][t % N]) <= n);
      s = '0;
      for (int t = 0; t < N * N; t++) if (inc_en[t]) s += SUM_W'(vw[t]);
    end

    // Stage 1 register.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   node_sum[n] <= '0;
      else if (adv) node_sum[n] <= s;
    end

    // Bin-node comparator.
    assign med_en[n] = node_sum[n] > med_loc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   med_loc <= '0;
    else if (adv) med_loc <= total >> 1;
  end

  // Priority encoder: the lowest bin whose cumulative weight passes the
  // median location; a hole when there is none.
  always_comb begin
    idx = HOLE;
    for (int n = NBINS - 1; n >= 0; n--)
      if (med_en[n]) idx = disp_t'(n);
  end

  // Stage 2 register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   med <= HOLE;
    else if (adv) med <= idx;
  end

endmodule
