// wmf_mask: filter mask calculator of the weighted median filter.
//
// Gives every tap q of the N x N window around p a weight that is large when
// q is close to p in intensity (similarity) and in position (proximity), the
// two Gaussian factors of a bilateral filter:
//   w = exp(-0.5 (dI/sigma_sim)^2) * exp(-0.5 (|p-q|/sigma_prox)^2).
// Both factors come from look-up tables of 11-bit values (2047 = 1.0). The
// similarity table is addressed by |I(p) - I(q)| (256 entries), the
// proximity table by the squared tap distance dx^2 + dy^2 (32 entries). The
// 22-bit product is cut to its top bits, a 5-bit weight with 16 levels
// (0..15), which keeps the median adders small.
//
// The tables are registers that reset to the Gaussians of SIGMA_SIM and
// SIGMA_PROX and can be rewritten at run time (cfg_we; cfg_sel 0 = similarity,
// 1 = proximity), so the filter can be retuned for a scene without a new
// build.
//
// Interface: adv, the intensity window pix[N][N], the table write port,
// wgt[N][N]. Timing: wgt is registered, one beat after the window.
module wmf_mask
  import pp_pkg::*;
#(
  parameter int  N          = 7,
  parameter real SIGMA_SIM  = 3.0,
  parameter real SIGMA_PROX = 33.0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adv,
  input  pix_t             pix [N][N],
  input  logic             cfg_we,
  input  logic             cfg_sel,
  input  logic [7:0]       cfg_addr,
  input  logic [LUT_W-1:0] cfg_data,
  output logic [WGT_W-1:0] wgt [N][N]
);

  localparam int R        = (N - 1) / 2;
  localparam int PROX_N   = 32;
  localparam int LUT_ONE  = (1 << LUT_W) - 1;
  localparam int CUT      = 2 * LUT_W - (WGT_W - 1);   // 22-bit product -> 0..15

  typedef logic [LUT_W-1:0] sim_lut_t  [256];
  typedef logic [LUT_W-1:0] prox_lut_t [PROX_N];

  function automatic sim_lut_t sim_default();
    sim_lut_t t;
    for (int a = 0; a < 256; a++)
      t[a] = LUT_W'(int'($floor(real'(LUT_ONE) * $exp(-0.5 * (real'(a) / SIGMA_SIM) ** 2) + 0.5)));
    return t;
  endfunction

  function automatic prox_lut_t prox_default();
    prox_lut_t t;
    for (int d2 = 0; d2 < PROX_N; d2++)
      t[d2] = LUT_W'(int'($floor(real'(LUT_ONE) * $exp(-0.5 * real'(d2) / (SIGMA_PROX ** 2)) + 0.5)));
    return t;
  endfunction

  localparam sim_lut_t  SIM_INIT  = sim_default();
  localparam prox_lut_t PROX_INIT = prox_default();

  sim_lut_t  sim_lut;
  prox_lut_t prox_lut;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sim_lut  <= SIM_INIT;
      prox_lut <= PROX_INIT;
    end else if (cfg_we) begin
      if (!cfg_sel) sim_lut[cfg_addr] <= cfg_data;
      else          prox_lut[cfg_addr[$clog2(PROX_N)-1:0]] <= cfg_data;
    end
  end

  // One weight per tap: table look-ups, multiply, cut.
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_tap
      localparam int D2 = (i - R) * (i - R) + (j - R) * (j - R);
      pix_t               dI;
      logic [2*LUT_W-1:0] prod;

      assign dI   = (pix[R][R] >= pix[i][j]) ? pix[R][R] - pix[i][j] : pix[i][j] - pix[R][R];
      assign prod = (2*LUT_W)'(sim_lut[dI]) * (2*LUT_W)'(prox_lut[D2]);

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)   wgt[i][j] <= '0;
        else if (adv) wgt[i][j] <= WGT_W'(prod >> CUT);
      end
    end
  end

endmodule
