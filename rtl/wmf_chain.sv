// wmf_chain: the weighted median filter with a run-time iteration count.
//
// Filtering the result again removes more outliers. MAX_ITER passes of wmf
// are chained; pass i filters when i < iter and otherwise passes its centre
// disparity through with the same latency, so iter = 0..MAX_ITER selects the
// number of iterations without changing the timing. Each pass hands the
// aligned pattern-off intensity to the next. All passes share one write
// port for the weight tables.
//
// Interface: in_valid/in_sof/in_disp/in_pix stream, iter, weight-table write
// port, out_valid/out_sof/out_disp stream. Timing: MAX_ITER times the latency
// of one pass; each pass flushes in turn after the last pixel of a frame.
module wmf_chain
  import pp_pkg::*;
#(
  parameter int  W          = 1280,
  parameter int  H          = 720,
  parameter int  N          = 7,
  parameter int  MAX_ITER   = 8,
  parameter real SIGMA_SIM  = 3.0,
  parameter real SIGMA_PROX = 33.0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_sof,
  input  disp_t                         in_disp,
  input  pix_t                          in_pix,
  input  logic [$clog2(MAX_ITER+1)-1:0] iter,
  input  logic                          cfg_we,
  input  logic                          cfg_sel,
  input  logic [7:0]                    cfg_addr,
  input  logic [LUT_W-1:0]              cfg_data,
  output logic                          out_valid,
  output logic                          out_sof,
  output disp_t                         out_disp
);

  logic  v [MAX_ITER+1];
  logic  s [MAX_ITER+1];
  disp_t d [MAX_ITER+1];
  pix_t  p [MAX_ITER+1];

  assign v[0] = in_valid;
  assign s[0] = in_sof;
  assign d[0] = in_disp;
  assign p[0] = in_pix;

  for (genvar i = 0; i < MAX_ITER; i++) begin : g_pass
    wmf #(.W(W), .H(H), .N(N), .SIGMA_SIM(SIGMA_SIM), .SIGMA_PROX(SIGMA_PROX)) u_wmf (
      .clk, .rst_n,
      .in_valid(v[i]), .in_sof(s[i]), .in_disp(d[i]), .in_pix(p[i]),
      .en(int'(iter) > i),
      .cfg_we, .cfg_sel, .cfg_addr, .cfg_data,
      .out_valid(v[i+1]), .out_sof(s[i+1]), .out_disp(d[i+1]), .out_pix(p[i+1])
    );
  end

  assign out_valid = v[MAX_ITER];
  assign out_sof   = s[MAX_ITER];
  assign out_disp  = d[MAX_ITER];

endmodule
