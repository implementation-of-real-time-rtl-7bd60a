// wmf: one pass of the edge-aware weighted median filter (7 x 7).
//
// A median filter removes isolated wrong disparities, but a plain one blurs
// object edges. Here each neighbour's vote is weighted by how similar it is
// to the centre in the pattern-off (passive) intensity image and how close
// it is, so pixels across an intensity edge barely count. Two window
// generators build the 7 x 7 intensity and disparity windows in step; the
// filter mask calculator turns the intensity window into tap weights; the
// median calculator finds the weighted median of the disparity window.
//
// en = 0 bypasses the pass: the centre disparity comes out with the same
// latency, so passes can be chained and switched on one by one. out_pix is
// the centre intensity, delayed like the disparity, for the next pass.
//
// Interface: in_valid/in_sof/in_disp/in_pix stream, en, weight-table write
// port (see wmf_mask), out_valid/out_sof/out_disp/out_pix stream.
// Timing: latency R*W+R+4 beats (R = 3: window, weights, bin sums, median), the same number of beats of flush
// after the last pixel of a frame.
module wmf
  import pp_pkg::*;
#(
  parameter int  W          = 1280,
  parameter int  H          = 720,
  parameter int  N          = 7,
  parameter real SIGMA_SIM  = 3.0,
  parameter real SIGMA_PROX = 33.0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_sof,
  input  disp_t            in_disp,
  input  pix_t             in_pix,
  input  logic             en,
  input  logic             cfg_we,
  input  logic             cfg_sel,
  input  logic [7:0]       cfg_addr,
  input  logic [LUT_W-1:0] cfg_data,
  output logic             out_valid,
  output logic             out_sof,
  output disp_t            out_disp,
  output pix_t             out_pix
);

  localparam int R   = (N - 1) / 2;
  localparam int LAT = R * W + R + 4;

  logic adv, draining;
  pos_t px, py, ox, oy;

  frame_ctrl #(.W(W), .H(H), .DRAIN(LAT)) u_fc (
    .clk, .rst_n, .in_valid, .in_sof,
    .adv, .pos_x(px), .pos_y(py), .draining
  );

  pix_t             pwin [N][N];
  disp_t            dwin [N][N];
  disp_t            dwin_r [N][N];
  logic [WGT_W-1:0] wgt [N][N];
  disp_t            med;
  disp_t            cd [3];
  pix_t             cp [3];

  win_gen #(.W(W), .H(H), .N(N), .DW(PIX_W)) u_win_pix (
    .clk, .rst_n, .adv, .din(in_pix), .pos_x(px), .pos_y(py),
    .win(pwin), .cx(), .cy()
  );

  win_gen #(.W(W), .H(H), .N(N), .DW(DISP_W)) u_win_disp (
    .clk, .rst_n, .adv, .din(in_disp), .pos_x(px), .pos_y(py),
    .win(dwin), .cx(), .cy()
  );

  wmf_mask #(.N(N), .SIGMA_SIM(SIGMA_SIM), .SIGMA_PROX(SIGMA_PROX)) u_mask (
    .clk, .rst_n, .adv, .pix(pwin),
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_data, .wgt
  );

  wmf_median #(.N(N)) u_median (
    .clk, .rst_n, .adv, .wgt, .dsp(dwin_r), .med
  );

  // Disparity window in step with the weights; centre values for the bypass
  // and for the next pass.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) dwin_r[i][j] <= HOLE;
      for (int k = 0; k < 3; k++) begin
        cd[k] <= HOLE;
        cp[k] <= '0;
      end
    end else if (adv) begin
      dwin_r <= dwin;
      cd[0]  <= dwin[R][R];
      cp[0]  <= pwin[R][R];
      for (int k = 1; k < 3; k++) begin
        cd[k] <= cd[k-1];
        cp[k] <= cp[k-1];
      end
    end
  end

  assign out_disp  = en ? med : cd[2];
  assign out_pix   = cp[2];
  assign ox        = back_x(px, LAT, W);
  assign oy        = back_y(px, py, LAT, W);
  assign out_valid = adv && oy >= 0 && oy < pos_t'(H);
  assign out_sof   = adv && ox == 0 && oy == 0;

endmodule
