// vc: variance check by mean deviation (MD), 9 x 9 window.
//
// Disparities found in textureless regions are unreliable. With a projected
// pattern every surface has texture, so the pattern-on image is used: where
// its local intensity spread is at or below a threshold, the disparity is
// replaced by a hole (0). The spread is the mean absolute deviation, which
// needs no multiplier, computed as in the hardware pipeline rather than the
// textbook formula: the first mean calculator gives the window mean m(q) of
// every pixel q, the deviation |m(q) - x(q)| is formed against the pixel
// itself (delayed to line up), and a second mean calculator averages these
// deviations over the window of p. A disparity passes when MD(p) > th_md.
//
// Both means carry 4 fraction bits (U8.4), so th_md is in sixteenths of a
// grey level; 88 is 5.5.
//
// Interface: in_valid/in_sof/in_disp/in_pix stream (disparity and pattern-on
// intensity of the same pixel), th_md, out_valid/out_sof/out_disp stream.
// Timing: latency 2*(R*W+R+3)+1 beats (R = 4), the same number of beats of
// flush after the last pixel of a frame.
module vc
  import pp_pkg::*;
#(
  parameter int W = 1280,
  parameter int H = 720,
  parameter int N = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_sof,
  input  disp_t               in_disp,
  input  pix_t                in_pix,
  input  logic [PIX_W+MD_FRAC-1:0] th_md,
  output logic                out_valid,
  output logic                out_sof,
  output disp_t               out_disp
);

  localparam int R    = (N - 1) / 2;
  localparam int MLAT = R * W + R + 3;    // one mean calculator
  localparam int LAT  = 2 * MLAT + 1;
  localparam int MW   = PIX_W + MD_FRAC;

  logic adv, draining;
  pos_t px, py, ox, oy;

  frame_ctrl #(.W(W), .H(H), .DRAIN(LAT)) u_fc (
    .clk, .rst_n, .in_valid, .in_sof,
    .adv, .pos_x(px), .pos_y(py), .draining
  );

  logic [MW-1:0] mean, pix_fx, dev, md;
  pix_t          pix_d;
  disp_t         disp_d;

  mean_calc #(.W(W), .H(H), .N(N), .DW(PIX_W), .EXTRA(MD_FRAC)) u_mean (
    .clk, .rst_n, .adv, .din(in_pix), .pos_x(px), .pos_y(py), .mean
  );

  delay_line #(.DW(PIX_W), .DEPTH(MLAT)) u_dl_pix (
    .clk, .rst_n, .adv, .din(in_pix), .dout(pix_d)
  );

  assign pix_fx = {pix_d, MD_FRAC'(0)};
  assign dev    = (mean >= pix_fx) ? mean - pix_fx : pix_fx - mean;

  mean_calc #(.W(W), .H(H), .N(N), .DW(MW), .EXTRA(0)) u_md (
    .clk, .rst_n, .adv, .din(dev),
    .pos_x(back_x(px, MLAT, W)), .pos_y(back_y(px, py, MLAT, W)), .mean(md)
  );

  delay_line #(.DW(DISP_W), .DEPTH(2 * MLAT)) u_dl_disp (
    .clk, .rst_n, .adv, .din(in_disp), .dout(disp_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   out_disp <= HOLE;
    else if (adv) out_disp <= (md > th_md) ? disp_d : HOLE;
  end

  assign ox        = back_x(px, LAT, W);
  assign oy        = back_y(px, py, LAT, W);
  assign out_valid = adv && oy >= 0 && oy < pos_t'(H);
  assign out_sof   = adv && ox == 0 && oy == 0;

endmodule
