// lrcc: left-right consistency check.
//
// The left-referenced disparity d = DL(x,y) says that pixel (x,y) of the left
// image matches pixel (x-d,y) of the right image. The right-referenced map,
// read at that pixel, should say the same: the check keeps DL(x,y) when
// |DL(x,y) - DR(x-d,y)| < th and writes a hole (0) otherwise. A match that
// would fall left of the image (x-d < 0) has no partner and becomes a hole.
// The strict "<" follows the check's defining formula.
//
// Both maps arrive together, one pixel per beat. The right map of the current
// row is kept in a 256-entry buffer addressed by x mod 256; since d < 256 the
// partner pixel DR(x-d,y) has always arrived and not yet been overwritten.
// For d = 0 the partner is the right pixel arriving on the same beat.
//
// Interface: in_valid/in_sof/in_dl/in_dr stream, th (run-time threshold),
// out_valid/out_sof/out_disp stream. Timing: one beat of latency; one beat of
// flush after the last pixel of a frame.
module lrcc
  import pp_pkg::*;
#(
  parameter int W = 1280,
  parameter int H = 720
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_sof,
  input  disp_t in_dl,
  input  disp_t in_dr,
  input  disp_t th,
  output logic  out_valid,
  output logic  out_sof,
  output disp_t out_disp
);

  localparam int LAT = 1;

  logic adv, draining;
  pos_t px, py, ox, oy;

  frame_ctrl #(.W(W), .H(H), .DRAIN(LAT)) u_fc (
    .clk, .rst_n, .in_valid, .in_sof,
    .adv, .pos_x(px), .pos_y(py), .draining
  );

  disp_t               row_r [256];
  logic signed [16:0]  xr;
  disp_t               partner;
  disp_t               diff;
  disp_t               res;

  always_comb begin
    xr      = 17'(px) - 17'(signed'({1'b0, in_dl}));
    partner = (in_dl == HOLE) ? in_dr : row_r[xr[7:0]];
    diff    = (in_dl >= partner) ? in_dl - partner : partner - in_dl;
    res     = (xr >= 0 && diff < th) ? in_dl : HOLE;
  end

  always_ff @(posedge clk) begin
    if (in_valid) row_r[px[7:0]] <= in_dr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   out_disp <= HOLE;
    else if (adv) out_disp <= res;
  end

  assign ox        = back_x(px, LAT, W);
  assign oy        = back_y(px, py, LAT, W);
  assign out_valid = adv && oy >= 0 && oy < pos_t'(H);
  assign out_sof   = adv && ox == 0 && oy == 0;

endmodule
