// hf_1way: one-directional hole filler.
//
// Scans the disparity stream and replaces each hole (0) with the nearest
// valid disparity seen before it in the scan direction; a valid disparity
// passes unchanged and becomes the new "nearest". At the start of each scan
// the nearest value is DISP_MIN, so a hole that no valid disparity precedes
// stays DISP_MIN (0 by default: still a hole).
//
// VERTICAL = 0: left-to-right along a row, the nearest value is one register
// reset at column 0. VERTICAL = 1: top-to-bottom down each column, the nearest
// value of every column is kept in a one-line buffer and reset at row 0.
// Right-to-left filling reuses the left-to-right form behind a horizontal
// mirror (see hf3).
//
// Interface: adv (beat enable), din and its raster position (pos_x, pos_y),
// dout. Timing: dout is registered, one beat after din.
module hf_1way
  import pp_pkg::*;
#(
  parameter int    W        = 1280,
  parameter bit    VERTICAL = 1'b0,
  parameter disp_t DISP_MIN = HOLE
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  adv,
  input  disp_t din,
  input  pos_t  pos_x,
  input  pos_t  pos_y,
  output disp_t dout
);

  disp_t nearest;
  disp_t res;

  if (VERTICAL) begin : g_vert
    localparam int AW = $clog2(W);
    disp_t         col_near [W];
    logic [AW-1:0] col;

    assign col     = AW'(pos_x);
    assign nearest = (pos_y == 0) ? DISP_MIN : col_near[col];

    always_ff @(posedge clk) begin
      if (adv) col_near[col] <= res;
    end
  end else begin : g_horz
    disp_t near_r;

    assign nearest = (pos_x == 0) ? DISP_MIN : near_r;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   near_r <= DISP_MIN;
      else if (adv) near_r <= res;
    end
  end

  // A hole takes the nearest value (which then stays the nearest); a valid
  // disparity passes and becomes the nearest.
  assign res = (din == HOLE) ? nearest : din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   dout <= HOLE;
    else if (adv) dout <= res;
  end

endmodule
