// hmirror: horizontal mirror, reverses the pixel order of every row.
//
// Two row buffers work in ping-pong: while row y is written at its column
// addresses, row y-1 is read from the other buffer at column W-1-x. The
// output is therefore the previous row, right to left, with exactly W beats
// of delay. Passing a stream through two mirrors restores its order.
//
// Interface: adv (beat enable), din and the raster position of din (pos_x,
// pos_y). dout at the beat where din sits at (x, y) is the input pixel at
// (W-1-x, y-1). Timing: dout is read combinationally and changes after each
// beat.
module hmirror
  import pp_pkg::*;
#(
  parameter int W  = 1280,
  parameter int DW = DISP_W
) (
  input  logic          clk,
  input  logic          adv,
  input  logic [DW-1:0] din,
  input  pos_t          pos_x,
  input  pos_t          pos_y,
  output logic [DW-1:0] dout
);

  localparam int AW = $clog2(W);

  logic [DW-1:0] buf0 [W];
  logic [DW-1:0] buf1 [W];
  logic [AW-1:0] wa, ra;
  logic          bank;

  assign bank = pos_y[0];
  assign wa   = AW'(pos_x);
  assign ra   = AW'(W - 1 - int'(pos_x));
  assign dout = bank ? buf0[ra] : buf1[ra];

  always_ff @(posedge clk) begin
    if (adv && !bank) buf0[wa] <= din;
    if (adv &&  bank) buf1[wa] <= din;
  end

endmodule
