// frame_ctrl: beat and raster-position generator shared by every streaming
// block of the post-processor.
//
// A block advances (one "beat") whenever its input stream carries a pixel.
// Blocks that hold pixels back (line buffers, pipelines) still owe results
// when the last pixel of a frame has gone in, so after that pixel this
// controller keeps advancing by itself for DRAIN more beats: the flush runs
// in the blanking time between frames, and the block's data input is then a
// don't-care. The frame that follows must not start before the flush is over
// (checked by an assertion).
//
// Interface: in_valid/in_sof describe the input stream (in_sof marks the
// first pixel of a frame). adv is the block's beat enable; pos_x/pos_y give
// the raster position of the pixel entering on this beat, counting on past
// the last row during the flush. draining is high during the flush.
// Timing: combinational outputs, counters update on the clock edge of a beat.
module frame_ctrl
  import pp_pkg::*;
#(
  parameter int W     = 1280,
  parameter int H     = 720,
  parameter int DRAIN = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sof,
  output logic adv,
  output pos_t pos_x,
  output pos_t pos_y,
  output logic draining
);

  localparam int CW = $clog2(DRAIN + 2);

  pos_t          nx, ny;
  logic [CW-1:0] rem;
  logic          last_px;

  assign draining = (rem != '0);
  assign adv      = in_valid | draining;
  assign pos_x    = (in_valid && in_sof) ? pos_t'(0) : nx;
  assign pos_y    = (in_valid && in_sof) ? pos_t'(0) : ny;
  assign last_px  = in_valid && (pos_x == pos_t'(W - 1)) && (pos_y == pos_t'(H - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nx  <= '0;
      ny  <= '0;
      rem <= '0;
    end else begin
      if (adv) begin
        if (pos_x == pos_t'(W - 1)) begin
          nx <= '0;
          ny <= pos_y + pos_t'(1);
        end else begin
          nx <= pos_x + pos_t'(1);
          ny <= pos_y;
        end
      end
      if (last_px)
        rem <= CW'(DRAIN);
      else if (draining)
        rem <= rem - CW'(1);
    end
  end

  // A new frame may not enter while the previous one is being flushed.
  a_no_input_while_draining: assert property (@(posedge clk) disable iff (!rst_n)
    !(draining && in_valid));

endmodule
