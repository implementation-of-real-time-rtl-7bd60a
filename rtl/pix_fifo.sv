// pix_fifo: first-word-fall-through FIFO for a reference image stream.
//
// The disparity maps spend a frame-dependent time in the consistency check,
// the hole filler and the variance check, including the flush beats at the
// end of a frame. The pattern-on and pattern-off intensity images therefore
// wait in FIFOs: a pixel is pushed when it arrives with its disparities and
// popped when the disparity of the same pixel reaches the block that needs
// it. DEPTH must cover the pixels in flight (the sum of the latencies
// upstream of the consumer).
//
// Interface: push/din, pop/dout (dout shows the oldest entry while not
// empty), empty, full, level. Pushing into a full or popping an empty FIFO is
// a usage error and is checked by assertions. Timing: dout is read
// combinationally; push and pop take effect on the clock edge.
module pix_fifo #(
  parameter int DW    = 8,
  parameter int DEPTH = 4096
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [DW-1:0]          din,
  input  logic                   pop,
  output logic [DW-1:0]          dout,
  output logic                   empty,
  output logic                   full,
  output logic [$clog2(DEPTH):0] level
);

  localparam int AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign dout  = mem[rp];
  assign empty = (level == '0);
  assign full  = (level == (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + AW'(1);
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + AW'(1);
      level <= level + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
