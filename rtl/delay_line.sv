// delay_line: fixed-length FIFO that delays a stream by DEPTH beats.
//
// These are the "FIFO" boxes that keep parallel paths aligned in the hole
// filler, the variance check and the weighted median filter. It advances
// only when adv is high, so a delay counts beats, not clock cycles. Long
// delays are a circular buffer (one memory, one pointer) that reads the
// oldest entry and overwrites it on the same beat; DEPTH of 1 is a register
// and DEPTH of 0 a wire.
//
// Interface: adv, din in; dout = the din of DEPTH beats earlier.
// Timing: dout is read combinationally from the buffer and changes after
// each beat.
module delay_line #(
  parameter int DW    = 8,
  parameter int DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          adv,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else if (DEPTH == 1) begin : g_reg
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)   dout <= '0;
      else if (adv) dout <= din;
  end else begin : g_ram
    localparam int AW = $clog2(DEPTH);
    logic [DW-1:0] mem [DEPTH];
    logic [AW-1:0] ptr;

    assign dout = mem[ptr];

    always_ff @(posedge clk) begin
      if (adv) mem[ptr] <= din;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        ptr <= '0;
      else if (adv)
        ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + AW'(1);
    end
  end

endmodule
