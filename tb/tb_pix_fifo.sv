// tb_pix_fifo: random pushes and pops against a queue model, with phases
// that fill the FIFO to full and drain it to empty; checks the head value,
// empty, full and level on every cycle.
module tb_pix_fifo;
  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [7:0] din = '0, dout;
  logic empty, full;
  logic [4:0] level;

  pix_fifo #(.DW(8), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .level);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int q[$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_full = 0, n_empty = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 1500; c++) begin
      int ph;
      ph = (c / 100) % 3;   // 0: mostly push, 1: mostly pop, 2: balanced
      push = (q.size() < DEPTH) && ($urandom_range(9) < (ph == 0 ? 8 : ph == 1 ? 2 : 5));
      pop  = (q.size() > 0)     && ($urandom_range(9) < (ph == 1 ? 8 : ph == 0 ? 2 : 5));
      din  = 8'($urandom);
      #1;
      checks += 4;
      if (empty != (q.size() == 0)) failures++;
      if (full != (q.size() == DEPTH)) failures++;
      if (int'(level) != q.size()) failures++;
      if (q.size() > 0 && int'(dout) != q[0]) begin failures++; $display("FAIL head %0d exp %0d", dout, q[0]); end
      if (full) n_full++;
      if (empty) n_empty++;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(int'(din));
      #1;
    end
    checks++;
    if (n_full == 0 || n_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
