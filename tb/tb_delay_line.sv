// tb_delay_line: three delay lines (0, 1 and 37 beats) driven with random
// data and a random beat enable; each output must equal the input of exactly
// DEPTH beats earlier, idle cycles not counting.
module tb_delay_line;
  localparam int D2 = 37;

  logic clk = 0, rst_n = 0, adv = 0;
  logic [7:0] din = '0, o0, o1, o2;

  delay_line #(.DW(8), .DEPTH(0))  d0 (.clk, .rst_n, .adv, .din, .dout(o0));
  delay_line #(.DW(8), .DEPTH(1))  d1 (.clk, .rst_n, .adv, .din, .dout(o1));
  delay_line #(.DW(8), .DEPTH(D2)) d2 (.clk, .rst_n, .adv, .din, .dout(o2));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hist[$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      int n;
      adv = ($urandom_range(3) != 0);
      din = 8'($urandom);
      #1;
      n = hist.size();
      checks++;
      if (o0 != din) failures++;
      if (n >= 1) begin checks++; if (int'(o1) != hist[n-1]) failures++; end
      if (n >= D2) begin
        checks++;
        if (int'(o2) != hist[n-D2]) begin failures++; $display("FAIL o2 %0d exp %0d", o2, hist[n-D2]); end
      end
      @(posedge clk);
      if (adv) hist.push_back(int'(din));
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
