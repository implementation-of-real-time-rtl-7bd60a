// tb_hmirror: feeds rows of distinct values through the horizontal mirror
// and checks that the output at position (x, y) is the input pixel at
// (W-1-x, y-1), and that two mirrors in series give back the stream W*2
// beats later in its original order.
module tb_hmirror;
  import pp_pkg::*;

  localparam int W = 8, H = 5;

  logic clk = 0, adv = 0;
  disp_t din = '0, m1, m2;
  pos_t px = '0, py = '0, px2, py2;

  assign px2 = back_x(px, W, W);
  assign py2 = back_y(px, py, W, W);

  hmirror #(.W(W)) dut  (.clk, .adv, .din, .pos_x(px), .pos_y(py), .dout(m1));
  hmirror #(.W(W)) dut2 (.clk, .adv, .din(m1), .pos_x(px2), .pos_y(py2), .dout(m2));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img[W*(H+2)];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (img[i]) img[i] = $urandom_range(255);
    @(posedge clk); #1;
    for (int k = 0; k < W*(H+2); k++) begin
      int x, y;
      x = k % W; y = k / W;
      adv = 1; din = disp_t'(img[k]); px = pos_t'(x); py = pos_t'(y);
      #1;
      if (y >= 1) begin
        checks++;
        if (m1 != disp_t'(img[(y-1)*W + W-1-x])) begin
          failures++; $display("FAIL m1 k=%0d got %0d exp %0d", k, m1, img[(y-1)*W + W-1-x]);
        end
      end
      if (y >= 2) begin
        checks++;
        if (m2 != disp_t'(img[k - 2*W])) begin
          failures++; $display("FAIL m2 k=%0d got %0d exp %0d", k, m2, img[k - 2*W]);
        end
      end
      @(posedge clk); #1;
      if (k % 5 == 2) begin adv = 0; din = '0; @(posedge clk); #1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
