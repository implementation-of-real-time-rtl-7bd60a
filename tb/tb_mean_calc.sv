// tb_mean_calc: streams random images through a 5 x 5 mean calculator with 4
// fraction bits and checks every mean against floor(16 * window sum / 25),
// with taps outside the frame counted as 0, at the expected R*W+R+3 beats
// of latency. A second instance with 12-bit input and no extra fraction bits
// (the form used on the deviations) runs on the same beats.
module tb_mean_calc;
  import pp_pkg::*;
  import pp_ref_pkg::*;

  localparam int W = 9, H = 7, N = 5, R = 2, LAT = R * W + R + 3;

  logic clk = 0, rst_n = 0, adv = 0;
  logic [7:0]  din8 = '0;
  logic [11:0] din12 = '0;
  logic [11:0] m1, m2;
  pos_t px = '0, py = '0;

  mean_calc #(.W(W), .H(H), .N(N), .DW(8),  .EXTRA(4)) dut  (.clk, .rst_n, .adv, .din(din8),  .pos_x(px), .pos_y(py), .mean(m1));
  mean_calc #(.W(W), .H(H), .N(N), .DW(12), .EXTRA(0)) dut2 (.clk, .rst_n, .adv, .din(din12), .pos_x(px), .pos_y(py), .mean(m2));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  img_t a, b, ea, eb;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      a = new[W*H]; b = new[W*H];
      foreach (a[i]) begin
        a[i] = (f == 0) ? 255 : $urandom_range(255);
        b[i] = (f == 0) ? 4095 : $urandom_range(4095);
      end
      ea = mean_ref(a, W, H, N, 4);
      eb = mean_ref(b, W, H, N, 0);
      for (int k = 0; k < W*H + LAT; k++) begin
        adv = 1;
        din8  = (k < W*H) ? 8'(a[k])  : 8'($urandom);
        din12 = (k < W*H) ? 12'(b[k]) : 12'($urandom);
        px = pos_t'(k % W); py = pos_t'(k / W);
        #1;
        if (k >= LAT) begin
          checks += 2;
          if (int'(m1) != ea[k-LAT]) begin failures++; $display("FAIL m1 px %0d got %0d exp %0d", k-LAT, m1, ea[k-LAT]); end
          if (int'(m2) != eb[k-LAT]) begin failures++; $display("FAIL m2 px %0d got %0d exp %0d", k-LAT, m2, eb[k-LAT]); end
        end
        @(posedge clk); #1;
      end
      adv = 0;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
