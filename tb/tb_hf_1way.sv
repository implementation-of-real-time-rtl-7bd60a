// tb_hf_1way: drives both forms of the one-directional hole filler
// (left-to-right and top-to-bottom) with a random map with holes, beat by
// beat, and checks each registered output against a row or column scan that
// carries the last valid disparity forward and restarts at 0 on every scan.
module tb_hf_1way;
  import pp_pkg::*;

  localparam int W = 10, H = 6;

  logic clk = 0, rst_n = 0, adv = 0;
  disp_t din = '0, dh, dv;
  pos_t px = '0, py = '0;

  hf_1way #(.W(W), .VERTICAL(1'b0)) dut_h (.clk, .rst_n, .adv, .din, .pos_x(px), .pos_y(py), .dout(dh));
  hf_1way #(.W(W), .VERTICAL(1'b1)) dut_v (.clk, .rst_n, .adv, .din, .pos_x(px), .pos_y(py), .dout(dv));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img[W*H], eh[W*H], ev[W*H];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_fill = 0;
    foreach (img[i]) img[i] = ($urandom_range(2) == 0) ? 0 : 1 + $urandom_range(99);
    for (int y = 0; y < H; y++) begin
      int near;
      near = 0;
      for (int x = 0; x < W; x++) begin
        if (img[y*W+x] != 0) near = img[y*W+x];
        eh[y*W+x] = near;
      end
    end
    for (int x = 0; x < W; x++) begin
      int near;
      near = 0;
      for (int y = 0; y < H; y++) begin
        if (img[y*W+x] != 0) near = img[y*W+x];
        ev[y*W+x] = near;
      end
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int k = 0; k < W*H; k++) begin
        // an idle cycle now and then must change nothing
        if (k % 7 == 3) begin adv = 0; din = disp_t'($urandom); @(posedge clk); #1; end
        adv = 1; din = disp_t'(img[k]); px = pos_t'(k % W); py = pos_t'(k / W);
        @(posedge clk); #1;
        checks += 2;
        if (dh != disp_t'(eh[k])) begin failures++; $display("FAIL h k=%0d got %0d exp %0d", k, dh, eh[k]); end
        if (dv != disp_t'(ev[k])) begin failures++; $display("FAIL v k=%0d got %0d exp %0d", k, dv, ev[k]); end
        if (img[k] == 0 && eh[k] != 0) n_fill++;
      end
    checks++;
    if (n_fill == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
