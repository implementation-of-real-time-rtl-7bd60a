// tb_win_gen: pushes a random image through a 5 x 5 window generator and,
// after every beat, checks the centre position and all 25 taps against the
// image (taps outside the frame must read 0). Runs two frames back to back
// with flush beats, so the second frame starts with stale line buffers.
module tb_win_gen;
  import pp_pkg::*;

  localparam int W = 9, H = 7, N = 5, R = 2, D = R * W + R;

  logic clk = 0, rst_n = 0, adv = 0;
  pix_t din = '0;
  pos_t px = '0, py = '0, cx, cy;
  pix_t win [N][N];

  win_gen #(.W(W), .H(H), .N(N), .DW(PIX_W)) dut (
    .clk, .rst_n, .adv, .din, .pos_x(px), .pos_y(py), .win, .cx, .cy
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img[W*H];

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
      foreach (img[i]) img[i] = 1 + $urandom_range(254);
      for (int k = 0; k < W*H + D + 1; k++) begin
        int c;
        c = k - D;
        adv = 1; din = (k < W*H) ? pix_t'(img[k]) : pix_t'($urandom);
        px = pos_t'(k % W); py = pos_t'(k / W);
        @(posedge clk); #1;
        if (c >= 0 && c < W*H) begin
          checks++;
          if (cx != pos_t'(c % W) || cy != pos_t'(c / W)) begin
            failures++; $display("FAIL centre k=%0d (%0d,%0d)", k, cx, cy);
          end
          for (int i = 0; i < N; i++)
            for (int j = 0; j < N; j++) begin
              int tx, ty, e;
              tx = c % W + j - R; ty = c / W + i - R;
              e = (tx >= 0 && tx < W && ty >= 0 && ty < H) ? img[ty*W + tx] : 0;
              checks++;
              if (win[i][j] != pix_t'(e)) begin
                failures++;
                if (failures < 10) $display("FAIL k=%0d tap %0d,%0d got %0d exp %0d", k, i, j, win[i][j], e);
              end
            end
        end
        if (k % 11 == 4) begin adv = 0; @(posedge clk); #1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
