// win_gen: N x N window block generation.
//
// Builds, one beat at a time, the N x N neighbourhood of a pixel stream in
// raster order. N-1 line buffers hold the previous N-1 rows; reading them at
// the current column gives a vertical slice of N pixels, which enters a bank
// of N shift registers, one per window row. The window seen during a beat is
// centred on the pixel that entered R*W+R+1 beats earlier (R = (N-1)/2).
//
// Taps that fall outside the frame (beyond the left or right edge, above the
// first row, below the last) read as 0: the registers there hold pixels of
// another row or of the flush and are masked by position. The block is used
// by the mean calculators of the variance check and by the weighted median
// filter.
//
// Interface: adv (beat enable), din and its raster position (pos_x, pos_y).
// win[i][j] is row i (0 = top) and column j (0 = left) of the window; cx/cy
// give the position of its centre. Timing: win, cx and cy change after each
// beat and are stable between beats.
module win_gen
  import pp_pkg::*;
#(
  parameter int W  = 1280,
  parameter int H  = 720,
  parameter int N  = 9,
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          adv,
  input  logic [DW-1:0] din,
  input  pos_t          pos_x,
  input  pos_t          pos_y,
  output logic [DW-1:0] win [N][N],
  output pos_t          cx,
  output pos_t          cy
);

  localparam int R  = (N - 1) / 2;
  localparam int AW = $clog2(W);

  logic [DW-1:0] lb [N-1][W];     // lb[r]: the row r+1 above the input row
  logic [DW-1:0] col [N];         // col[r]: pixel r rows above the input
  logic [DW-1:0] sr [N][N];       // unmasked window
  logic [AW-1:0] ca;
  pos_t          lx, ly;          // position of the newest pixel in sr

  assign ca     = AW'(pos_x);
  assign col[0] = din;
  for (genvar r = 1; r < N; r++) begin : g_col
    assign col[r] = lb[r-1][ca];
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      for (int r = 0; r < N - 1; r++) lb[r][ca] <= col[r];
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N - 1; j++) sr[i][j] <= sr[i][j+1];
        sr[i][N-1] <= col[N-1-i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lx <= '0;
      ly <= -pos_t'(1);
    end else if (adv) begin
      lx <= pos_x;
      ly <= pos_y;
    end
  end

  assign cx = back_x(lx, R * W + R, W);
  assign cy = back_y(lx, ly, R * W + R, W);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        int tx, ty;
        tx = int'(cx) + j - R;
        ty = int'(cy) + i - R;
        win[i][j] = (tx >= 0 && tx < W && ty >= 0 && ty < H) ? sr[i][j] : '0;
      end
    end
  end

endmodule
