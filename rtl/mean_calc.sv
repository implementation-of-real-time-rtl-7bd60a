// mean_calc: arithmetic mean of an N x N window of a pixel stream.
//
// A win_gen builds the window; the first pipeline stage adds each window row
// (the horizontal sums), the second adds the row sums (the vertical sum) and
// divides by N*N. The division by the constant N*N is a multiplication by a
// rounded-up reciprocal and a shift, wide enough to give exactly
// floor(sum * 2^EXTRA / (N*N)). EXTRA fraction bits are added to the result,
// so the mean has DW integer and EXTRA fraction bits. Taps outside the frame
// count as 0 and the divisor stays N*N.
//
// Interface: adv (beat enable), din and its raster position, mean.
// Timing: mean, as seen during a beat, belongs to the pixel that entered
// R*W+R+3 beats earlier (R = (N-1)/2): one beat for the window registers and
// one for each pipeline stage. It changes after each beat.
module mean_calc
  import pp_pkg::*;
#(
  parameter int W     = 1280,
  parameter int H     = 720,
  parameter int N     = 9,
  parameter int DW    = 8,
  parameter int EXTRA = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adv,
  input  logic [DW-1:0]    din,
  input  pos_t             pos_x,
  input  pos_t             pos_y,
  output logic [DW+EXTRA-1:0] mean
);

  localparam int HW    = DW + $clog2(N + 1);            // one row sum
  localparam int SW    = DW + $clog2(N * N + 1);        // window sum
  localparam int NB    = SW + EXTRA;                    // dividend bits
  localparam int SHIFT = recip_shift(N * N, NB);
  localparam longint MUL = recip_mul(N * N, NB);
  localparam int MW    = SHIFT + 1;                     // reciprocal bits

  logic [DW-1:0] win [N][N];
  logic [HW-1:0] hsum [N];
  logic [SW-1:0] vsum;
  logic [NB+MW-1:0] prod;

  win_gen #(.W(W), .H(H), .N(N), .DW(DW)) u_win (
    .clk, .rst_n, .adv, .din, .pos_x, .pos_y, .win, .cx(), .cy()
  );

  // Horizontal sums.
  logic [HW-1:0] hs [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      hs[i] = '0;
      for (int j = 0; j < N; j++) hs[i] += HW'(win[i][j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   hsum <= '{default: '0};
    else if (adv) hsum <= hs;
  end

  // Vertical sum and divider.
  always_comb begin
    vsum = '0;
    for (int i = 0; i < N; i++) vsum += SW'(hsum[i]);
    prod = ((NB + MW)'(vsum) << EXTRA) * (NB + MW)'(MUL);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   mean <= '0;
    else if (adv) mean <= (DW + EXTRA)'(prod >> SHIFT);
  end

endmodule
