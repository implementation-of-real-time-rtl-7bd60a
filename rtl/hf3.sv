// hf3: three-way ("semi-2D") hole filler.
//
// A hole left by the consistency check usually lies in the background, so it
// is filled with the smallest (farthest) valid disparity found in three scan
// directions: left-to-right, right-to-left and top-to-bottom. Each direction
// is an hf_1way filler that carries the nearest valid disparity forward. The
// right-to-left path reuses the left-to-right filler between two horizontal
// mirrors; the top-to-bottom filler keeps one line of column state.
//
// The mirrored path is the slowest (two rows plus one beat), so the other
// paths are delayed to match: the left-to-right and top-to-bottom results by
// 2W beats after their filler, the unfilled input by 2W+1 beats. The
// "Minimum" stage takes the smallest non-hole candidate of the three, and
// the "Compare" stage puts it out only where the delayed input is a hole;
// any other pixel passes unchanged. With hf_en low the block passes the
// delayed input through (hole filling switched off).
//
// Interface: in_valid/in_sof/in_disp stream, hf_en, out_valid/out_sof/
// out_disp stream. Timing: latency 2W+2 beats; the same number of beats of
// flush after the last pixel of a frame.
module hf3
  import pp_pkg::*;
#(
  parameter int W = 1280,
  parameter int H = 720
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_sof,
  input  disp_t in_disp,
  input  logic  hf_en,
  output logic  out_valid,
  output logic  out_sof,
  output disp_t out_disp
);

  localparam int LAT = 2 * W + 2;

  logic adv, draining;
  pos_t px, py, ox, oy;

  frame_ctrl #(.W(W), .H(H), .DRAIN(LAT)) u_fc (
    .clk, .rst_n, .in_valid, .in_sof,
    .adv, .pos_x(px), .pos_y(py), .draining
  );

  disp_t m1, hr, m2;      // right-to-left path
  disp_t hl, hl_d;        // left-to-right path
  disp_t tv, tv_d;        // top-to-bottom path
  disp_t dir_d;           // unfilled input, delayed

  // Right-to-left: mirror, fill left-to-right, mirror back.
  hmirror #(.W(W), .DW(DISP_W)) u_mir_in (
    .clk, .adv, .din(in_disp), .pos_x(px), .pos_y(py), .dout(m1)
  );
  hf_1way #(.W(W), .VERTICAL(1'b0)) u_hf_r2l (
    .clk, .rst_n, .adv, .din(m1),
    .pos_x(back_x(px, W, W)), .pos_y(back_y(px, py, W, W)), .dout(hr)
  );
  hmirror #(.W(W), .DW(DISP_W)) u_mir_out (
    .clk, .adv, .din(hr),
    .pos_x(back_x(px, W + 1, W)), .pos_y(back_y(px, py, W + 1, W)), .dout(m2)
  );

  // Left-to-right.
  hf_1way #(.W(W), .VERTICAL(1'b0)) u_hf_l2r (
    .clk, .rst_n, .adv, .din(in_disp), .pos_x(px), .pos_y(py), .dout(hl)
  );
  delay_line #(.DW(DISP_W), .DEPTH(2 * W)) u_dl_l2r (
    .clk, .rst_n, .adv, .din(hl), .dout(hl_d)
  );

  // Top-to-bottom.
  hf_1way #(.W(W), .VERTICAL(1'b1)) u_hf_t2b (
    .clk, .rst_n, .adv, .din(in_disp), .pos_x(px), .pos_y(py), .dout(tv)
  );
  delay_line #(.DW(DISP_W), .DEPTH(2 * W)) u_dl_t2b (
    .clk, .rst_n, .adv, .din(tv), .dout(tv_d)
  );

  // Unfilled input.
  delay_line #(.DW(DISP_W), .DEPTH(2 * W + 1)) u_dl_in (
    .clk, .rst_n, .adv, .din(in_disp), .dout(dir_d)
  );

  // Minimum of the non-hole candidates.
  function automatic disp_t min_valid(input disp_t a, input disp_t b);
    if (a == HOLE) return b;
    if (b == HOLE) return a;
    return (a < b) ? a : b;
  endfunction

  disp_t cand_min;
  assign cand_min = min_valid(min_valid(hl_d, tv_d), m2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      out_disp <= HOLE;
    else if (adv)
      out_disp <= (hf_en && dir_d == HOLE) ? cand_min : dir_d;
  end

  assign ox        = back_x(px, LAT, W);
  assign oy        = back_y(px, py, LAT, W);
  assign out_valid = adv && oy >= 0 && oy < pos_t'(H);
  assign out_sof   = adv && ox == 0 && oy == 0;

endmodule
