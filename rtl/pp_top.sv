// pp_top: real-time post-processor for the disparity maps of a hybrid
// (active + passive) stereo matcher.
//
// Four blocks in cascade refine the raw left-referenced disparity map:
//   lrcc      left-right consistency check: drops disparities that the
//             right-referenced map does not confirm (occlusions, mismatches);
//   hf3       3-way hole filler: fills those holes with the farthest nearby
//             background disparity found left, right and above;
//   vc        9 x 9 variance check on the pattern-on image: drops
//             disparities in regions without texture;
//   wmf_chain 7 x 7 weighted median filter, weights from the pattern-off
//             image, 0..8 passes: removes streaks and fills small holes
//             without blurring edges.
// The pattern-on and pattern-off images reach vc and wmf_chain through
// FIFOs that keep them in step with the disparity stream.
//
// Run-time settings (cfg_*) are sampled on the first pixel of each frame and
// hold for that frame: consistency threshold, hole filling on/off,
// mean-deviation threshold (U8.4) and WMF pass count. The WMF weight tables
// are written directly through cfg_lut_*, between frames.
//
// Stream protocol: one pixel per clock while in_valid; in_sof marks pixel
// (0,0); pixels in raster order, W x H per frame. After the last pixel of a
// frame the blocks flush their pipelines one after the other; the next frame
// may start only after BLANK_MIN idle cycles (about 34 rows at W = 1280,
// H = 720, which fits the blanking of 720p at 60 frames/s on a 58 MHz clock).
// The stage taps (lrcc_*, hf_*, vc_*) show the intermediate maps.
module pp_top
  import pp_pkg::*;
#(
  parameter int  W          = 1280,
  parameter int  H          = 720,
  parameter int  VC_N       = 9,
  parameter int  WMF_N      = 7,
  parameter int  MAX_ITER   = 8,
  parameter real SIGMA_SIM  = 3.0,
  parameter real SIGMA_PROX = 33.0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // raw stream
  input  logic                          in_valid,
  input  logic                          in_sof,
  input  disp_t                         in_disp_l,
  input  disp_t                         in_disp_r,
  input  pix_t                          in_pat_on,
  input  pix_t                          in_pat_off,
  // run-time settings
  input  disp_t                         cfg_th_lrcc,
  input  logic                          cfg_hf_en,
  input  logic [PIX_W+MD_FRAC-1:0]      cfg_th_md,
  input  logic [$clog2(MAX_ITER+1)-1:0] cfg_wmf_iter,
  input  logic                          cfg_lut_we,
  input  logic                          cfg_lut_sel,
  input  logic [7:0]                    cfg_lut_addr,
  input  logic [LUT_W-1:0]              cfg_lut_data,
  // stage taps
  output logic                          lrcc_valid,
  output disp_t                         lrcc_disp,
  output logic                          hf_valid,
  output disp_t                         hf_disp,
  output logic                          vc_valid,
  output disp_t                         vc_disp,
  // refined stream
  output logic                          out_valid,
  output logic                          out_sof,
  output disp_t                         out_disp
);

  localparam int LAT_LRCC = 1;
  localparam int LAT_HF   = 2 * W + 2;
  localparam int LAT_VC   = 2 * (((VC_N - 1) / 2) * (W + 1) + 3) + 1;
  localparam int LAT_WMF  = ((WMF_N - 1) / 2) * (W + 1) + 4;
  localparam int ON_DEPTH  = 1 << $clog2(LAT_LRCC + LAT_HF + 4);
  localparam int OFF_DEPTH = 1 << $clog2(LAT_LRCC + LAT_HF + LAT_VC + 4);
  localparam int BLANK_MIN = LAT_LRCC + LAT_HF + LAT_VC + MAX_ITER * LAT_WMF;

  // Settings, held for a frame.
  disp_t                         th_lrcc;
  logic                          hf_en;
  logic [PIX_W+MD_FRAC-1:0]      th_md;
  logic [$clog2(MAX_ITER+1)-1:0] wmf_iter;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      th_lrcc  <= TH_LRCC_DEFAULT;
      hf_en    <= 1'b1;
      th_md    <= (PIX_W+MD_FRAC)'(TH_MD_DEFAULT);
      wmf_iter <= ($clog2(MAX_ITER+1))'(WMF_ITER_DEFAULT);
    end else if (in_valid && in_sof) begin
      th_lrcc  <= cfg_th_lrcc;
      hf_en    <= cfg_hf_en;
      th_md    <= cfg_th_md;
      wmf_iter <= cfg_wmf_iter;
    end
  end

  // The first pixel of a frame already uses that frame's settings.
  disp_t th_lrcc_now;
  assign th_lrcc_now = (in_valid && in_sof) ? cfg_th_lrcc : th_lrcc;

  logic l_sof, h_sof, v_sof;
  pix_t on_pix, off_pix;

  lrcc #(.W(W), .H(H)) u_lrcc (
    .clk, .rst_n, .in_valid, .in_sof, .in_dl(in_disp_l), .in_dr(in_disp_r),
    .th(th_lrcc_now),
    .out_valid(lrcc_valid), .out_sof(l_sof), .out_disp(lrcc_disp)
  );

  hf3 #(.W(W), .H(H)) u_hf (
    .clk, .rst_n, .in_valid(lrcc_valid), .in_sof(l_sof), .in_disp(lrcc_disp),
    .hf_en,
    .out_valid(hf_valid), .out_sof(h_sof), .out_disp(hf_disp)
  );

  pix_fifo #(.DW(PIX_W), .DEPTH(ON_DEPTH)) u_fifo_on (
    .clk, .rst_n, .push(in_valid), .din(in_pat_on), .pop(hf_valid), .dout(on_pix),
    .empty(), .full(), .level()
  );

  vc #(.W(W), .H(H), .N(VC_N)) u_vc (
    .clk, .rst_n, .in_valid(hf_valid), .in_sof(h_sof), .in_disp(hf_disp),
    .in_pix(on_pix), .th_md,
    .out_valid(vc_valid), .out_sof(v_sof), .out_disp(vc_disp)
  );

  pix_fifo #(.DW(PIX_W), .DEPTH(OFF_DEPTH)) u_fifo_off (
    .clk, .rst_n, .push(in_valid), .din(in_pat_off), .pop(vc_valid), .dout(off_pix),
    .empty(), .full(), .level()
  );

  wmf_chain #(.W(W), .H(H), .N(WMF_N), .MAX_ITER(MAX_ITER),
              .SIGMA_SIM(SIGMA_SIM), .SIGMA_PROX(SIGMA_PROX)) u_wmf (
    .clk, .rst_n, .in_valid(vc_valid), .in_sof(v_sof), .in_disp(vc_disp),
    .in_pix(off_pix), .iter(wmf_iter),
    .cfg_we(cfg_lut_we), .cfg_sel(cfg_lut_sel), .cfg_addr(cfg_lut_addr),
    .cfg_data(cfg_lut_data),
    .out_valid, .out_sof, .out_disp
  );

endmodule
