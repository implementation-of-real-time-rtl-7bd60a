// pp_pkg: types and constants shared by the stereo disparity post-processor.
//
// All blocks move one pixel per clock (when the stream is valid) in raster
// order. Disparities are 8-bit (256 disparity levels, one histogram bin per
// level in the weighted median filter). Intensities of the pattern-on and
// pattern-off reference images are 8-bit gray-scale.
//
// A disparity of 0 marks a hole (an invalid disparity). The consistency check
// writes it, the hole filler looks for it, the variance check writes it and
// the weighted median filter gives it no vote. Using 0 rather than a signed
// -1 keeps the disparity an unsigned byte.
//
// Frame positions travel with the data as signed 16-bit numbers so that
// blocks with a vertical delay can name rows before the first row (negative)
// and the flush rows after the last one (row >= height).
package pp_pkg;

  localparam int DISP_W = 8;
  localparam int PIX_W  = 8;
  localparam int POS_W  = 16;

  typedef logic [DISP_W-1:0]       disp_t;
  typedef logic [PIX_W-1:0]        pix_t;
  typedef logic signed [POS_W-1:0] pos_t;

  localparam disp_t HOLE = '0;

  // Default run-time settings (the tuned values of the reference scene).
  localparam disp_t TH_LRCC_DEFAULT = disp_t'(3);   // consistency threshold
  localparam int    MD_FRAC         = 4;            // fraction bits of the mean deviation
  localparam int    TH_MD_DEFAULT   = 88;           // 5.5 in U8.4
  localparam int    WMF_ITER_DEFAULT = 1;

  // Weighted median filter weights: look-up tables of 11-bit values and a
  // 5-bit (16-level, 0..15) tap weight.
  localparam int LUT_W = 11;
  localparam int WGT_W = 5;

  // floor(x / d) == (x * recip_mul(d, n)) >> recip_shift(d, n) for every
  // n-bit x (round-up reciprocal with n + ceil(log2 d) fraction bits).
  function automatic int recip_shift(input int d, input int n);
    return n + $clog2(d);
  endfunction

  function automatic longint recip_mul(input int d, input int n);
    longint one;
    one = longint'(1) << recip_shift(d, n);
    return (one + longint'(d) - 1) / longint'(d);
  endfunction

  // Raster position of the pixel that entered `d` beats before the pixel at
  // (x, y), in a frame `w` pixels wide. Rows before the first come out
  // negative.
  function automatic pos_t back_x(input pos_t x, input int d, input int w);
    int r;
    r = d % w;
    return (int'(x) >= r) ? pos_t'(int'(x) - r) : pos_t'(int'(x) - r + w);
  endfunction

  function automatic pos_t back_y(input pos_t x, input pos_t y, input int d, input int w);
    int q, r;
    q = d / w;
    r = d % w;
    return (int'(x) >= r) ? pos_t'(int'(y) - q) : pos_t'(int'(y) - q - 1);
  endfunction

endpackage
