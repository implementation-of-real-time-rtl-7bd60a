// tb_pp_top: end-to-end test of the post-processor at a reduced frame size
// (48 x 32, two WMF passes). A synthetic scene (a near box in front of a
// background, random mismatches, a textureless band in the pattern-on image)
// runs through four frames with different settings. Every stage tap and the
// final output are compared with the chained reference models, and the test
// counts how often each mechanism acted: consistency holes, hole fills, hole
// filling switched off, variance-check drops, median changes, and 0, 1 and 2
// median passes. Frame 0 has input gaps; the last frame checks the total
// latency.
module tb_pp_top;
  import pp_pkg::*;
  import pp_ref_pkg::*;

  localparam int W = 48, H = 32, MI = 2, NF = 4, BOXD = 14;
  localparam int LAT = 1 + (2 * W + 2) + (2 * (4 * (W + 1) + 3) + 1) + MI * (3 * (W + 1) + 4);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  disp_t in_disp_l = '0, in_disp_r = '0;
  pix_t in_pat_on = '0, in_pat_off = '0;
  disp_t cfg_th_lrcc = disp_t'(3);
  logic cfg_hf_en = 1;
  logic [11:0] cfg_th_md = 12'd88;
  logic [3:0] cfg_wmf_iter = 4'd1;
  logic lrcc_valid, hf_valid, vc_valid, out_valid, out_sof;
  disp_t lrcc_disp, hf_disp, vc_disp, out_disp;

  pp_top #(.W(W), .H(H), .MAX_ITER(MI)) dut (
    .clk, .rst_n, .in_valid, .in_sof, .in_disp_l, .in_disp_r, .in_pat_on, .in_pat_off,
    .cfg_th_lrcc, .cfg_hf_en, .cfg_th_md, .cfg_wmf_iter,
    .cfg_lut_we(1'b0), .cfg_lut_sel(1'b0), .cfg_lut_addr(8'd0), .cfg_lut_data(11'd0),
    .lrcc_valid, .lrcc_disp, .hf_valid, .hf_disp, .vc_valid, .vc_disp,
    .out_valid, .out_sof, .out_disp
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  img_t dl, dr, pon, poff, e_l, e_h, e_v, e_o;
  int g_l[$], g_h[$], g_v[$], g_o[$];
  longint t_first_in, t_first_out;

  always @(posedge clk) if (rst_n) begin
    if (lrcc_valid) g_l.push_back(int'(lrcc_disp));
    if (hf_valid)   g_h.push_back(int'(hf_disp));
    if (vc_valid)   g_v.push_back(int'(vc_disp));
    if (out_valid) begin
      if (g_o.size() == 0) begin
        t_first_out = $time;
        checks++;
        if (!out_sof) begin failures++; $display("FAIL: first output without sof"); end
      end
      g_o.push_back(int'(out_disp));
    end
  end

  task automatic drive(input bit gaps);
    for (int i = 0; i < W*H; i++) begin
      if (gaps) while ($urandom_range(3) == 0) begin
        in_valid <= 0; @(posedge clk);
      end
      in_valid <= 1; in_sof <= (i == 0);
      in_disp_l <= disp_t'(dl[i]); in_disp_r <= disp_t'(dr[i]);
      in_pat_on <= pix_t'(pon[i]); in_pat_off <= pix_t'(poff[i]);
      @(posedge clk);
      if (i == 0) t_first_in = $time;
    end
    in_valid <= 0; in_sof <= 0;
    repeat (LAT + 20) @(posedge clk);
  endtask

  task automatic cmp(input string tag, input int f, ref int g[$], input img_t e);
    checks++;
    if (g.size() != W*H) begin
      failures++; $display("FAIL: %s frame %0d got %0d pixels", tag, f, g.size());
      return;
    end
    foreach (e[i]) begin
      checks++;
      if (g[i] != e[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: %s f%0d (x=%0d y=%0d) got %0d exp %0d", tag, f, i % W, i / W, g[i], e[i]);
      end
    end
  endtask

  // A scene: background at disparity 8, a nearer box at disparity BOXD, a
  // pattern-on image with a flat (textureless) band, a pattern-off image that
  // follows the objects; some random mismatches in both disparity maps.
  task automatic make_scene();
    dl = new[W*H]; dr = new[W*H]; pon = new[W*H]; poff = new[W*H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        bit box;
        box = (x >= W / 3 && x < 2 * W / 3 && y >= H / 4 && y < 3 * H / 4);
        dl[y*W+x]   = box ? BOXD : 8;
        poff[y*W+x] = (box ? 170 : 60) + $urandom_range(6);
        pon[y*W+x]  = (y >= H / 3 && x >= W / 2) ? 90 : $urandom_range(255);
        dr[y*W+x]   = 8;
      end
    // The right map sees each left pixel at x - d; the box hides background.
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if (x - dl[y*W+x] >= 0 && (dl[y*W+x] == BOXD || dr[y*W+x-dl[y*W+x]] != BOXD))
          dr[y*W + x - dl[y*W+x]] = dl[y*W+x];
    for (int i = 0; i < W*H; i++) begin
      if ($urandom_range(15) == 0) dl[i] = $urandom_range(60);
      if ($urandom_range(15) == 0) dr[i] = $urandom_range(60);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int th_l[NF], hf_on[NF], th_m[NF], it[NF];
    int n_lrcc_hole = 0, n_hf_fill = 0, n_hf_off = 0, n_vc_drop = 0, n_wmf_change = 0;
    int n_iter_seen[4] = '{0, 0, 0, 0};
    th_l  = '{3, 5, 3, 2};
    hf_on = '{1, 0, 1, 1};
    th_m  = '{88, 88, 40, 120};
    it    = '{1, 2, 0, 2};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      make_scene();
      cfg_th_lrcc = disp_t'(th_l[f]); cfg_hf_en = hf_on[f][0];
      cfg_th_md = 12'(th_m[f]); cfg_wmf_iter = 4'(it[f]);
      e_l = lrcc_ref(dl, dr, W, H, th_l[f]);
      e_h = hf_ref(e_l, W, H, hf_on[f] != 0);
      e_v = vc_ref(e_h, pon, W, H, 9, th_m[f]);
      e_o = e_v;
      for (int k = 0; k < it[f]; k++) e_o = wmf_ref(e_o, poff, W, H, 7, 3.0, 33.0);
      foreach (e_l[i]) begin
        if (e_l[i] == 0 && dl[i] != 0) n_lrcc_hole++;
        if (hf_on[f] != 0 && e_l[i] == 0 && e_h[i] != 0) n_hf_fill++;
        if (hf_on[f] == 0 && e_l[i] == 0) n_hf_off++;
        if (e_h[i] != 0 && e_v[i] == 0) n_vc_drop++;
        if (e_o[i] != e_v[i]) n_wmf_change++;
      end
      n_iter_seen[it[f]]++;
      g_l.delete(); g_h.delete(); g_v.delete(); g_o.delete();
      drive(f == 0 && NF > 1);
      cmp("lrcc", f, g_l, e_l);
      cmp("hf", f, g_h, e_h);
      cmp("vc", f, g_v, e_v);
      cmp("out", f, g_o, e_o);
      if (f == NF - 1) begin
        checks++;
        if ((t_first_out - t_first_in) / 10 != LAT) begin
          failures++; $display("FAIL: latency %0d, expected %0d", (t_first_out - t_first_in) / 10, LAT);
        end
      end
    end
    $display("lrcc holes=%0d hf fills=%0d holes kept with hf off=%0d vc drops=%0d wmf changes=%0d",
             n_lrcc_hole, n_hf_fill, n_hf_off, n_vc_drop, n_wmf_change);
    $display("frames with 0/1/2/3 wmf passes: %0d %0d %0d %0d", n_iter_seen[0], n_iter_seen[1], n_iter_seen[2], n_iter_seen[3]);
    checks++;
    if (n_lrcc_hole == 0 || n_hf_fill == 0 || n_hf_off == 0 || n_vc_drop == 0 || n_wmf_change == 0 ||
        n_iter_seen[0] == 0 || n_iter_seen[1] == 0 || n_iter_seen[2] == 0) begin
      failures++; $display("FAIL: a mechanism never acted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
