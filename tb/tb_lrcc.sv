// tb_lrcc: checks the left-right consistency check against the reference
// model on random maps in which part of the right map confirms the left map.
// Two frames: one with random input gaps, one continuous to measure the
// one-beat latency. Also counts the three outcomes (kept, inconsistent, no
// partner) so each is seen.
module tb_lrcc;
  import pp_pkg::*;
  import pp_ref_pkg::*;

  localparam int W = 40, H = 5, TH = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  disp_t in_dl = '0, in_dr = '0;
  logic out_valid, out_sof;
  disp_t out_disp;

  lrcc #(.W(W), .H(H)) dut (
    .clk, .rst_n, .in_valid, .in_sof, .in_dl, .in_dr, .th(disp_t'(TH)),
    .out_valid, .out_sof, .out_disp
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  img_t dl, dr, exp_o;
  int got[$];
  longint t_first_in, t_first_out;

  always @(posedge clk) if (rst_n && out_valid) begin
    if (got.size() == 0) begin
      t_first_out = $time;
      checks++;
      if (!out_sof) begin failures++; $display("FAIL: first output without sof"); end
    end
    got.push_back(int'(out_disp));
  end

  task automatic drive(input bit gaps);
    for (int i = 0; i < W*H; i++) begin
      if (gaps) while ($urandom_range(3) == 0) begin
        in_valid <= 0; @(posedge clk);
      end
      in_valid <= 1; in_sof <= (i == 0);
      in_dl <= disp_t'(dl[i]); in_dr <= disp_t'(dr[i]);
      @(posedge clk);
      if (i == 0) t_first_in = $time;
    end
    in_valid <= 0; in_sof <= 0;
    repeat (10) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_keep, n_bad, n_edge;
    n_keep = 0; n_bad = 0; n_edge = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      dl = new[W*H]; dr = new[W*H];
      foreach (dl[i]) begin dl[i] = $urandom_range(30); dr[i] = $urandom_range(30); end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          if (x - dl[y*W+x] >= 0 && $urandom_range(2) != 0) begin
            int v;
            v = dl[y*W+x] + int'($urandom_range(8)) - 4;
            dr[y*W+x-dl[y*W+x]] = (v < 0) ? 0 : v;
          end
      exp_o = lrcc_ref(dl, dr, W, H, TH);
      got.delete();
      drive(f == 0);
      checks++;
      if (got.size() != W*H) begin
        failures++; $display("FAIL: frame %0d got %0d pixels", f, got.size());
      end else
        foreach (exp_o[i]) begin
          checks++;
          if (got[i] != exp_o[i]) begin
            failures++;
            if (failures < 10) $display("FAIL: f%0d px %0d got %0d exp %0d", f, i, got[i], exp_o[i]);
          end
          if (i % W - dl[i] < 0) n_edge++;
          else if (exp_o[i] != 0 || dl[i] == 0) n_keep++;
          else n_bad++;
        end
      if (f == 1) begin
        checks++;
        if ((t_first_out - t_first_in) / 10 != 1) begin
          failures++; $display("FAIL: latency %0d", (t_first_out - t_first_in) / 10);
        end
      end
    end
    $display("kept=%0d inconsistent=%0d no_partner=%0d", n_keep, n_bad, n_edge);
    checks++;
    if (n_keep == 0 || n_bad == 0 || n_edge == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
