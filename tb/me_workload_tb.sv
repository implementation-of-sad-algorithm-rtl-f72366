// me_workload_tb: the evaluation setup of the design (16x16 blocks, 24x24
// search window, full search) on a synthetic sequence of 8 blocks, run on two
// instances side by side: one with only the final comparator (PARTIAL_CMP = 0)
// and one with the six partial-SAD comparators (PARTIAL_CMP = 1, the default).
// Each block is a copy of a window block at a random displacement with noise
// of varying strength. Both instances must return the full-search minimum
// and its vector; the partial-comparator instance must never need more
// cycles. The cycles of both are reported against a search without early
// termination (81 candidates x 24 cycles).
module me_workload_tb;
  import sad_pkg::*;

  localparam int N  = 16;
  localparam int SW = 24;
  localparam int R  = SW - N + 1;
  localparam int NB = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        wr_en = 1'b0, start = 1'b0;
  logic [1:0]  wr_sel = '0;
  logic [7:0]  wr_row = '0, wr_col = '0;
  pixel_t      wr_data = '0;
  logic [15:0] thr_t = 16'd512;
  logic [19:0] thr_h = 20'd60000;

  logic        done [2];
  logic [15:0] min_sad [2];
  logic [15:0] diff [2];
  logic [19:0] edge_sum [2];
  mv_t         best_mv [2];
  mb_class_t   mb_class [2];
  logic [15:0] n_cand [2], n_early [2], n_new_min [2];

  me_top #(.PARTIAL_CMP(1'b0)) u_final (
    .clk, .rst_n, .wr_en, .wr_sel, .wr_row, .wr_col, .wr_data, .start, .thr_t, .thr_h,
    .done(done[0]), .min_sad(min_sad[0]), .best_mv(best_mv[0]), .mb_class(mb_class[0]),
    .diff(diff[0]), .edge_sum(edge_sum[0]), .n_cand(n_cand[0]), .n_early(n_early[0]),
    .n_new_min(n_new_min[0]));

  me_top u_partial (
    .clk, .rst_n, .wr_en, .wr_sel, .wr_row, .wr_col, .wr_data, .start, .thr_t, .thr_h,
    .done(done[1]), .min_sad(min_sad[1]), .best_mv(best_mv[1]), .mb_class(mb_class[1]),
    .diff(diff[1]), .edge_sum(edge_sum[1]), .n_cand(n_cand[1]), .n_early(n_early[1]),
    .n_new_min(n_new_min[1]));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int win [SW][SW];
  int blk [N][N];

  function automatic int clip(input int v);
    return v < 0 ? 0 : v > 255 ? 255 : v;
  endfunction

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic wr(input int sel, input int r, input int c, input int d);
    @(negedge clk);
    wr_en = 1'b1; wr_sel = 2'(sel); wr_row = 8'(r); wr_col = 8'(c); wr_data = pixel_t'(d);
  endtask

  initial begin
    int best, bx, by, s, t0, dx, dy, amp, ph;
    int t_end [2];
    int tot [2] = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++) begin
      ph  = int'($urandom % 7);
      for (int r = 0; r < SW; r++) for (int c = 0; c < SW; c++)
        win[r][c] = clip(128 + 50 * (((r + ph) * 5 + c * 3) % 7 - 3) / 3 + int'($urandom % 61) - 30);
      dx  = int'($urandom % R);
      dy  = int'($urandom % R);
      amp = 2 + 4 * b;
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
        blk[r][c] = clip(win[dy + r][dx + c] + int'($urandom % (2 * amp + 1)) - amp);
      best = 1 << 30; bx = 0; by = 0;
      for (int y = 0; y < R; y++) for (int x = 0; x < R; x++) begin
        s = 0;
        for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) s += iabs(blk[r][c] - win[y + r][x + c]);
        if (s < best) begin best = s; bx = x - R / 2; by = y - R / 2; end
      end
      for (int r = 0; r < SW; r++) for (int c = 0; c < SW; c++) wr(0, r, c, win[r][c]);
      for (int r = 0; r < N; r++)  for (int c = 0; c < N; c++)  wr(1, r, c, blk[r][c]);
      for (int c = 0; c < N; c++) begin wr(2, 0, c, 128); wr(3, 0, c, 128); end
      @(negedge clk); wr_en = 1'b0;
      @(negedge clk); start = 1'b1;
      t0 = cyc;
      @(negedge clk); start = 1'b0;
      t_end = '{0, 0};
      while (t_end[0] == 0 || t_end[1] == 0) begin
        for (int i = 0; i < 2; i++) if (done[i] && t_end[i] == 0) t_end[i] = cyc;
        @(negedge clk);
      end
      for (int i = 0; i < 2; i++) begin
        check(int'(min_sad[i]) == best, $sformatf("block %0d model %0d: min_sad %0d expected %0d", b, i, min_sad[i], best));
        check(int'(best_mv[i].dx) == bx && int'(best_mv[i].dy) == by,
              $sformatf("block %0d model %0d: vector (%0d,%0d) expected (%0d,%0d)", b, i,
                        int'(best_mv[i].dx), int'(best_mv[i].dy), bx, by));
        check(n_cand[i] == 16'(R * R), $sformatf("block %0d model %0d: %0d candidates", b, i, n_cand[i]));
        tot[i] += t_end[i] - t0;
      end
      check(t_end[1] <= t_end[0], $sformatf("block %0d: partial comparators slower (%0d > %0d cycles)",
                                             b, t_end[1] - t0, t_end[0] - t0));
      $display("block %0d noise +-%0d: vector (%0d,%0d) SAD %0d; cycles final-only %0d, partial %0d; early rejections %0d / %0d",
               b, amp, bx, by, best, t_end[0] - t0, t_end[1] - t0, n_early[0], n_early[1]);
    end
    check(tot[1] < tot[0], "partial comparators save cycles over the sequence");
    $display("total cycles: no early termination %0d, final comparator only %0d, with partial comparators %0d",
             NB * R * R * 24, tot[0], tot[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
