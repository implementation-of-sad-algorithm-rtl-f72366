// me_top_tb: end-to-end test of the motion estimation top at its default
// size (16x16 block, 24x24 window, 81 candidates), no parameter overrides.
//
// Four searches, each checked against a model computed here (full-search SAD
// of every displacement, first minimum in raster order, SAD at zero
// displacement, Sobel edge sum with replicated side pixels, class from the
// two thresholds):
//   1. block = window block at (+3,-2) plus noise: new minima, early and
//      partial-SAD rejections, textured class; cycle count within the
//      13..24 cycles per candidate of the schedule;
//   2. block = exact copy at (-4,+1): exact match found, search cut short;
//   3. block = co-located block: stationary class;
//   4. flat block in a flat neighbourhood: homogeneous class.
// Each mechanism must occur at least once.
module me_top_tb;
  import sad_pkg::*;

  localparam int N  = 16;
  localparam int SW = 24;
  localparam int R  = SW - N + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        wr_en = 1'b0, start = 1'b0, done;
  logic [1:0]  wr_sel = '0;
  logic [7:0]  wr_row = '0, wr_col = '0;
  pixel_t      wr_data = '0;
  logic [15:0] thr_t, min_sad, diff;
  logic [19:0] thr_h, edge_sum;
  mv_t         best_mv;
  mb_class_t   mb_class;
  logic [15:0] n_cand, n_early, n_new_min;

  me_top dut (
    .clk, .rst_n, .wr_en, .wr_sel, .wr_row, .wr_col, .wr_data, .start,
    .thr_t, .thr_h, .done, .min_sad, .best_mv, .mb_class, .diff, .edge_sum,
    .n_cand, .n_early, .n_new_min
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int m_overlap = 0, m_partial = 0, m_early = 0, m_newmin = 0, m_exact_stop = 0;
  int m_stat = 0, m_homo = 0, m_text = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_sad.load && dut.u_sad.h_act && !dut.u_sad.h_done) m_overlap++;
    if (dut.u_sad.h_rej && (dut.u_sad.half_rej || dut.u_sad.qrt_rej) && !dut.u_sad.root_rej) m_partial++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int win [SW][SW];
  int blk [N][N];
  int top [N];
  int bot [N];

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

  task automatic load_all();
    for (int r = 0; r < SW; r++) for (int c = 0; c < SW; c++) wr(0, r, c, win[r][c]);
    for (int r = 0; r < N; r++)  for (int c = 0; c < N; c++)  wr(1, r, c, blk[r][c]);
    for (int c = 0; c < N; c++) wr(2, 0, c, top[c]);
    for (int c = 0; c < N; c++) wr(3, 0, c, bot[c]);
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  function automatic int sad_at(input int y, input int x);
    int s = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) s += iabs(blk[r][c] - win[y+r][x+c]);
    return s;
  endfunction

  function automatic int ext(input int r, input int c);
    int cc = c < 1 ? 0 : c > N ? N - 1 : c - 1;
    if (r == 0) return top[cc];
    if (r == N + 1) return bot[cc];
    return blk[r-1][cc];
  endfunction

  function automatic int edge_model();
    int e = 0;
    for (int i = 1; i <= N; i++) for (int j = 1; j <= N; j++) begin
      e += iabs(ext(i-1,j+1) - ext(i-1,j-1)) + 2 * iabs(ext(i,j+1) - ext(i,j-1))
         + iabs(ext(i+1,j+1) - ext(i+1,j-1));
      e += iabs(ext(i+1,j-1) - ext(i-1,j-1)) + 2 * iabs(ext(i+1,j) - ext(i-1,j))
         + iabs(ext(i+1,j+1) - ext(i-1,j+1));
    end
    return e;
  endfunction

  // Run one search and check it; exact = an exact match exists.
  task automatic run(input string name, input bit exact, input bit timed);
    int best, bx, by, s, t0, t1, e, d;
    mb_class_t cls;
    best = 1 << 30; bx = 0; by = 0;
    for (int y = 0; y < R; y++) for (int x = 0; x < R; x++) begin
      s = sad_at(y, x);
      if (s < best) begin best = s; bx = x - R / 2; by = y - R / 2; end
    end
    d = sad_at(R / 2, R / 2);
    e = edge_model();
    cls = (d <= int'(thr_t)) ? MB_STATIONARY : (e < int'(thr_h)) ? MB_HOMOGENEOUS : MB_TEXTURED;
    load_all();
    @(negedge clk); start = 1'b1;
    t0 = cyc;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    t1 = cyc;
    check(int'(min_sad) == best, $sformatf("%s: min_sad %0d expected %0d", name, min_sad, best));
    check(int'(best_mv.dx) == bx && int'(best_mv.dy) == by,
          $sformatf("%s: mv (%0d,%0d) expected (%0d,%0d)", name, best_mv.dx, best_mv.dy, bx, by));
    check(int'(diff) == d, $sformatf("%s: diff %0d expected %0d", name, diff, d));
    if (d > int'(thr_t))
      check(int'(edge_sum) == e, $sformatf("%s: edge_sum %0d expected %0d", name, edge_sum, e));
    check(mb_class == cls, $sformatf("%s: class %0d expected %0d", name, mb_class, cls));
    if (exact) begin
      check(n_cand < 16'(R * R), $sformatf("%s: exact match should stop the search (%0d candidates)", name, n_cand));
      if (n_cand < 16'(R * R)) m_exact_stop++;
    end else begin
      check(n_cand == 16'(R * R), $sformatf("%s: %0d candidates evaluated", name, n_cand));
    end
    if (timed)
      check(t1 - t0 >= 13 * R * R && t1 - t0 <= 24 * R * R + 40,
            $sformatf("%s: %0d cycles for %0d candidates", name, t1 - t0, R * R));
    m_early  += n_early;
    m_newmin += n_new_min;
    if (mb_class == MB_STATIONARY) m_stat++;
    if (mb_class == MB_HOMOGENEOUS) m_homo++;
    if (mb_class == MB_TEXTURED) m_text++;
    $display("%s: min_sad=%0d mv=(%0d,%0d) diff=%0d edge=%0d class=%0d cand=%0d early=%0d new=%0d cycles=%0d",
             name, min_sad, int'(best_mv.dx), int'(best_mv.dy), diff, edge_sum, mb_class, n_cand, n_early, n_new_min, t1 - t0);
  endtask

  initial begin
    thr_t = 16'd512;
    thr_h = 20'd60000;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // textured reference window
    for (int r = 0; r < SW; r++) for (int c = 0; c < SW; c++)
      win[r][c] = clip(128 + 60 * ((r * 7 + c * 3) % 5 - 2) + int'($urandom % 41) - 20);

    // 1. noisy copy of the block at (+3,-2)
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
      blk[r][c] = clip(win[R/2 - 2 + r][R/2 + 3 + c] + int'($urandom % 9) - 4);
    for (int c = 0; c < N; c++) begin
      top[c] = clip(win[R/2 - 3][R/2 + 3 + c]);
      bot[c] = clip(win[R/2 - 2 + N][R/2 + 3 + c]);
    end
    run("noisy", 1'b0, 1'b1);

    // 2. exact copy at (-4,+1)
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
      blk[r][c] = win[R/2 + 1 + r][R/2 - 4 + c];
    run("exact", 1'b1, 1'b0);

    // 3. co-located block: stationary
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
      blk[r][c] = win[R/2 + r][R/2 + c];
    run("stationary", 1'b1, 1'b0);

    // 4. flat block, flat neighbourhood: homogeneous
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) blk[r][c] = 40;
    for (int c = 0; c < N; c++) begin top[c] = 40; bot[c] = 40; end
    run("flat", 1'b0, 1'b0);

    check(m_newmin > 0, "mechanism: new minimum");
    check(m_early > 0, "mechanism: early termination");
    check(m_partial > 0, "mechanism: rejection by a partial-SAD comparator");
    check(m_overlap > 0, "mechanism: pipelined overlap of two candidates");
    check(m_exact_stop > 0, "mechanism: exact match stops the search");
    check(m_stat > 0 && m_homo > 0 && m_text > 0, "mechanism: all three MB classes");
    $display("mechanisms: new_min=%0d early=%0d partial=%0d overlap=%0d exact_stop=%0d stationary=%0d homogeneous=%0d textured=%0d",
             m_newmin, m_early, m_partial, m_overlap, m_exact_stop, m_stat, m_homo, m_text);
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
