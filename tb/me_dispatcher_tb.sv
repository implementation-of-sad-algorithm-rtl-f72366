// me_dispatcher_tb: a 4x4 block in an 8x8 window (25 displacements). Writes
// window, block and padding rows, runs a full search while holding ready low
// on random cycles, and checks every candidate's pixels and motion vector in
// raster order, the block, co-located block and padding outputs, issue_done
// after the last candidate, and that a zero minimum stops the search early.
module me_dispatcher_tb;
  import sad_pkg::*;

  localparam int N = 4;
  localparam int SW = 8;
  localparam int R = SW - N + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 1'b0, start = 1'b0, min_zero = 1'b0, cand_valid, cand_ready = 1'b0, issue_done;
  logic [1:0] wr_sel = '0;
  logic [7:0] wr_row = '0, wr_col = '0;
  pixel_t wr_data = '0;
  pixel_t cand [N*N];
  pixel_t refb [N*N];
  pixel_t coloc [N*N];
  pixel_t pad_top [N];
  pixel_t pad_bot [N];
  mv_t cand_mv;

  me_dispatcher #(.N(N), .SW(SW)) dut (.clk, .rst_n, .wr_en, .wr_sel, .wr_row, .wr_col, .wr_data,
    .start, .min_zero, .cand_valid, .cand_ready, .cand, .cand_mv, .refb, .coloc, .pad_top, .pad_bot,
    .issue_done);

  int checks = 0, failures = 0;
  int win [SW][SW];
  int blk [N][N];
  int top [N];
  int bot [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input int sel, input int r, input int c, input int d);
    @(negedge clk);
    wr_en = 1'b1; wr_sel = 2'(sel); wr_row = 8'(r); wr_col = 8'(c); wr_data = pixel_t'(d);
  endtask

  initial begin
    int n, x, y;
    bit ok;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < SW; r++) for (int c = 0; c < SW; c++) begin win[r][c] = int'($urandom % 256); wr(0, r, c, win[r][c]); end
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin blk[r][c] = int'($urandom % 256); wr(1, r, c, blk[r][c]); end
    for (int c = 0; c < N; c++) begin top[c] = int'($urandom % 256); wr(2, 0, c, top[c]); end
    for (int c = 0; c < N; c++) begin bot[c] = int'($urandom % 256); wr(3, 0, c, bot[c]); end
    @(negedge clk); wr_en = 1'b0;

    ok = 1;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      if (int'(refb[r*N+c]) != blk[r][c]) ok = 0;
      if (int'(coloc[r*N+c]) != win[R/2 + r][R/2 + c]) ok = 0;
    end
    for (int c = 0; c < N; c++) if (int'(pad_top[c]) != top[c] || int'(pad_bot[c]) != bot[c]) ok = 0;
    check(ok, "block, co-located block and padding rows");

    // full search with back-pressure
    start = 1'b1; @(negedge clk); start = 1'b0;
    n = 0;
    while (n < R * R) begin
      cand_ready = ($urandom % 3) != 0;
      #1;
      if (cand_valid && cand_ready) begin
        y = n / R; x = n % R;
        ok = 1;
        for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
          if (int'(cand[r*N+c]) != win[y + r][x + c]) ok = 0;
        check(ok, $sformatf("candidate %0d pixels", n));
        check(int'(cand_mv.dx) == x - R / 2 && int'(cand_mv.dy) == y - R / 2,
              $sformatf("candidate %0d vector (%0d,%0d)", n, cand_mv.dx, cand_mv.dy));
        check(!issue_done, "issue_done only after the last candidate");
        n++;
      end
      @(negedge clk);
    end
    cand_ready = 1'b0;
    #1;
    check(issue_done && !cand_valid, "issue_done after the last candidate");

    // early stop on a zero minimum
    @(negedge clk);
    start = 1'b1; @(negedge clk); start = 1'b0;
    cand_ready = 1'b1;
    repeat (5) @(negedge clk);
    min_zero = 1'b1;
    #1;
    check(!cand_valid, "no candidate offered once the minimum is 0");
    @(negedge clk);
    #1;
    check(issue_done, "search ends on a zero minimum");
    min_zero = 1'b0;
    cand_ready = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
