// search_strategy_decision_tb: random and constructed 16x16 macroblocks.
// Checks Diff (SAD to the reference MB), the Sobel edge sum (model with
// replicated side pixels, |dx| + |dy| per pixel), the class from the two
// thresholds, and the latency: done 2 cycles after start for a stationary MB
// and 2 + 8 cycles otherwise (8 cycles of 32 edge amplitudes each).
module search_strategy_decision_tb;
  import sad_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;
  pixel_t cur [N*N];
  pixel_t refm [N*N];
  pixel_t pad_top [N];
  pixel_t pad_bot [N];
  logic [15:0] thr_t, diff;
  logic [19:0] thr_h, edge_sum;
  logic busy, done;
  mb_class_t mb_class;

  search_strategy_decision #(.N(N)) dut (.clk, .rst_n, .start, .cur, .refm, .pad_top, .pad_bot,
                                         .thr_t, .thr_h, .busy, .done, .diff, .edge_sum, .mb_class);

  int checks = 0, failures = 0;
  int n_class [3] = '{0, 0, 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int px(input int r, input int c);
    int cc = c < 1 ? 0 : c > N ? N - 1 : c - 1;
    if (r == 0) return int'(pad_top[cc]);
    if (r == N + 1) return int'(pad_bot[cc]);
    return int'(cur[(r - 1) * N + cc]);
  endfunction

  initial begin
    int d, e, lat;
    mb_class_t cls;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 24; t++) begin
      for (int k = 0; k < N*N; k++) begin
        case (t % 4)
          0: begin cur[k] = pixel_t'($urandom); refm[k] = pixel_t'($urandom); end           // textured
          1: begin cur[k] = pixel_t'($urandom); refm[k] = pixel_t'(cur[k] ^ ($urandom % 2)); end // stationary
          2: begin cur[k] = 8'd90 + pixel_t'(k % 16 / 8); refm[k] = pixel_t'($urandom); end    // nearly flat
          default: begin cur[k] = pixel_t'(k * 3); refm[k] = pixel_t'(k * 3 + 20); end
        endcase
      end
      for (int k = 0; k < N; k++) begin
        pad_top[k] = (t % 4 == 2) ? 8'd90 : pixel_t'($urandom);
        pad_bot[k] = (t % 4 == 2) ? 8'd91 : pixel_t'($urandom);
      end
      thr_t = 16'd300;
      thr_h = 20'd20000;
      d = 0;
      for (int k = 0; k < N*N; k++) d += iabs(int'(cur[k]) - int'(refm[k]));
      e = 0;
      for (int i = 1; i <= N; i++) for (int j = 1; j <= N; j++)
        e += iabs(px(i-1,j+1) - px(i-1,j-1)) + 2 * iabs(px(i,j+1) - px(i,j-1)) + iabs(px(i+1,j+1) - px(i+1,j-1))
           + iabs(px(i+1,j-1) - px(i-1,j-1)) + 2 * iabs(px(i+1,j) - px(i-1,j)) + iabs(px(i+1,j+1) - px(i-1,j+1));
      cls = (d <= int'(thr_t)) ? MB_STATIONARY : (e < int'(thr_h)) ? MB_HOMOGENEOUS : MB_TEXTURED;
      start = 1'b1; @(negedge clk); start = 1'b0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(int'(diff) == d, $sformatf("MB %0d: diff %0d expected %0d", t, diff, d));
      if (cls != MB_STATIONARY)
        check(int'(edge_sum) == e, $sformatf("MB %0d: edge_sum %0d expected %0d", t, edge_sum, e));
      check(mb_class == cls, $sformatf("MB %0d: class %0d expected %0d", t, mb_class, cls));
      check(lat == ((cls == MB_STATIONARY) ? 2 : 10), $sformatf("MB %0d: latency %0d", t, lat));
      n_class[cls]++;
      @(negedge clk);
    end
    check(n_class[0] > 0 && n_class[1] > 0 && n_class[2] > 0, "all three classes seen");
    $display("classes: stationary=%0d homogeneous=%0d textured=%0d", n_class[0], n_class[1], n_class[2]);
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
