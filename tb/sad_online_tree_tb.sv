// sad_online_tree_tb: 16 random 8-bit values enter the tree as MSB-first bit
// streams (8 bits, then 8 zeros, as the absolute-difference stage sends them).
// The root must deliver their 12-digit sum 8 cycles after the leading bits,
// the half-block nodes their 11-digit partial sums after 6 cycles and the
// quarter-block nodes their 10-digit partial sums after 4 cycles. A final
// stream is cut off with clear, after which the outputs must stay zero.
module sad_online_tree_tb;
  import sad_pkg::*;

  localparam int NPIX = 16;
  localparam int PER  = 16;
  localparam int NS   = 60;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  always #5 clk = ~clk;
  sd_digit_t din [NPIX];
  sd_digit_t root;
  sd_digit_t ph [2];
  sd_digit_t pq [4];

  sad_online_tree #(.NPIX(NPIX)) dut (.clk, .rst_n, .clear, .digit_in(din),
                                       .root, .part_half(ph), .part_quarter(pq));

  int checks = 0, failures = 0;
  int val [NS][NPIX];
  int rd [NS * PER + 40];
  int hd [2][NS * PER + 40];
  int qd [4][NS * PER + 40];
  int t = 0;
  bit run = 0;

  always @(negedge clk) if (run) begin
    rd[t] = sd_value(root);
    for (int i = 0; i < 2; i++) hd[i][t] = sd_value(ph[i]);
    for (int i = 0; i < 4; i++) qd[i][t] = sd_value(pq[i]);
    t++;
  end

  function automatic int decode(input int base, input int w, input int which, input int node);
    int v = 0;
    for (int o = 0; o < w; o++)
      v = 2 * v + (which == 0 ? rd[base + o] : which == 1 ? hd[node][base + o] : qd[node][base + o]);
    return v;
  endfunction

  initial begin
    int sum, exp_h, exp_q;
    for (int k = 0; k < NPIX; k++) din[k] = SD_ZERO;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run = 1;
    for (int s = 0; s < NS; s++) begin
      for (int k = 0; k < NPIX; k++) val[s][k] = (s == 0) ? 255 : int'($urandom % 256);
      for (int b = 0; b < PER; b++) begin
        for (int k = 0; k < NPIX; k++) begin
          din[k].pos = (b < 8) ? val[s][k][7 - b] : 1'b0;
          din[k].neg = 1'b0;
        end
        @(negedge clk);
      end
    end
    for (int k = 0; k < NPIX; k++) din[k] = SD_ZERO;
    repeat (20) @(negedge clk);
    run = 0;
    for (int s = 0; s < NS; s++) begin
      sum = 0;
      for (int k = 0; k < NPIX; k++) sum += val[s][k];
      checks++;
      if (decode(s * PER + 8, 12, 0, 0) != sum) begin
        failures++; $display("FAIL stream %0d root %0d expected %0d", s, decode(s * PER + 8, 12, 0, 0), sum);
      end
      for (int i = 0; i < 2; i++) begin
        exp_h = 0;
        for (int k = 0; k < NPIX / 2; k++) exp_h += val[s][i * NPIX / 2 + k];
        checks++;
        if (decode(s * PER + 6, 11, 1, i) != exp_h) begin failures++; $display("FAIL stream %0d half %0d", s, i); end
      end
      for (int i = 0; i < 4; i++) begin
        exp_q = 0;
        for (int k = 0; k < NPIX / 4; k++) exp_q += val[s][i * NPIX / 4 + k];
        checks++;
        if (decode(s * PER + 4, 10, 2, i) != exp_q) begin failures++; $display("FAIL stream %0d quarter %0d", s, i); end
      end
    end
    // clear in the middle of a stream
    for (int k = 0; k < NPIX; k++) din[k] = '{pos: 1'b1, neg: 1'b0};
    repeat (3) @(negedge clk);
    for (int k = 0; k < NPIX; k++) din[k] = SD_ZERO;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int c = 0; c < 12; c++) begin
      checks++;
      if (root != SD_ZERO) begin failures++; $display("FAIL root not empty after clear"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * PER + 200) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
