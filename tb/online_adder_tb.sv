// online_adder_tb: random signed-digit streams through the online adder.
// Each pair of 10-digit streams (MSD first, then 3 zero digits) must come out
// as their 11-digit sum, leading digit 2 cycles after the inputs' leading
// digit; digits stay in {-1,0,+1}. Also checks that clear empties the adder.
module online_adder_tb;
  import sad_pkg::*;

  localparam int W   = 10;
  localparam int GAP = 3;
  localparam int NS  = 200;
  localparam int T   = NS * (W + GAP) + 8;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  always #5 clk = ~clk;
  sd_digit_t x, y, z;

  online_adder dut (.clk, .rst_n, .clear, .x, .y, .z);

  int checks = 0, failures = 0;
  int xv [NS], yv [NS];

  function automatic sd_digit_t rnd_digit();
    sd_digit_t d;
    case ($urandom % 3)
      0: d = '{pos: 1'b1, neg: 1'b0};
      1: d = '{pos: 1'b0, neg: 1'b1};
      default: d = SD_ZERO;
    endcase
    return d;
  endfunction

  initial begin
    int n, v;
    x = SD_ZERO; y = SD_ZERO;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    n = 0;
    for (int s = 0; s < NS; s++) begin
      xv[s] = 0; yv[s] = 0;
      for (int k = 0; k < W + GAP; k++) begin
        if (k < W) begin x = rnd_digit(); y = rnd_digit(); end
        else begin x = SD_ZERO; y = SD_ZERO; end
        if (k < W) begin
          xv[s] = 2 * xv[s] + sd_value(x);
          yv[s] = 2 * yv[s] + sd_value(y);
        end
        @(negedge clk);
        n++;
      end
    end
    x = SD_ZERO; y = SD_ZERO;
    repeat (4) @(negedge clk);
    // clear drops a stream in flight
    x = '{pos: 1'b1, neg: 1'b0}; y = '{pos: 1'b1, neg: 1'b0};
    @(negedge clk);
    x = SD_ZERO; y = SD_ZERO;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (z != SD_ZERO) begin failures++; $display("FAIL clear left digit %0d", k); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output capture, aligned to the input schedule
  int zd [T + 8];
  int idx = -1;
  always @(negedge clk) begin
    if (rst_n) begin
      idx++;
      if (idx < T + 8) zd[idx] = sd_value(z);
      checks++;
      if (z.pos && z.neg) begin failures++; $display("FAIL illegal digit"); end
    end
  end

  initial begin
    int zv, base;
    wait (idx == NS * (W + GAP) + 3);
    for (int s = 0; s < NS; s++) begin
      base = s * (W + GAP) + 2;  // output MSD: two cycles after the input MSD
      zv = 0;
      for (int o = 0; o <= W; o++) zv = 2 * zv + zd[base + o];
      checks++;
      if (zv != xv[s] + yv[s]) begin
        failures++;
        $display("FAIL stream %0d: %0d + %0d gave %0d", s, xv[s], yv[s], zv);
      end
    end
  end

  initial begin
    repeat (T + 100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
