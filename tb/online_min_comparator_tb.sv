// online_min_comparator_tb: random 12-digit signed-digit streams of
// non-negative value against random bounds. Checks: accept exactly when the
// value is below the bound, with the exact value; a rejection never happens
// for a value below the bound (it is sound), and happens no later than the
// last digit; against a bound of 0 the stream is rejected on its first
// digit; a large value against a small bound is rejected before the last
// digit. stop ends a running comparison without a result.
module online_min_comparator_tb;
  import sad_pkg::*;

  localparam int W = 12;
  localparam int NS = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic first = 1'b0, stop = 1'b0, reject, accept;
  sd_digit_t digit = SD_ZERO;
  logic [W-1:0] bound = '0, value;

  online_min_comparator #(.W(W), .BW(W)) dut (.clk, .rst_n, .first, .stop, .digit,
                                              .bound, .reject, .accept, .value);

  int checks = 0, failures = 0;
  int n_early = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  sd_digit_t d [W];

  // Random digit string with non-negative value.
  function automatic int make_stream(input int kind);
    int v;
    do begin
      v = 0;
      for (int k = 0; k < W; k++) begin
        case ((kind == 1 && k < 2) ? 0 : $urandom % 3)
          0: d[k] = '{pos: 1'b1, neg: 1'b0};
          1: d[k] = '{pos: 1'b0, neg: 1'b1};
          default: d[k] = SD_ZERO;
        endcase
        v = 2 * v + sd_value(d[k]);
      end
    end while (v < 0);
    return v;
  endfunction

  // Returns the digit index at which a decision came, -1 if none.
  task automatic run_stream(input int v, input int b, output int at, output bit acc, output int got);
    at = -1; acc = 0; got = 0;
    bound = W'(b);
    for (int k = 0; k < W; k++) begin
      digit = d[k];
      first = (k == 0);
      #1;
      if (at < 0 && (reject || accept)) begin
        at = k; acc = accept; got = int'(value);
      end
      @(negedge clk);
    end
    first = 1'b0;
    digit = SD_ZERO;
    @(negedge clk);
  endtask

  initial begin
    int v, b, at, got;
    bit acc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; s++) begin
      v = make_stream(s % 4 == 0 ? 1 : 0);
      case (s % 3)
        0: b = int'($urandom % 4096);
        1: b = (v + int'($urandom % 9) - 4) < 0 ? 0 : (v + int'($urandom % 9) - 4) > 4095 ? 4095 : v + int'($urandom % 9) - 4;
        default: b = int'($urandom % 64);
      endcase
      if (s == 7) b = 0;
      run_stream(v, b, at, acc, got);
      check(at >= 0, $sformatf("stream %0d: no decision", s));
      check(acc == (v < b), $sformatf("stream %0d: value %0d bound %0d accept %0d", s, v, b, acc));
      if (acc) check(got == v, $sformatf("stream %0d: value %0d reported %0d", s, v, got));
      if (acc) check(at == W - 1, "accept only on the last digit");
      if (b == 0) check(at == 0, "bound 0 must reject on the first digit");
      if (!acc && at < W - 1) n_early++;
    end
    check(n_early > NS / 10, $sformatf("early rejections: %0d", n_early));
    // stop: start a stream that would be accepted, stop it after 3 digits
    v = make_stream(0);
    bound = '1;
    for (int k = 0; k < W; k++) begin
      digit = d[k];
      first = (k == 0);
      stop  = (k == 3);
      #1;
      if (k > 3) check(!reject && !accept, "no result after stop");
      @(negedge clk);
    end
    first = 1'b0; stop = 1'b0;
    $display("early rejections %0d of %0d", n_early, NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * (W + 1) + 100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
