// sad_abs_diff_block_tb: loads random candidate/reference pixel pairs and
// rebuilds every |c - r| from the eight bits the block emits MSB first in
// the eight cycles after load; the next eight cycles must be zero. Also
// checks that clear empties the block and that a load restarts it.
module sad_abs_diff_block_tb;
  import sad_pkg::*;

  localparam int NPIX = 16;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, clear = 1'b0;
  always #5 clk = ~clk;
  pixel_t cand [NPIX];
  pixel_t refb [NPIX];
  sd_digit_t digit [NPIX];

  sad_abs_diff_block #(.NPIX(NPIX)) dut (.clk, .rst_n, .load, .clear, .cand, .refb, .digit);

  int checks = 0, failures = 0;
  int expv [NPIX];
  int got [NPIX];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      for (int k = 0; k < NPIX; k++) begin
        cand[k] = pixel_t'($urandom);
        refb[k] = (t == 0) ? cand[k] : pixel_t'($urandom);
        if (t == 1) begin cand[k] = 8'd255; refb[k] = 8'd0; end
        expv[k] = (cand[k] > refb[k]) ? int'(cand[k]) - int'(refb[k]) : int'(refb[k]) - int'(cand[k]);
        got[k] = 0;
      end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int b = 0; b < 16; b++) begin
        for (int k = 0; k < NPIX; k++) begin
          check(!digit[k].neg, "digits are never negative");
          if (b < 8) got[k] = 2 * got[k] + int'(digit[k].pos);
          else check(!digit[k].pos, $sformatf("unit %0d: non-zero digit after the LSD", k));
        end
        @(negedge clk);
      end
      for (int k = 0; k < NPIX; k++)
        check(got[k] == expv[k], $sformatf("unit %0d: |%0d-%0d| gave %0d", k, cand[k], refb[k], got[k]));
    end
    // clear after two digits
    for (int k = 0; k < NPIX; k++) begin cand[k] = 8'hff; refb[k] = 8'h00; end
    load = 1'b1; @(negedge clk); load = 1'b0;
    @(negedge clk);
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    for (int b = 0; b < 8; b++) begin
      for (int k = 0; k < NPIX; k++) check(!digit[k].pos, "clear leaves no digits");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
