// sad_processor_tb: testbench of the SAD processor. Runs the checking harness
// on the 4x4 processor of the timing diagram, on an 8x8 processor (13 to 20
// cycles per candidate) and on a 16x16 processor with the partial-SAD
// comparators, then prints the combined result.
module sad_processor_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d0, d1, d2;
  int   c0, c1, c2, f0, f1, f2;

  sad_processor_check #(.N(4),  .PARTIAL_CMP(1'b0)) u_4x4   (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  sad_processor_check #(.N(8),  .PARTIAL_CMP(1'b0)) u_8x8   (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));
  sad_processor_check #(.N(16), .PARTIAL_CMP(1'b1)) u_16x16 (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
