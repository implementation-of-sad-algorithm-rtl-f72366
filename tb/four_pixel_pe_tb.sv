// four_pixel_pe_tb: random operands in both modes; the result must be the
// sum of the four absolute differences of the selected pairs (org/refp for
// select 0, pr/pc for select 1), including the extreme values.
module four_pixel_pe_tb;
  import sad_pkg::*;

  logic   sel;
  pixel_t org [4];
  pixel_t refp [4];
  pixel_t pr [4];
  pixel_t pc [4];
  logic [PIX_W+1:0] result;

  four_pixel_pe dut (.sel, .org, .refp, .pr, .pc, .result);

  int checks = 0, failures = 0;

  initial begin
    int e;
    for (int t = 0; t < 2000; t++) begin
      sel = t[0];
      for (int k = 0; k < 4; k++) begin
        org[k] = pixel_t'($urandom); refp[k] = pixel_t'($urandom);
        pr[k]  = pixel_t'($urandom); pc[k]   = pixel_t'($urandom);
        if (t == 2 || t == 3) begin org[k] = 8'd255; refp[k] = 8'd0; pr[k] = 8'd0; pc[k] = 8'd255; end
      end
      #1;
      e = 0;
      for (int k = 0; k < 4; k++)
        e += sel ? ((pr[k] > pc[k]) ? pr[k] - pc[k] : pc[k] - pr[k])
                 : ((org[k] > refp[k]) ? org[k] - refp[k] : refp[k] - org[k]);
      checks++;
      if (int'(result) != e) begin
        failures++;
        $display("FAIL t=%0d sel=%0d result %0d expected %0d", t, sel, result, e);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
