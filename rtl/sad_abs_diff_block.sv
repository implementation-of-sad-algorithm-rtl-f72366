// sad_abs_diff_block: the absolute-difference stage of the SAD processor.
//
// NPIX absolute-difference units (16 for a 4x4 block) compute |c - r| for
// every pixel pair of a candidate block c and the reference block r in the
// cycle `load` is high, and store the results in shift registers. From the
// next cycle on, each unit emits one bit of its |c - r| per cycle, most
// significant bit first (d7 in the first cycle, d0 in the eighth), and zeros
// after that, so that the digit-serial adder tree behind it can flush.
// `clear` empties all shift registers (used when a candidate is rejected
// early); `load` wins over `clear`.
//
// Interface: cand/refb are unpacked arrays of NPIX pixels, sampled when
// load = 1. digit[k] is the current bit of unit k, as a signed digit.
// Timing: load in cycle 0 -> MSD in cycle 1 -> LSD in cycle 8.
// The unit count and the MSB-first bit order follow the 4x4 SAD processor and
// its timing diagram; the register-based serialiser is this design's choice.
module sad_abs_diff_block
  import sad_pkg::*;
#(
  parameter int unsigned NPIX = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  logic      clear,
  input  pixel_t    cand [NPIX],
  input  pixel_t    refb [NPIX],
  output sd_digit_t digit [NPIX]
);

  pixel_t shreg [NPIX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NPIX; k++) shreg[k] <= '0;
    end else if (load) begin
      for (int k = 0; k < NPIX; k++)
        shreg[k] <= (cand[k] > refb[k]) ? pixel_t'(cand[k] - refb[k])
                                        : pixel_t'(refb[k] - cand[k]);
    end else if (clear) begin
      for (int k = 0; k < NPIX; k++) shreg[k] <= '0;
    end else begin
      for (int k = 0; k < NPIX; k++) shreg[k] <= {shreg[k][PIX_W-2:0], 1'b0};
    end
  end

  always_comb begin
    for (int k = 0; k < NPIX; k++) begin
      digit[k].pos = shreg[k][PIX_W-1];
      digit[k].neg = 1'b0;
    end
  end

endmodule
