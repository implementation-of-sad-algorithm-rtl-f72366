// four_pixel_pe: four-pixel processing element, shared by SAD and Sobel work.
//
// Eight 2:1 multiplexers pick the operands of four |R - C| units: with
// sel = 0 the pairs are (org[k], refp[k]), four pixels of the current and the
// reference block, and the PE computes a 2x2 SAD; with sel = 1 they are
// (pr[k], pc[k]), neighbourhood pixels, and the PE computes one Sobel
// gradient magnitude in sum-of-absolute-differences form: for |dx| at (i,j)
// the pairs are rows i-1, i, i, i+1 of columns j+1 (R) and j-1 (C), the
// middle row entering twice for the Sobel weight 2. A two-level adder tree
// (three adders) sums the four differences. Purely combinational.
//
// The multiplexers, the |R - C| units, the adder tree and the two uses come
// from the document's PE diagram; the exact neighbour pairing is read from
// its partly legible operand labels.
module four_pixel_pe
  import sad_pkg::*;
(
  input  logic   sel,
  input  pixel_t org  [4],
  input  pixel_t refp [4],
  input  pixel_t pr   [4],
  input  pixel_t pc   [4],
  output logic [PIX_W+1:0] result
);

  pixel_t r [4];
  pixel_t c [4];
  pixel_t d [4];
  logic [PIX_W:0] s01, s23;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      r[k] = sel ? pr[k] : org[k];
      c[k] = sel ? pc[k] : refp[k];
      d[k] = (r[k] > c[k]) ? pixel_t'(r[k] - c[k]) : pixel_t'(c[k] - r[k]);
    end
    s01    = {1'b0, d[0]} + {1'b0, d[1]};
    s23    = {1'b0, d[2]} + {1'b0, d[3]};
    result = {1'b0, s01} + {1'b0, s23};
  end

endmodule
