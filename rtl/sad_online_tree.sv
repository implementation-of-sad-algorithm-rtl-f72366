// sad_online_tree: the "sum of absolute differences" stage of the SAD
// processor, a binary tree of online adders.
//
// NPIX digit streams (one per absolute-difference unit, MSD first) are summed
// pairwise by NPIX-1 online adders in log2(NPIX) levels. Each level adds one
// leading digit and two cycles of delay, so the root stream of a 4x4 block
// (4 levels) has 12 digits and starts 8 cycles after the leaves. Nodes are
// numbered as a heap: node 1 is the root, node i adds nodes 2i and 2i+1,
// leaves are nodes NPIX..2*NPIX-1 in input order.
//
// Besides the root, the tree brings out the two nodes one level below the
// root (each the partial SAD of half the block) and the four nodes two
// levels below (each a quarter of the block). For a 16x16 block these are
// the partial SADs of 128 and of 64 pixels that the early-termination
// comparators watch. `clear` empties every adder.
//
// Interface: digit_in[k] leaf streams; root, part_half[0:1], part_quarter[0:3]
// output streams (registered). Requires NPIX a power of two, at least 8.
// The tree shape follows the document's adder-tree description; the heap
// numbering is this design's own.
module sad_online_tree
  import sad_pkg::*;
#(
  parameter int unsigned NPIX = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  sd_digit_t digit_in [NPIX],
  output sd_digit_t root,
  output sd_digit_t part_half [2],
  output sd_digit_t part_quarter [4]
);

  sd_digit_t node [1:2*NPIX-1];

  for (genvar k = 0; k < NPIX; k++) begin : g_leaf
    assign node[NPIX+k] = digit_in[k];
  end

  for (genvar i = 1; i < NPIX; i++) begin : g_add
    online_adder u_add (
      .clk   (clk),
      .rst_n (rst_n),
      .clear (clear),
      .x     (node[2*i]),
      .y     (node[2*i+1]),
      .z     (node[i])
    );
  end

  assign root = node[1];
  assign part_half[0] = node[2];
  assign part_half[1] = node[3];
  for (genvar q = 0; q < 4; q++) begin : g_quarter
    assign part_quarter[q] = node[4+q];
  end

  initial begin
    assert (NPIX >= 8 && (NPIX & (NPIX - 1)) == 0)
      else $error("sad_online_tree: NPIX must be a power of two >= 8");
  end

endmodule
