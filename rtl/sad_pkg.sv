// sad_pkg: types and helpers shared by the SAD motion-estimation datapath.
//
// Pixels are 8-bit luma samples. The SAD datapath is digit-serial, most
// significant digit first, and its adder tree uses radix-2 signed digits in
// {-1, 0, +1}; a digit is carried as a (pos, neg) bit pair with value
// pos - neg. The 8-bit pixel and the MSD-first digit order follow the timing
// diagram of the 4x4 SAD processor (digits d7..d0 of |c - r|); the two-bit
// digit encoding is this design's choice.
package sad_pkg;

  localparam int unsigned PIX_W = 8;

  typedef logic [PIX_W-1:0] pixel_t;

  // Signed digit, value = pos - neg. (1,1) is never produced.
  typedef struct packed {
    logic pos;
    logic neg;
  } sd_digit_t;

  localparam sd_digit_t SD_ZERO = '{pos: 1'b0, neg: 1'b0};

  // Motion vector, displacement of the candidate block in pixels.
  typedef struct packed {
    logic signed [7:0] dx;
    logic signed [7:0] dy;
  } mv_t;

  // Class of a macroblock from the search strategy decision.
  typedef enum logic [1:0] {
    MB_STATIONARY  = 2'd0,  // difference to the reference MB <= T
    MB_HOMOGENEOUS = 2'd1,  // moving, edge amplitude sum < TH
    MB_TEXTURED    = 2'd2   // moving, edge amplitude sum >= TH
  } mb_class_t;

  function automatic int sd_value(input sd_digit_t d);
    return int'(d.pos) - int'(d.neg);
  endfunction

endpackage
