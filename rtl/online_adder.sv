// online_adder: radix-2 signed-digit online adder (one node of the SAD tree).
//
// Adds two digit streams x and y that arrive most significant digit first,
// digits in {-1, 0, +1}, and produces their sum as a digit stream with one
// more digit, also MSD first. The online delay is 2: the extra leading digit
// of the sum appears two cycles after the leading input digits.
//
// How it works: the digit sum s_j = x_j + y_j (in -2..2) is split into a
// transfer c_j to the next more significant position and an interim digit
// u_j, s_j = 2*c_j + u_j. The split of s_j = +-1 looks one position ahead:
// if s_{j+1} >= 0, the incoming transfer is in {0,1} and u_j is chosen as -1
// (c_j = 1 for s_j = 1, 0 for s_j = -1); otherwise it is in {-1,0} and u_j
// is chosen as +1. Then z_j = u_j + c_{j+1} always stays in {-1,0,+1}. z_j
// needs s_j, s_{j+1} and s_{j+2}, hence the delay of two cycles; the output
// is registered. Zeros between streams reset the carry chain by themselves.
// `clear` drops everything in flight.
//
// The adder stage of the timing diagram (each stage adds one leading digit)
// is what the document shows; the signed-digit algorithm is this design's
// choice of online adder.
module online_adder
  import sad_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  sd_digit_t x,
  input  sd_digit_t y,
  output sd_digit_t z
);

  typedef logic signed [2:0] dsum_t;  // -2..2

  dsum_t s_in, s_d1, s_d2;             // s_{j+2}, s_{j+1}, s_j
  logic signed [1:0] u_j, c_j1, z_val;

  // Interim digit of position j, given s_j and whether s_{j+1} >= 0.
  function automatic logic signed [1:0] interim(input dsum_t s, input logic next_nonneg);
    case (s)
      3'sd1:   return next_nonneg ? -2'sd1 : 2'sd1;
      -3'sd1:  return next_nonneg ? -2'sd1 : 2'sd1;
      default: return 2'sd0;           // -2, 0, +2
    endcase
  endfunction

  // Transfer out of position j, given s_j and whether s_{j+1} >= 0.
  function automatic logic signed [1:0] transfer(input dsum_t s, input logic next_nonneg);
    case (s)
      3'sd2:   return 2'sd1;
      3'sd1:   return next_nonneg ? 2'sd1 : 2'sd0;
      -3'sd1:  return next_nonneg ? 2'sd0 : -2'sd1;
      -3'sd2:  return -2'sd1;
      default: return 2'sd0;
    endcase
  endfunction

  always_comb begin
    s_in  = dsum_t'({2'b00, x.pos}) - dsum_t'({2'b00, x.neg})
          + dsum_t'({2'b00, y.pos}) - dsum_t'({2'b00, y.neg});
    u_j   = interim(s_d2, s_d1 >= 0);
    c_j1  = transfer(s_d1, s_in >= 0);
    z_val = u_j + c_j1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_d1 <= '0;
      s_d2 <= '0;
      z    <= SD_ZERO;
    end else if (clear) begin
      s_d1 <= '0;
      s_d2 <= '0;
      z    <= SD_ZERO;
    end else begin
      s_d1  <= s_in;
      s_d2  <= s_d1;
      z.pos <= (z_val == 2'sd1);
      z.neg <= (z_val == -2'sd1);
    end
  end

endmodule
