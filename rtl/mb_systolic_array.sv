// mb_systolic_array: the current macroblock buffered for edge detection.
//
// Holds an N x N macroblock framed by one row of padding pixels above
// (pad_top) and below (pad_bot) and one column left and right; the side
// columns repeat the block's own edge pixels (also at the corners). On `load`
// the frame is written; on `shift` every row moves up by STEP rows. The top
// STEP + 2 rows form the window `win` (for N = 16, STEP = 2 it is 4 rows by
// 18 columns) from which the PEs take the 3x3 neighbourhoods of the STEP
// pixel rows in its middle. After s shifts the window covers macroblock rows
// STEP*s .. STEP*s + STEP - 1, so N/STEP positions (8 for N = 16) cover the
// block. `mb_rows` exposes the unshifted block for the SAD use of the PEs
// and is valid until the first shift.
//
// Frame size, padding above and below, edge replication at the sides and the
// upward move follow the document's description of the 16x16 array; holding
// the whole frame in one register array is this design's choice.
module mb_systolic_array
  import sad_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned STEP = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  logic   shift,
  input  pixel_t mb      [N*N],
  input  pixel_t pad_top [N],
  input  pixel_t pad_bot [N],
  output pixel_t win     [STEP+2][N+2],
  output pixel_t mb_rows [N*N]
);

  localparam int unsigned H = N + 2;

  pixel_t fr [H][H];

  function automatic pixel_t src(input int r, input int c,
                                 input pixel_t m [N*N], input pixel_t t [N], input pixel_t b [N]);
    int cc = (c < 1) ? 0 : (c > int'(N)) ? int'(N) - 1 : c - 1;  // replicate sides
    if (r == 0)             return t[cc];
    else if (r == int'(N) + 1) return b[cc];
    else                    return m[(r - 1) * int'(N) + cc];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < H; c++) fr[r][c] <= '0;
    end else if (load) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < H; c++) fr[r][c] <= src(r, c, mb, pad_top, pad_bot);
    end else if (shift) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < H; c++) fr[r][c] <= (r + STEP < H) ? fr[r+STEP][c] : '0;
    end
  end

  always_comb begin
    for (int r = 0; r < STEP + 2; r++)
      for (int c = 0; c < H; c++) win[r][c] = fr[r][c];
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) mb_rows[r*N+c] = fr[r+1][c+1];
  end

endmodule
