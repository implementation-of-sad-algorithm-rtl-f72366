// me_dispatcher: supplies the SAD processor with the blocks of a full search.
//
// Stores an SW x SW search window of the reference frame, the N x N current
// block (called the reference block of the matching) and the rows of the
// current frame just above and below that block (for edge detection). A
// write port fills them one pixel per cycle. After `start` it offers, with a
// valid/ready handshake, every candidate block of the window in raster order
// of the displacement: R = SW - N + 1 positions per axis ((24-16+1)^2 = 81
// for the default), each with its motion vector (dx, dy) = (x - R/2, y - R/2)
// relative to the co-located block. It watches the minimum SAD that the
// processor returns and stops early once it is 0, an exact match that no
// candidate can beat. `issue_done` goes high when the last candidate has
// been taken or the search was cut short, and stays high until the next start.
// `coloc` is the window block at zero displacement.
//
// The document names the dispatcher, its candidate and reference block
// outputs and the minimum SAD fed back to it, and says the processor works
// with any block-matching algorithm, full search among them; the storage,
// write port, order and early stop are this design's choices.
module me_dispatcher
  import sad_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned SW = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  // loading
  input  logic        wr_en,
  input  logic [1:0]  wr_sel,   // 0 window, 1 current block, 2 row above, 3 row below
  input  logic [7:0]  wr_row,
  input  logic [7:0]  wr_col,
  input  pixel_t      wr_data,
  // search
  input  logic        start,
  input  logic        min_zero, // minimum SAD found so far is 0
  output logic        cand_valid,
  input  logic        cand_ready,
  output pixel_t      cand    [N*N],
  output mv_t         cand_mv,
  output pixel_t      refb    [N*N],
  output pixel_t      coloc   [N*N],
  output pixel_t      pad_top [N],
  output pixel_t      pad_bot [N],
  output logic        issue_done
);

  localparam int unsigned R  = SW - N + 1;
  localparam int unsigned RW = $clog2(R + 1);

  pixel_t win [SW][SW];
  pixel_t blk [N][N];
  pixel_t top [N];
  pixel_t bot [N];

  logic [RW-1:0] px, py;
  logic          running;

  // Writes outside the addressed array are ignored.
  localparam int unsigned AW = $clog2(SW);
  localparam int unsigned BW = $clog2(N);
  logic row_in_win, col_in_win, row_in_blk, col_in_blk;
  always_comb begin
    row_in_win = (int'(wr_row) < int'(SW));
    col_in_win = (int'(wr_col) < int'(SW));
    row_in_blk = (int'(wr_row) < int'(N));
    col_in_blk = (int'(wr_col) < int'(N));
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      case (wr_sel)
        2'd0: if (row_in_win && col_in_win) win[wr_row[AW-1:0]][wr_col[AW-1:0]] <= wr_data;
        2'd1: if (row_in_blk && col_in_blk) blk[wr_row[BW-1:0]][wr_col[BW-1:0]] <= wr_data;
        2'd2: if (col_in_blk) top[wr_col[BW-1:0]] <= wr_data;
        default: if (col_in_blk) bot[wr_col[BW-1:0]] <= wr_data;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      issue_done <= 1'b0;
      px <= '0;
      py <= '0;
    end else if (start) begin
      running    <= 1'b1;
      issue_done <= 1'b0;
      px <= '0;
      py <= '0;
    end else if (running) begin
      if (min_zero) begin
        running    <= 1'b0;
        issue_done <= 1'b1;
      end else if (cand_ready) begin
        if (int'(px) == int'(R) - 1) begin
          px <= '0;
          if (int'(py) == int'(R) - 1) begin
            running    <= 1'b0;
            issue_done <= 1'b1;
          end else begin
            py <= py + 1'b1;
          end
        end else begin
          px <= px + 1'b1;
        end
      end
    end
  end

  assign cand_valid = running && !min_zero;

  always_comb begin
    for (int r = 0; r < int'(N); r++)
      for (int c = 0; c < int'(N); c++) begin
        cand[r*N+c]  = win[int'(py) + r][int'(px) + c];
        coloc[r*N+c] = win[int'(R / 2) + r][int'(R / 2) + c];
        refb[r*N+c]  = blk[r][c];
      end
    pad_top    = top;
    pad_bot    = bot;
    cand_mv.dx = 8'(signed'({1'b0, px}) - signed'(RW'(R / 2)));
    cand_mv.dy = 8'(signed'({1'b0, py}) - signed'(RW'(R / 2)));
  end

endmodule
