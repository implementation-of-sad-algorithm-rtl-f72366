// me_top: block motion estimation with a digit-serial SAD processor.
//
// For one N x N block of the current frame it finds the displacement, within
// an SW x SW search window of the reference frame, whose block has the
// smallest sum of absolute differences (SAD), and classifies the block for
// the choice of a search strategy. Parts:
//   - me_dispatcher: stores window, current block and the two frame rows
//     around it; offers the candidates of a full search;
//   - sad_processor: MSD-first digit-serial SAD with early termination
//     (partial-SAD comparators enabled by PARTIAL_CMP), returns the minimum
//     SAD, fed back to the dispatcher, and its motion vector;
//   - search_strategy_decision: stationary / homogeneous / textured class of
//     the block from Diff (SAD at zero displacement) and the Sobel edge sum.
// The defaults (16x16 block, 24x24 window, partial comparators) are the
// configuration the document evaluates.
//
// Use: write the window (wr_sel 0, wr_row/wr_col 0..SW-1), the block
// (wr_sel 1), the frame rows above and below the block (wr_sel 2 and 3,
// wr_col 0..N-1); pulse start; wait for done. min_sad, best_mv, mb_class,
// diff and edge_sum then hold until the next start. n_cand, n_early and
// n_new_min count the candidates evaluated, rejected before their last SAD
// digit and accepted as new minimum in the last search.
module me_top
  import sad_pkg::*;
#(
  parameter int unsigned N           = 16,
  parameter int unsigned SW          = 24,
  parameter bit          PARTIAL_CMP = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [1:0]  wr_sel,
  input  logic [7:0]  wr_row,
  input  logic [7:0]  wr_col,
  input  pixel_t      wr_data,
  input  logic        start,
  input  logic [PIX_W+$clog2(N*N)-1:0] thr_t,
  input  logic [PIX_W+$clog2(N*N)+3:0] thr_h,
  output logic        done,
  output logic [PIX_W+$clog2(N*N)-1:0] min_sad,
  output mv_t         best_mv,
  output mb_class_t   mb_class,
  output logic [PIX_W+$clog2(N*N)-1:0] diff,
  output logic [PIX_W+$clog2(N*N)+3:0] edge_sum,
  output logic [15:0] n_cand,
  output logic [15:0] n_early,
  output logic [15:0] n_new_min
);

  logic   cand_valid, cand_ready, issue_done, busy;
  logic   res_valid, res_new_min, res_early;
  logic   dec_busy, dec_done, running;
  pixel_t cand    [N*N];
  pixel_t refb    [N*N];
  pixel_t coloc   [N*N];
  pixel_t pad_top [N];
  pixel_t pad_bot [N];
  mv_t    cand_mv, res_mv;

  me_dispatcher #(.N(N), .SW(SW)) u_disp (
    .clk, .rst_n, .wr_en, .wr_sel, .wr_row, .wr_col, .wr_data,
    .start,
    .min_zero   (min_sad == '0),
    .cand_valid (cand_valid),
    .cand_ready (cand_ready),
    .cand       (cand),
    .cand_mv    (cand_mv),
    .refb       (refb),
    .coloc      (coloc),
    .pad_top    (pad_top),
    .pad_bot    (pad_bot),
    .issue_done (issue_done)
  );

  sad_processor #(.N(N), .PARTIAL_CMP(PARTIAL_CMP)) u_sad (
    .clk, .rst_n,
    .init        (start),
    .cand_valid  (cand_valid),
    .cand_ready  (cand_ready),
    .cand        (cand),
    .cand_mv     (cand_mv),
    .refb        (refb),
    .min_sad     (min_sad),
    .best_mv     (best_mv),
    .busy        (busy),
    .res_valid   (res_valid),
    .res_new_min (res_new_min),
    .res_early   (res_early),
    .res_mv      (res_mv)
  );

  search_strategy_decision #(.N(N)) u_dec (
    .clk, .rst_n,
    .start    (start),
    .cur      (refb),
    .refm     (coloc),
    .pad_top  (pad_top),
    .pad_bot  (pad_bot),
    .thr_t    (thr_t),
    .thr_h    (thr_h),
    .busy     (dec_busy),
    .done     (dec_done),
    .diff     (diff),
    .edge_sum (edge_sum),
    .mb_class (mb_class)
  );

  // Completion and statistics.
  logic dec_seen;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      dec_seen  <= 1'b0;
      done      <= 1'b0;
      n_cand    <= '0;
      n_early   <= '0;
      n_new_min <= '0;
    end else if (start) begin
      running   <= 1'b1;
      dec_seen  <= 1'b0;
      done      <= 1'b0;
      n_cand    <= '0;
      n_early   <= '0;
      n_new_min <= '0;
    end else begin
      if (dec_done) dec_seen <= 1'b1;
      if (res_valid) begin
        n_cand <= n_cand + 1'b1;
        if (res_early)   n_early   <= n_early + 1'b1;
        if (res_new_min) n_new_min <= n_new_min + 1'b1;
      end
      if (running && issue_done && !busy && !res_valid && (dec_seen || dec_done) && !dec_busy) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

endmodule
