// sad_processor: digit-serial SAD processor with early termination (the
// "MAD processor" of the motion estimation system).
//
// For every candidate block it computes the sum of absolute differences to
// the reference block and keeps the smallest SAD and the motion vector of the
// candidate that produced it. Three stages, as in the document: N*N
// absolute-difference units (sad_abs_diff_block) emitting |c - r| MSD first,
// an adder tree of online adders (sad_online_tree) and a comparator
// (online_min_comparator) that checks the SAD stream against the stored
// minimum digit by digit, so that a candidate that cannot win is dropped
// early.
//
// Timing, counted from the cycle after a candidate is accepted (cycle 1 holds
// the leading |c - r| digit), with L = log2(N*N) tree levels:
//   - the leading SAD digit reaches the comparator in cycle 1 + 2L
//     (9 for 4x4, 13 for 8x8, 17 for 16x16): earliest rejection;
//   - if the candidate has not been rejected, the next one is accepted at the
//     end of cycle 8 + 2L (16 for 4x4, 20 for 8x8, 24 for 16x16) and overlaps
//     the tail of this one in the tree;
//   - a rejected candidate is flushed from the pipeline and the next one is
//     accepted in the cycle of the rejection, so candidates follow each
//     other every 1 + 2L to 8 + 2L cycles;
//   - the last SAD digit is compared in cycle 8 + 3L; a new minimum is
//     stored at the end of it and visible in cycle 9 + 3L (21 for 4x4).
// These cycle counts are the document's numbers for 4x4, 8x8 and 16x16 blocks.
//
// With PARTIAL_CMP = 1 six more comparators watch the partial SADs of the
// two half blocks and the four quarter blocks inside the tree (the 128- and
// 64-pixel partial SADs of a 16x16 block) against the same minimum; any of
// them can reject the candidate, up to four cycles earlier. This is the
// document's "new model"; with it the best case is 2L - 3 cycles.
//
// Interface: `init` starts a search (minimum set to all ones, pipeline
// emptied). Candidates come with a valid/ready handshake, their pixels in
// cand[] and their displacement in cand_mv; refb[] must be stable during the
// search. For each finished candidate res_valid pulses one cycle after the
// decision, with res_new_min (it became the minimum), res_early (rejected
// before its last digit) and res_mv. min_sad/best_mv hold the result; busy
// is high while candidates are in flight. The handshake, the result pulse
// and the reset behaviour are this design's choices.
module sad_processor
  import sad_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter bit          PARTIAL_CMP = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic           cand_valid,
  output logic           cand_ready,
  input  pixel_t         cand [N*N],
  input  mv_t            cand_mv,
  input  pixel_t         refb [N*N],
  output logic [PIX_W+$clog2(N*N)-1:0] min_sad,
  output mv_t            best_mv,
  output logic           busy,
  output logic           res_valid,
  output logic           res_new_min,
  output logic           res_early,
  output mv_t            res_mv
);

  localparam int unsigned NPIX       = N * N;
  localparam int unsigned L          = $clog2(NPIX);
  localparam int unsigned SADW       = PIX_W + L;
  localparam int unsigned ISSUE      = PIX_W + 2 * L;
  localparam int unsigned ROOT_FIRST = 1 + 2 * L;
  localparam int unsigned ROOT_LAST  = ROOT_FIRST + SADW - 1;
  localparam int unsigned HALF_FIRST = ROOT_FIRST - 2;
  localparam int unsigned HALF_LAST  = HALF_FIRST + SADW - 2;
  localparam int unsigned QRT_FIRST  = ROOT_FIRST - 4;
  localparam int unsigned QRT_LAST   = QRT_FIRST + SADW - 3;
  localparam int unsigned AGEW       = $clog2(ROOT_LAST + 2);

  typedef logic [AGEW-1:0] age_t;

  // ---------------------------------------------------------------- slots
  // h: newest candidate (owns the absolute-difference stage),
  // t: previous candidate still draining through tree and comparator.
  logic h_act, t_act;
  age_t h_age, t_age;
  mv_t  h_mv, t_mv;

  // ------------------------------------------------------------- datapath
  sd_digit_t ad_digit [NPIX];
  sd_digit_t root;
  sd_digit_t part_half [2];
  sd_digit_t part_qrt [4];
  logic      load, kill, cmp_stop;

  sad_abs_diff_block #(.NPIX(NPIX)) u_ad (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .clear (kill || init),
    .cand  (cand),
    .refb  (refb),
    .digit (ad_digit)
  );

  sad_online_tree #(.NPIX(NPIX)) u_tree (
    .clk          (clk),
    .rst_n        (rst_n),
    .clear        (kill || init),
    .digit_in     (ad_digit),
    .root         (root),
    .part_half    (part_half),
    .part_quarter (part_qrt)
  );

  function automatic logic in_win(input logic act, input age_t age,
                                  input int unsigned lo, input int unsigned hi);
    return act && (int'(age) >= int'(lo)) && (int'(age) <= int'(hi));
  endfunction

  function automatic logic at_age(input logic act, input age_t age, input int unsigned a);
    return act && (int'(age) == int'(a));
  endfunction

  logic            root_first, root_rej, root_acc;
  logic [SADW-1:0] root_val;

  online_min_comparator #(.W(SADW), .BW(SADW)) u_cmp (
    .clk    (clk),
    .rst_n  (rst_n),
    .first  (root_first),
    .stop   (cmp_stop),
    .digit  (root),
    .bound  (min_sad),
    .reject (root_rej),
    .accept (root_acc),
    .value  (root_val)
  );

  assign root_first = at_age(h_act, h_age, ROOT_FIRST) || at_age(t_act, t_age, ROOT_FIRST);

  // Partial-SAD comparators (early termination inside the tree).
  logic half_rej, qrt_rej;

  if (PARTIAL_CMP) begin : g_partial
    logic            half_first, qrt_first;
    logic [1:0]      half_r;
    logic [3:0]      qrt_r;

    assign half_first = at_age(h_act, h_age, HALF_FIRST) || at_age(t_act, t_age, HALF_FIRST);
    assign qrt_first  = at_age(h_act, h_age, QRT_FIRST)  || at_age(t_act, t_age, QRT_FIRST);

    for (genvar i = 0; i < 2; i++) begin : g_half
      online_min_comparator #(.W(SADW - 1), .BW(SADW)) u_cmp_half (
        .clk    (clk),
        .rst_n  (rst_n),
        .first  (half_first),
        .stop   (cmp_stop),
        .digit  (part_half[i]),
        .bound  (min_sad),
        .reject (half_r[i]),
        .accept (),
        .value  ()
      );
    end
    for (genvar i = 0; i < 4; i++) begin : g_qrt
      online_min_comparator #(.W(SADW - 2), .BW(SADW)) u_cmp_qrt (
        .clk    (clk),
        .rst_n  (rst_n),
        .first  (qrt_first),
        .stop   (cmp_stop),
        .digit  (part_qrt[i]),
        .bound  (min_sad),
        .reject (qrt_r[i]),
        .accept (),
        .value  ()
      );
    end
    assign half_rej = |half_r;
    assign qrt_rej  = |qrt_r;
  end else begin : g_no_partial
    assign half_rej = 1'b0;
    assign qrt_rej  = 1'b0;
  end

  // ------------------------------------------------------------- decisions
  logic h_rej, t_rej, h_acc, t_acc, h_free, h_done, t_done, h_early, t_early;

  always_comb begin
    h_rej = (root_rej && in_win(h_act, h_age, ROOT_FIRST, ROOT_LAST))
         || (half_rej && in_win(h_act, h_age, HALF_FIRST, HALF_LAST))
         || (qrt_rej  && in_win(h_act, h_age, QRT_FIRST,  QRT_LAST));
    t_rej = (root_rej && in_win(t_act, t_age, ROOT_FIRST, ROOT_LAST))
         || (half_rej && in_win(t_act, t_age, HALF_FIRST, HALF_LAST))
         || (qrt_rej  && in_win(t_act, t_age, QRT_FIRST,  QRT_LAST));
    h_acc = root_acc && in_win(h_act, h_age, ROOT_FIRST, ROOT_LAST);
    t_acc = root_acc && in_win(t_act, t_age, ROOT_FIRST, ROOT_LAST);
    h_early = h_rej && !at_age(h_act, h_age, ROOT_LAST);
    t_early = t_rej && !at_age(t_act, t_age, ROOT_LAST);
    h_done = h_rej || h_acc;
    t_done = t_rej || t_acc;
    // A rejected head candidate is flushed from the whole pipeline.
    kill     = h_rej;
    cmp_stop = h_rej || t_rej;
    h_free   = !h_act || h_done || (int'(h_age) >= int'(ISSUE));
    cand_ready = h_free && !init;
    load       = cand_valid && cand_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_act <= 1'b0;  h_age <= '0;  h_mv <= '0;
      t_act <= 1'b0;  t_age <= '0;  t_mv <= '0;
      min_sad <= '1;
      best_mv <= '0;
      res_valid <= 1'b0;  res_new_min <= 1'b0;  res_early <= 1'b0;  res_mv <= '0;
    end else if (init) begin
      h_act <= 1'b0;  t_act <= 1'b0;
      min_sad <= '1;
      best_mv <= '0;
      res_valid <= 1'b0;  res_new_min <= 1'b0;  res_early <= 1'b0;
    end else begin
      // tail slot
      if (load && h_act && !h_done) begin
        t_act <= 1'b1;
        t_age <= h_age + 1'b1;
        t_mv  <= h_mv;
      end else if (t_done) begin
        t_act <= 1'b0;
      end else if (t_act) begin
        t_age <= t_age + 1'b1;
      end
      // head slot
      if (load) begin
        h_act <= 1'b1;
        h_age <= age_t'(1);
        h_mv  <= cand_mv;
      end else if (h_done) begin
        h_act <= 1'b0;
      end else if (h_act) begin
        h_age <= h_age + 1'b1;
      end
      // minimum
      if (h_acc || t_acc) begin
        min_sad <= root_val;
        best_mv <= h_acc ? h_mv : t_mv;
      end
      // per-candidate result
      res_valid   <= h_done || t_done;
      res_new_min <= h_acc || t_acc;
      res_early   <= h_done ? h_early : t_early;
      res_mv      <= h_done ? h_mv : t_mv;
    end
  end

  assign busy = h_act || t_act;

  // The schedule never lets two candidates finish in one cycle, nor hands a
  // candidate to the tail slot while it is still occupied.
  a_one_result: assert property (@(posedge clk) disable iff (!rst_n) !(h_done && t_done));
  a_tail_free:  assert property (@(posedge clk) disable iff (!rst_n)
                                 (load && h_act && !h_done) |-> (!t_act || t_done));
  a_decided:    assert property (@(posedge clk) disable iff (!rst_n)
                                 !(h_act && int'(h_age) > int'(ROOT_LAST)));

endmodule
