// sad_processor_check: self-checking harness for one sad_processor instance.
//
// Drives the processor with candidate blocks and checks it against a model
// computed here: the SAD of every candidate, whether it lowers the running
// minimum (strictly), the final minimum and its motion vector. It also checks
// the cycle counts of the schedule: a candidate that becomes the minimum is
// reported 9 + 3L cycles after it was accepted; a candidate that has not been
// rejected lets the next one in after 8 + 2L cycles; against a minimum of 0
// a candidate is rejected after its leading digit, 1 + 2L cycles (2L - 3 with
// the partial-SAD comparators). Finally it requires that early rejections,
// rejections on the last digit and new minima all happened.
// Reports through done/checks/failures.
module sad_processor_check
  import sad_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter bit          PARTIAL_CMP = 1'b0,
  parameter int unsigned NRAND       = 60
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned NPIX = N * N;
  localparam int unsigned L    = $clog2(NPIX);
  localparam int unsigned SADW = PIX_W + L;
  localparam int unsigned MAXC = NRAND + 8;

  logic   init, cand_valid, cand_ready, busy;
  logic   res_valid, res_new_min, res_early;
  pixel_t cand [NPIX];
  pixel_t refb [NPIX];
  mv_t    cand_mv, best_mv, res_mv;
  logic [SADW-1:0] min_sad;

  sad_processor #(.N(N), .PARTIAL_CMP(PARTIAL_CMP)) dut (
    .clk, .rst_n, .init, .cand_valid, .cand_ready, .cand, .cand_mv, .refb,
    .min_sad, .best_mv, .busy, .res_valid, .res_new_min, .res_early, .res_mv
  );

  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  int n_sent, n_res;
  int load_cyc [MAXC];
  int res_cyc  [MAXC];
  bit exp_new  [MAXC];
  bit got_early [MAXC];
  bit got_new   [MAXC];
  int n_early, n_late, n_acc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [N=%0d P=%0d] %s", N, PARTIAL_CMP, what);
    end
  endtask

  // Result monitor.
  always @(negedge clk) begin
    if (rst_n && res_valid) begin
      if (n_res < MAXC) begin
        res_cyc[n_res]  = cyc;
        got_new[n_res]  = res_new_min;
        got_early[n_res] = res_early;
      end
      n_res++;
    end
  end

  function automatic int sad_of(input pixel_t a [NPIX], input pixel_t b [NPIX]);
    int s = 0;
    for (int k = 0; k < NPIX; k++) s += (a[k] > b[k]) ? a[k] - b[k] : b[k] - a[k];
    return s;
  endfunction

  // Offer one candidate and wait until it is taken. Called at a falling
  // edge; returns at the falling edge after the rising edge that took it.
  task automatic send(input pixel_t c [NPIX], input int idx);
    cand       = c;
    cand_mv.dx = 8'(idx);
    cand_mv.dy = 8'(-idx);
    cand_valid = 1'b1;
    // sampled at the rising edge, where the processor samples it too
    do @(posedge clk); while (!cand_ready);
    load_cyc[idx] = cyc + 1;
    @(negedge clk);
    cand_valid = 1'b0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic do_init();
    @(negedge clk);
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    n_sent = 0;
    n_res  = 0;
  endtask

  pixel_t blk [NPIX];
  pixel_t best_blk [NPIX];
  int     run_min, best_idx, s, amp, v;

  initial begin
    done = 0; checks = 0; failures = 0;
    init = 0; cand_valid = 0; cand_mv = '0;
    n_early = 0; n_late = 0; n_acc = 0;
    for (int k = 0; k < NPIX; k++) begin refb[k] = pixel_t'($urandom); cand[k] = '0; end
    @(posedge rst_n);
    repeat (2) @(negedge clk);

    // ---- schedule: accept, back-to-back accept, best-case rejections
    do_init();
    for (int k = 0; k < NPIX; k++) blk[k] = pixel_t'($urandom);
    fork
      begin
        send(blk, 0);
        send(refb, 1);     // exact match, SAD = 0
        send(blk, 2);      // rejected against minimum 0
        send(blk, 3);
      end
    join
    wait_idle();
    check(n_res == 4, $sformatf("schedule: %0d results for 4 candidates", n_res));
    check(got_new[0] && got_new[1] && !got_new[2] && !got_new[3], "schedule: new-minimum flags");
    check(res_cyc[0] - load_cyc[0] + 1 == 9 + 3 * L,
          $sformatf("new minimum reported after %0d cycles, expected %0d",
                    res_cyc[0] - load_cyc[0] + 1, 9 + 3 * L));
    check(load_cyc[1] - load_cyc[0] == 8 + 2 * L,
          $sformatf("next candidate after %0d cycles, expected %0d",
                    load_cyc[1] - load_cyc[0], 8 + 2 * L));
    check(load_cyc[3] - load_cyc[2] == (PARTIAL_CMP ? 2 * L - 3 : 1 + 2 * L),
          $sformatf("best-case period %0d cycles", load_cyc[3] - load_cyc[2]));
    check(got_early[2] && got_early[3], "best case counts as early rejection");
    check(min_sad == 0 && best_mv.dx == 8'sd1, "schedule: minimum is the exact match");

    // ---- random search
    do_init();
    for (int k = 0; k < NPIX; k++) refb[k] = pixel_t'($urandom);
    run_min = 1 << 30;
    best_idx = -1;
    for (int i = 0; i < NRAND; i++) begin
      amp = (i < 4) ? 255 : 1 + ($urandom % 96);
      for (int k = 0; k < NPIX; k++) begin
        v = int'(refb[k]) + int'($urandom % (2 * amp + 1)) - amp;
        blk[k] = pixel_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
      end
      // now and then repeat the current best block: a tie is rejected
      if (i % 10 == 9) blk = best_blk;
      s = sad_of(blk, refb);
      exp_new[i] = (s < run_min);
      if (s < run_min) begin run_min = s; best_idx = i; best_blk = blk; end
      send(blk, i);
    end
    wait_idle();
    check(n_res == NRAND, $sformatf("random: %0d results for %0d candidates", n_res, NRAND));
    for (int i = 0; i < NRAND; i++) begin
      check(got_new[i] == exp_new[i], $sformatf("random: candidate %0d new-minimum flag %0d", i, got_new[i]));
      if (got_new[i]) n_acc++;
      else if (got_early[i]) n_early++;
      else n_late++;
    end
    check(int'(min_sad) == run_min, $sformatf("random: min_sad %0d expected %0d", min_sad, run_min));
    check(best_mv.dx == 8'(best_idx), "random: best motion vector");
    check(n_acc > 0, "mechanism: new minimum");
    check(n_early > 0, "mechanism: early rejection");
    check(n_late > 0 || PARTIAL_CMP, "mechanism: rejection on the last digit");
    $display("[N=%0d P=%0d] accepted=%0d early_rejected=%0d late_rejected=%0d",
             N, PARTIAL_CMP, n_acc, n_early, n_late);
    done = 1;
  end

endmodule
