// search_strategy_decision: classifies a macroblock (MB) as stationary,
// homogeneous or textured, the input to the choice of a search strategy.
//
// One array of N*N/4 four-pixel PEs (64 for a 16x16 MB) does both tests:
//   1. Stationary test: with the PE multiplexers at 0 the array computes in
//      one cycle the SAD between the current MB and the reference MB at the
//      same position (Diff). Diff <= thr_t  ->  MB_STATIONARY, done.
//   2. Homogeneous test, only if Diff > thr_t: with the multiplexers at 1,
//      half of the PEs compute |dx| and the other half |dy| of the Sobel
//      operator for N/8 rows of the MB per cycle (32 pixels for N = 16) from
//      the window of mb_systolic_array, which then moves up. After 8 cycles
//      edge_sum holds the sum of |dx| + |dy| over the MB.
//      edge_sum < thr_h -> MB_HOMOGENEOUS, else MB_TEXTURED.
// The threshold compare is the last step; the mapping from the class to a
// search pattern is left to the user of the result.
//
// Timing: start (one cycle, cur/pad inputs sampled, refm must stay stable for
// the next cycle) -> Diff in the next cycle -> done pulse 2 cycles after start
// for a stationary MB, 2 + N/STEP cycles after start otherwise; results hold
// until the next start.
//
// From the document: the PE count, the shared multiplexed PEs, Diff against
// a threshold T, the 32 amplitudes per cycle and the 8 cycles per MB. This
// design's own: the amplitude |dx| + |dy|, a second threshold thr_h for the
// homogeneous test (the document gives no criterion), the class encoding and
// the handshake.
module search_strategy_decision
  import sad_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  pixel_t    cur     [N*N],
  input  pixel_t    refm    [N*N],
  input  pixel_t    pad_top [N],
  input  pixel_t    pad_bot [N],
  input  logic [PIX_W+$clog2(N*N)-1:0]   thr_t,
  input  logic [PIX_W+$clog2(N*N)+3:0]   thr_h,
  output logic      busy,
  output logic      done,
  output logic [PIX_W+$clog2(N*N)-1:0]   diff,
  output logic [PIX_W+$clog2(N*N)+3:0]   edge_sum,
  output mb_class_t mb_class
);

  localparam int unsigned NPE   = N * N / 4;
  localparam int unsigned STEP  = N / 8;        // MB rows per edge cycle
  localparam int unsigned NAMP  = STEP * N;     // amplitudes per cycle
  localparam int unsigned NSTEP = N / STEP;     // edge cycles per MB
  localparam int unsigned DW    = PIX_W + $clog2(N * N);
  localparam int unsigned EW    = DW + 4;

  typedef enum logic [1:0] {S_IDLE, S_DIFF, S_EDGE} state_t;
  state_t state;
  logic [$clog2(NSTEP+1)-1:0] step;

  pixel_t win [STEP+2][N+2];
  pixel_t mbp [N*N];
  logic   sel, shift;

  mb_systolic_array #(.N(N), .STEP(STEP)) u_array (
    .clk, .rst_n,
    .load    (start),
    .shift   (shift),
    .mb      (cur),
    .pad_top (pad_top),
    .pad_bot (pad_bot),
    .win     (win),
    .mb_rows (mbp)
  );

  // ---- PE array and its operand routing
  pixel_t pe_org [NPE][4];
  pixel_t pe_ref [NPE][4];
  pixel_t pe_pr  [NPE][4];
  pixel_t pe_pc  [NPE][4];
  logic [PIX_W+1:0] pe_out [NPE];

  int i, j;
  always_comb begin
    i = 0;
    j = 0;
    for (int p = 0; p < int'(NPE); p++)
      for (int k = 0; k < 4; k++) begin
        pe_org[p][k] = mbp[4*p+k];
        pe_ref[p][k] = refm[4*p+k];
        pe_pr[p][k]  = '0;
        pe_pc[p][k]  = '0;
      end
    for (int a = 0; a < int'(NAMP); a++) begin
      i = 1 + a / int'(N);          // window row of the pixel
      j = 1 + a % int'(N);          // window column of the pixel
      // |dx|: column j+1 minus column j-1, rows i-1, i, i, i+1
      pe_pr[a][0] = win[i-1][j+1];  pe_pc[a][0] = win[i-1][j-1];
      pe_pr[a][1] = win[i][j+1];    pe_pc[a][1] = win[i][j-1];
      pe_pr[a][2] = win[i][j+1];    pe_pc[a][2] = win[i][j-1];
      pe_pr[a][3] = win[i+1][j+1];  pe_pc[a][3] = win[i+1][j-1];
      // |dy|: row i+1 minus row i-1, columns j-1, j, j, j+1
      pe_pr[NAMP+a][0] = win[i+1][j-1];  pe_pc[NAMP+a][0] = win[i-1][j-1];
      pe_pr[NAMP+a][1] = win[i+1][j];    pe_pc[NAMP+a][1] = win[i-1][j];
      pe_pr[NAMP+a][2] = win[i+1][j];    pe_pc[NAMP+a][2] = win[i-1][j];
      pe_pr[NAMP+a][3] = win[i+1][j+1];  pe_pc[NAMP+a][3] = win[i-1][j+1];
    end
  end

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    four_pixel_pe u_pe (
      .sel    (sel),
      .org    (pe_org[p]),
      .refp   (pe_ref[p]),
      .pr     (pe_pr[p]),
      .pc     (pe_pc[p]),
      .result (pe_out[p])
    );
  end

  logic [EW-1:0] pe_sum;
  always_comb begin
    pe_sum = '0;
    for (int p = 0; p < int'(NPE); p++) pe_sum += EW'(pe_out[p]);
  end

  assign sel   = (state == S_EDGE);
  assign shift = (state == S_EDGE);
  assign busy  = (state != S_IDLE);

  // ---- control and threshold compare
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      step     <= '0;
      done     <= 1'b0;
      diff     <= '0;
      edge_sum <= '0;
      mb_class <= MB_STATIONARY;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) state <= S_DIFF;
        S_DIFF: begin
          diff     <= DW'(pe_sum);
          edge_sum <= '0;
          step     <= '0;
          if (DW'(pe_sum) <= thr_t) begin
            mb_class <= MB_STATIONARY;
            done     <= 1'b1;
            state    <= S_IDLE;
          end else begin
            state <= S_EDGE;
          end
        end
        S_EDGE: begin
          edge_sum <= edge_sum + pe_sum;
          step     <= step + 1'b1;
          if (int'(step) == int'(NSTEP) - 1) begin
            mb_class <= (edge_sum + pe_sum < thr_h) ? MB_HOMOGENEOUS : MB_TEXTURED;
            done     <= 1'b1;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (N % 8 == 0) else $error("search_strategy_decision: N must be a multiple of 8");

endmodule
