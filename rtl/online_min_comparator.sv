// online_min_comparator: MSD-first comparison of a digit-serial SAD with the
// current minimum SAD (the comparator of the SAD processor).
//
// A W-digit signed-digit stream (digits in {-1,0,+1}, MSD first) enters one
// digit per cycle, starting in the cycle `first` is high. After k digits the
// comparator knows the prefix value P; the digits still to come can change
// the result by at most 2^m - 1 either way, m being their number. Since a SAD
// is never negative, the stream is certainly not below `bound` as soon as
// P*2^m - (2^m - 1) >= bound, or bound = 0; `reject` then goes high in that
// same cycle and the comparison stops. If the last digit passes without a
// rejection, the exact value is below `bound`: `accept` goes high and `value`
// holds it. `stop` ends a running comparison at the clock edge, without a
// result (it only acts on the state register, so it may be derived from the
// reject outputs of this or other comparators). With bound equal to
// the stored minimum, a candidate is rejected after its first digit at best
// and accepted only after its last one, as in the document's best and worst
// cases. The document gives the idea (reject early on the leading digits);
// the bound test is this design's own formulation.
//
// Interface: digit/first/stop in; reject, accept, value out (combinational,
// valid in the cycle of the deciding digit). `bound` must be stable while a
// comparison runs.
module online_min_comparator
  import sad_pkg::*;
#(
  parameter int unsigned W  = 12,   // digits in the stream
  parameter int unsigned BW = 12    // width of bound and value
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          first,
  input  logic          stop,
  input  sd_digit_t     digit,
  input  logic [BW-1:0] bound,
  output logic          reject,
  output logic          accept,
  output logic [BW-1:0] value
);

  localparam int unsigned CW = $clog2(W + 1);
  localparam int unsigned PW = W + 3;

  typedef logic signed [PW-1:0] acc_t;

  logic          active;
  logic [CW-1:0] cnt;          // digits already consumed
  acc_t          prefix;       // value of the consumed digits

  logic          dvalid, last;
  logic [CW-1:0] k;
  acc_t          p_now, lower, span;
  int unsigned   m;

  always_comb begin
    dvalid = first || active;
    k      = first ? '0 : cnt;
    p_now  = (first ? acc_t'(0) : (prefix <<< 1))
           + acc_t'(signed'({1'b0, digit.pos})) - acc_t'(signed'({1'b0, digit.neg}));
    m      = W - 1 - int'(k);
    span   = (acc_t'(1) <<< m) - acc_t'(1);
    lower  = (p_now <<< m) - span;
    last   = (k == CW'(W - 1));
    reject = dvalid && ((bound == '0) || (lower >= acc_t'({1'b0, bound})));
    accept = dvalid && last && !reject;
    value  = BW'(p_now);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      prefix <= '0;
    end else begin
      if (dvalid) begin
        prefix <= p_now;
        cnt    <= k + 1'b1;
      end
      if (first)                active <= !(reject || last);
      else if (stop)            active <= 1'b0;
      else if (dvalid)          active <= !(reject || last);
    end
  end

endmodule
