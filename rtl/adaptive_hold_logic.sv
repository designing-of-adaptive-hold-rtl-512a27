// Adaptive hold logic (AHL): decides, for every operand pattern, whether the
// bypassing multiplier gets one clock cycle or two, and tightens that rule
// once the circuit has aged.
//
// Two judging blocks look at the incoming pattern (the operand that controls
// the bypass): the first says "one cycle" if it has more than N zeros, the
// second if it has more than N+1. A mux picks the first while the aging
// indicator reads 0 and the second once it reads 1, so an aged circuit sends
// fewer patterns down the one-cycle route. The mux output is ORed with the
// inverted output of a D flip-flop and stored in it; the flip-flop output is
// gating_n, the active-low gating signal of the input registers. A two-cycle
// pattern stores 0, which blocks the input registers for exactly one cycle;
// the next cycle the OR with Q-bar stores 1 again. This structure is the
// design's.
//
// Timing: `pattern` is the operand presented to the input registers; it is
// judged in the cycle before it is loaded, and gating_n, valid after the edge
// that loads it, tells whether the registers may load again at the following
// edge. en = 0 freezes the flip-flop for a cycle (used while a Razor error is
// being recovered; this enable is this design's addition). error and op_start
// feed the aging indicator. The flip-flop resets to 1 (inputs enabled).
module adaptive_hold_logic #(
  parameter int unsigned W             = 32,
  parameter int unsigned N_ZEROS       = 16,
  parameter int unsigned OP_WINDOW     = 1024,
  parameter int unsigned ERR_THRESHOLD = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] pattern,
  input  logic         op_start,
  input  logic         error,
  output logic         one_cycle,
  output logic         aged,
  output logic         gating_n
);

  logic judge_n, judge_n1;
  logic q;

  zero_judge #(.W(W), .N(N_ZEROS))     u_judge0 (.x(pattern), .one_cycle(judge_n));
  zero_judge #(.W(W), .N(N_ZEROS + 1)) u_judge1 (.x(pattern), .one_cycle(judge_n1));

  aging_indicator #(
    .OP_WINDOW    (OP_WINDOW),
    .ERR_THRESHOLD(ERR_THRESHOLD)
  ) u_aging (
    .clk     (clk),
    .rst_n   (rst_n),
    .op_start(op_start),
    .error   (error),
    .aged    (aged)
  );

  assign one_cycle = aged ? judge_n1 : judge_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b1;
    else if (en) q <= one_cycle | ~q;
  end

  assign gating_n = q;

endmodule
