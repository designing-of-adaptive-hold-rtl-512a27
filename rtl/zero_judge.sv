// Judging block of the adaptive hold logic.
//
// Counts the zero bits of the operand that controls the multiplier's bypass
// and raises one_cycle when that count is larger than N. Many zeros mean many
// bypassed adders, so the operation is predicted to finish within one cycle;
// otherwise it is given two. The threshold comparison is the design's; the
// adder-tree popcount is simply the plainest way to build it.
//
// Interface: x (operand), one_cycle (1 = more than N zeros). Combinational.
module zero_judge #(
  parameter int unsigned W = 32,
  parameter int unsigned N = 16
) (
  input  logic [W-1:0] x,
  output logic         one_cycle
);

  logic [$clog2(W+1)-1:0] zeros;

  always_comb begin
    zeros = '0;
    for (int unsigned i = 0; i < W; i++) begin
      zeros = zeros + {{($clog2(W+1)-1){1'b0}}, ~x[i]};
    end
  end

  assign one_cycle = (32'(zeros) > N);

endmodule
