// One-bit full adder: s = a ^ b ^ ci, co = majority(a, b, ci).
// The cell of the array multipliers in this library. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));
endmodule
