// Row-bypassing unsigned array multiplier, p = md * mr.
//
// Row j of the array adds the multiplicand, shifted left by j, to the running
// sum of rows 0 .. j-1. When multiplier bit mr[j] is 0 that row adds nothing,
// so a 2:1 mux passes the running sum around the row's adder unchanged. Fewer
// ones in the multiplier therefore mean fewer active rows and a shorter path.
// Each row is a (W+1)-bit carry-propagate adder on bits j .. j+W of the running
// sum; bits below j are final and pass straight through. This per-row
// ripple structure is this design's own choice: the multiplier is only named
// as the row-bypassing alternative to the column-bypassing array.
//
// Interface: md (multiplicand), mr (multiplier, controls the bypass), p
// (2*W-bit product). Purely combinational; W >= 2.
module row_bypass_mult #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]   md,
  input  logic [W-1:0]   mr,
  output logic [2*W-1:0] p
);

  // acc[j]: sum of rows 0 .. j (only bits 0 .. W+j can be set)
  logic [2*W-1:0] acc [W];

  assign acc[0] = mr[0] ? {{W{1'b0}}, md} : '0;

  for (genvar j = 1; j < W; j++) begin : g_row
    logic [W:0]       row_sum;
    logic [2*W-1:0]   added;
    assign row_sum = {1'b0, acc[j-1][j +: W]} + {1'b0, md};
    if (j + W + 1 < 2 * W) begin : g_pad
      assign added = {{(2*W-W-1-j){1'b0}}, row_sum, acc[j-1][j-1:0]};
    end else begin : g_full
      assign added = {row_sum, acc[j-1][j-1:0]};
    end
    // bypass mux: mr[j] = 0 passes the running sum around the row
    assign acc[j] = mr[j] ? added : acc[j-1];
  end

  assign p = acc[W-1];

endmodule
