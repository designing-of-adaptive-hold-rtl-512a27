// Column-bypassing unsigned array multiplier, p = md * mr.
//
// Structure (follows the 4x4 column-bypassing array of the design, generalised
// to W bits): a carry-save array of (W-1) rows by (W-1) columns of full
// adders followed by a ripple-carry row. The adder in row j, column i adds the
// partial product md[i]&mr[j] to the sum coming diagonally from column i+1 of
// the row above and to the carry coming straight down column i. The left
// column receives md[W-1]&mr[j-1] as its sum input, the first row receives
// md[i+1]&mr[0]. When md[i] is 0 every partial product of column i is 0, so
// each adder of that column is bypassed by a 2:1 mux that passes the incoming
// sum straight on; the carries of the last row are ANDed with md[i] before the
// ripple-carry row, so a bypassed column contributes no carry. Fewer ones in
// the multiplicand therefore mean fewer active adders and a shorter path,
// which is what the adaptive hold logic exploits.
//
// Interface: md (multiplicand, controls the bypass), mr (multiplier), p
// (2*W-bit product). Purely combinational; W >= 2. The default width of 32
// is the larger of the two sizes the design is evaluated at (16 and 32).
// The bypass muxes and the AND gates are those of the classic column-
// bypassing array (the design's 4x4 version generalised to W bits); the
// adder carries inside the array are left ungated, which is functionally
// exact because a bypassed column never receives a carry.
module column_bypass_mult #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]   md,
  input  logic [W-1:0]   mr,
  output logic [2*W-1:0] p
);

  // s[j][i], c[j][i]: sum and carry out of the cell in row j, column i.
  logic [W-2:0] s [1:W-1];
  logic [W-2:0] c [1:W-1];
  // ripple carries of the final row
  logic [W-1:0] rc;

  for (genvar j = 1; j < W; j++) begin : g_row
    for (genvar i = 0; i < W - 1; i++) begin : g_col
      logic pp, s_in, c_in, fa_s, fa_c;
      assign pp = md[i] & mr[j];
      if (j == 1) begin : g_first
        assign s_in = md[i+1] & mr[0];
        assign c_in = 1'b0;
      end else if (i == W - 2) begin : g_left
        assign s_in = md[W-1] & mr[j-1];
        assign c_in = c[j-1][i];
      end else begin : g_mid
        assign s_in = s[j-1][i+1];
        assign c_in = c[j-1][i];
      end
      full_adder u_fa (.a(pp), .b(s_in), .ci(c_in), .s(fa_s), .co(fa_c));
      // bypass mux: md[i] = 0 selects the incoming sum
      assign s[j][i] = md[i] ? fa_s : s_in;
      assign c[j][i] = fa_c;
    end
    assign p[j] = s[j][0];
  end
  assign p[0] = md[0] & mr[0];

  // final ripple-carry row, weights W .. 2W-2; carries gated by md[k]
  assign rc[0] = 1'b0;
  for (genvar k = 0; k < W - 1; k++) begin : g_final
    logic x, y;
    assign x = c[W-1][k] & md[k];
    if (k < W - 2) begin : g_sum
      assign y = s[W-1][k+1];
    end else begin : g_top
      assign y = md[W-1] & mr[W-1];
    end
    full_adder u_fa (.a(x), .b(y), .ci(rc[k]), .s(p[W+k]), .co(rc[k+1]));
  end
  assign p[2*W-1] = rc[W-1];

endmodule
