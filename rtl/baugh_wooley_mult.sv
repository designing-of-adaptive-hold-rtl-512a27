// Baugh-Wooley signed (two's-complement) array multiplier, p = a * b.
//
// Writing both operands with a negative sign bit, the product splits into
// a[N-1]b[N-1]2^(2N-2) plus the positive products a[i]b[j] (i, j < N-1) minus
// the two rows a[i]b[N-1] and a[N-1]b[j] shifted by 2^(N-1). Each subtraction
// is turned into an addition of the complemented partial products, and the
// correction terms collapse to +2^N and +2^(2N-1) modulo 2^(2N). So the array
// is an ordinary unsigned carry-save array in which the partial products of
// the sign row and sign column (except a[N-1]b[N-1]) are NAND instead of AND,
// and two constant ones are injected into the final adder row: one as its
// carry-in (weight 2^N) and one into its leftmost adder (weight 2^(2N-1)).
//
// Array (the design's 4-bit block diagram generalised to N bits): N rows of N
// cells; the cell in row j, column i adds its partial product to the carry of
// the cell above it and to the sum of the cell above and to the left; the top
// row and the left column get zeros. The right column delivers p[0..N-1], a
// ripple-carry row of N full adders delivers p[N..2N-1]; its last carry out
// falls outside the 2N-bit product.
//
// Interface: a, b signed N-bit; p signed 2N-bit. Combinational; N >= 2.
// The default N = 4 is the size of the block diagram.
module baugh_wooley_mult #(
  parameter int unsigned N = 4
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);

  logic [N-1:0] s [N];
  logic [N-1:0] c [N];
  logic [N:0]   rc;

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic pp, s_in, c_in;
      // complemented partial products in the sign row / sign column
      if ((i == N - 1) != (j == N - 1)) begin : g_nand
        assign pp = ~(a[i] & b[j]);
      end else begin : g_and
        assign pp = a[i] & b[j];
      end
      if (j == 0) begin : g_top
        assign s_in = 1'b0;
        assign c_in = 1'b0;
      end else if (i == N - 1) begin : g_left
        assign s_in = 1'b0;
        assign c_in = c[j-1][i];
      end else begin : g_mid
        assign s_in = s[j-1][i+1];
        assign c_in = c[j-1][i];
      end
      full_adder u_fa (.a(pp), .b(s_in), .ci(c_in), .s(s[j][i]), .co(c[j][i]));
    end
    assign p[j] = s[j][0];
  end

  // final ripple-carry row: carry-in 1 (weight 2^N), a 1 into the top adder
  assign rc[0] = 1'b1;
  for (genvar k = 0; k < N; k++) begin : g_final
    logic y;
    if (k < N - 1) begin : g_sum
      assign y = s[N-1][k+1];
    end else begin : g_one
      assign y = 1'b1;
    end
    full_adder u_fa (.a(c[N-1][k]), .b(y), .ci(rc[k]), .s(p[N+k]), .co(rc[k+1]));
  end

endmodule
