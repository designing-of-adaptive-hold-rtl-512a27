// Top level: the aging-aware variable-latency multiplier and, beside it and
// independent of it, the Baugh-Wooley signed array multiplier.
//
// vl_*: the variable-latency unsigned multiplier (W x W, column-bypassing by
// default) with its adaptive hold logic and Razor output register; see
// aging_aware_mult for the protocol and the two clocks. bw_*: the
// combinational signed N x N Baugh-Wooley multiplier, which shares nothing
// with the first unit and has its ports brought out on their own.
module ahl_top
  import ahl_pkg::*;
#(
  parameter int unsigned W             = 32,
  parameter int unsigned N_ZEROS       = 16,
  parameter int unsigned OP_WINDOW     = 1024,
  parameter int unsigned ERR_THRESHOLD = 32,
  parameter bypass_e     BYPASS        = BYPASS_COLUMN,
  parameter int unsigned BW_N          = 4
) (
  input  logic                    clk,
  input  logic                    clk_del,
  input  logic                    rst_n,
  input  logic                    vl_in_valid,
  output logic                    vl_in_ready,
  input  logic [W-1:0]            vl_md,
  input  logic [W-1:0]            vl_mr,
  output logic                    vl_out_valid,
  output logic [2*W-1:0]          vl_product,
  output logic                    vl_razor_error,
  output logic                    vl_aged,
  output logic                    vl_one_cycle,
  input  logic signed [BW_N-1:0]  bw_a,
  input  logic signed [BW_N-1:0]  bw_b,
  output logic signed [2*BW_N-1:0] bw_p
);

  aging_aware_mult #(
    .W            (W),
    .N_ZEROS      (N_ZEROS),
    .OP_WINDOW    (OP_WINDOW),
    .ERR_THRESHOLD(ERR_THRESHOLD),
    .BYPASS       (BYPASS)
  ) u_vl (
    .clk        (clk),
    .clk_del    (clk_del),
    .rst_n      (rst_n),
    .in_valid   (vl_in_valid),
    .in_ready   (vl_in_ready),
    .md         (vl_md),
    .mr         (vl_mr),
    .out_valid  (vl_out_valid),
    .product    (vl_product),
    .razor_error(vl_razor_error),
    .aged       (vl_aged),
    .one_cycle  (vl_one_cycle)
  );

  baugh_wooley_mult #(.N(BW_N)) u_bw (.a(bw_a), .b(bw_b), .p(bw_p));

endmodule
