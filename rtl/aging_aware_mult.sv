// Aging-aware variable-latency multiplier.
//
// A bypassing array multiplier is fast when its controlling operand has many
// zeros and slow when it has few. Instead of clocking it at its worst-case
// delay, this unit gives each operation one or two clock cycles, as predicted
// by the adaptive hold logic (AHL) from the number of zeros in the operand.
// Razor flip-flops at the multiplier output catch the rare one-cycle
// operation that did not finish in time; that result is then taken from the
// Razor shadow latch one cycle later, so the operation has effectively been
// executed in two cycles. The errors also feed the AHL's aging indicator: as
// transistors age and the array slows down, errors become frequent, and the
// AHL switches to a stricter rule (one more zero needed for one cycle).
// All of this is the design's architecture.
//
// Clocking (this design's choice): clk_del is clk delayed by less than half a
// period. The Razor main flip-flops sample on clk; the input registers and
// the AHL flip-flop load on clk_del, the same edge that closes the Razor
// shadow latch. A new operation therefore never reaches the shadow latch
// before it has closed on the previous result, and a one-cycle operation has
// one period minus the clock skew to reach the main flip-flops, with the skew
// as the Razor detection margin. The design gates the clock of the input
// registers with the AHL output; here that gating is a load enable.
//
// Interface, clk_del domain: md, mr, in_valid are loaded when in_ready is 1
// (on the clk_del edge). clk domain: product with out_valid, to be sampled on
// the rising clk edge (out_valid depends on the Razor comparison, which
// settles at the clk_del edge). razor_error pulses for one clk cycle when a
// result had to be recovered; aged is the AHL aging indicator; one_cycle is
// the AHL prediction for the pattern presented at md/mr.
// Latency, counted in clk edges after the clk_del edge that loads an
// operation: 1 for a one-cycle operation, 2 for a two-cycle one, one more if
// Razor recovers it. A recovery also holds the input registers for one cycle,
// so that the recovered result and the next operation do not collide.
module aging_aware_mult
  import ahl_pkg::*;
#(
  parameter int unsigned W             = 32,
  parameter int unsigned N_ZEROS       = 16,
  parameter int unsigned OP_WINDOW     = 1024,
  parameter int unsigned ERR_THRESHOLD = 32,
  parameter bypass_e     BYPASS        = BYPASS_COLUMN
) (
  input  logic           clk,
  input  logic           clk_del,
  input  logic           rst_n,
  // operands
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [W-1:0]   md,
  input  logic [W-1:0]   mr,
  // result
  output logic           out_valid,
  output logic [2*W-1:0] product,
  // status
  output logic           razor_error,
  output logic           aged,
  output logic           one_cycle
);

  // clk_del domain
  logic [W-1:0]   md_r, mr_r;
  logic           op_valid;
  logic           gating_n;
  logic           fe_en;
  // clk domain
  logic           res_valid;   // razor holds a freshly captured result
  logic           rec_valid;   // razor holds a result restored from the shadow latch
  logic           hold_fe;     // a recovery is under way: hold the input side
  logic           restore;
  logic           complete;
  // datapath
  logic [2*W-1:0] mult_p;
  logic           err_any;

  // ---------------- input side (clk_del) ----------------
  assign fe_en    = gating_n & ~hold_fe;
  assign in_ready = fe_en;

  always_ff @(posedge clk_del or negedge rst_n) begin
    if (!rst_n) begin
      md_r     <= '0;
      mr_r     <= '0;
      op_valid <= 1'b0;
    end else if (fe_en) begin
      md_r     <= md;
      mr_r     <= mr;
      op_valid <= in_valid;
    end
  end

  adaptive_hold_logic #(
    .W            (W),
    .N_ZEROS      (N_ZEROS),
    .OP_WINDOW    (OP_WINDOW),
    .ERR_THRESHOLD(ERR_THRESHOLD)
  ) u_ahl (
    .clk      (clk_del),
    .rst_n    (rst_n),
    .en       (~hold_fe),
    .pattern  ((BYPASS == BYPASS_COLUMN) ? md : mr),
    .op_start (fe_en & in_valid),
    .error    (hold_fe),
    .one_cycle(one_cycle),
    .aged     (aged),
    .gating_n (gating_n)
  );

  // ---------------- bypassing multiplier ----------------
  if (BYPASS == BYPASS_COLUMN) begin : g_col
    column_bypass_mult #(.W(W)) u_mult (.md(md_r), .mr(mr_r), .p(mult_p));
  end else begin : g_row
    row_bypass_mult #(.W(W)) u_mult (.md(md_r), .mr(mr_r), .p(mult_p));
  end

  // ---------------- Razor output register (clk) ----------------
  razor_ff #(.W(2 * W)) u_razor (
    .clk    (clk),
    .clk_del(clk_del),
    .rst_n  (rst_n),
    .d      (mult_p),
    .restore(restore),
    .q      (product),
    .err_any(err_any)
  );

  // a freshly captured result that disagrees with its shadow is recovered
  assign restore = res_valid & err_any;
  // the operation in the input registers finishes at this clk edge if the
  // AHL lets the input registers move on and no recovery takes the edge
  assign complete = op_valid & gating_n & ~restore;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      rec_valid <= 1'b0;
      hold_fe   <= 1'b0;
    end else begin
      res_valid <= complete;
      rec_valid <= restore;
      hold_fe   <= restore;
    end
  end

  assign out_valid   = (res_valid & ~err_any) | rec_valid;
  assign razor_error = hold_fe;

  // a recovery never follows a recovery
  assert property (@(posedge clk) disable iff (!rst_n) restore |=> !restore);
  // at most one result is presented per clk edge
  assert property (@(posedge clk) disable iff (!rst_n) !(res_valid && rec_valid));

endmodule
