// Aging indicator of the adaptive hold logic.
//
// A pair of counters: one counts operations, one counts Razor errors. After
// every OP_WINDOW operations both are cleared. If within a window the error
// count exceeds ERR_THRESHOLD, the circuit is taken to have aged noticeably
// and `aged` is set; it then stays set until reset, because aging does not
// undo itself. The window/threshold mechanism is the design's; the sticky
// output, the window length and the threshold value are this design's own
// choices (the numbers are not fixed by the design).
//
// Interface: op_start pulses once per operation accepted, error once per
// detected timing error (both sampled on the rising clk edge); aged is a
// registered level. rst_n is an asynchronous active-low reset.
module aging_indicator #(
  parameter int unsigned OP_WINDOW     = 1024,
  parameter int unsigned ERR_THRESHOLD = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic op_start,
  input  logic error,
  output logic aged
);

  localparam int unsigned OW = $clog2(OP_WINDOW + 1);
  localparam int unsigned EW = $clog2(ERR_THRESHOLD + 2);

  logic [OW-1:0] op_cnt;
  logic [EW-1:0] err_cnt;
  logic [EW-1:0] err_next;
  logic          window_end;

  // saturate one above the threshold: that is all that needs telling apart
  assign err_next   = (error && 32'(err_cnt) <= ERR_THRESHOLD) ? err_cnt + 1'b1 : err_cnt;
  assign window_end = op_start && (32'(op_cnt) == OP_WINDOW - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_cnt  <= '0;
      err_cnt <= '0;
      aged    <= 1'b0;
    end else begin
      if (32'(err_next) > ERR_THRESHOLD) aged <= 1'b1;
      if (window_end) begin
        op_cnt  <= '0;
        err_cnt <= '0;
      end else begin
        if (op_start) op_cnt <= op_cnt + 1'b1;
        err_cnt <= err_next;
      end
    end
  end

endmodule
