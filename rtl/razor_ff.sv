// Razor flip-flops: W one-bit Razor cells side by side.
//
// Each cell has a main flip-flop, a shadow element, an XOR and a restore mux,
// as in the design. The main flip-flop samples d on the rising edge of clk.
// The shadow element samples the same d later, on the rising edge of the
// delayed clock clk_del. If the two differ, d was still changing when the
// main flip-flop sampled it, so the main flip-flop holds a wrong value: the
// XORs, ORed together, raise err_any. Asserting restore makes the main
// flip-flop load the shadow value (the correct one) at the next clk edge
// instead of d.
//
// The design calls the shadow element a latch clocked by the delayed clock.
// Here it is an edge-triggered flip-flop on clk_del: a latch open between the
// clk and clk_del edges ends up holding the same value, and the flip-flop
// keeps that value stable up to the next clk edge, where the restore mux
// reads it, with no latch in the netlist and no simulation race.
//
// Timing: clk_del must lag clk by less than a period. err_any is valid from
// the clk_del edge after a capture until the next clk edge and is meant to be
// sampled on that clk edge. rst_n is an asynchronous active-low reset.
module razor_ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         clk_del,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         restore,
  output logic [W-1:0] q,
  output logic         err_any
);

  logic [W-1:0] shadow;
  logic [W-1:0] err;

  always_ff @(posedge clk_del or negedge rst_n) begin
    if (!rst_n) shadow <= '0;
    else        shadow <= d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= restore ? shadow : d;
  end

  assign err     = q ^ shadow;
  assign err_any = |err;

endmodule
