// End-to-end testbench of the top level at its default parameters (32x32
// column-bypassing variable-latency multiplier, aging window of 1024
// operations with a threshold of 32 errors, 4-bit Baugh-Wooley multiplier).
// 1500 operations on a fresh circuit, then 3000 on an aged one: checks every
// product, its latency and order, that Razor recovers exactly the operations
// the delay model makes late, that the aging indicator switches the judging
// rule and that no error follows, and sweeps the Baugh-Wooley multiplier
// over all operand pairs. Each mechanism (one-cycle, two-cycle, Razor
// recovery, hold after a recovery, idle slot, aging switch) must occur.
module tb_ahl_top;
  import ahl_pkg::*;

  logic done;
  int   checks, failures;

  vl_env #(.W(32), .N_ZEROS(16), .OP_WINDOW(1024), .ERR_THRESHOLD(32),
           .BYPASS(BYPASS_COLUMN), .USE_TOP(1'b1), .BW_N(4),
           .FRESH_OPS(1500), .AGED_OPS(3000))
    u_env (.done(done), .checks(checks), .failures(failures));

  initial begin
    #1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(500us);
    $display("tb_ahl_top: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
