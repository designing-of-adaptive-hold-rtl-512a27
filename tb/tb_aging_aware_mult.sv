// Testbench of the aging-aware variable-latency multiplier at the four sizes
// the design is evaluated at: 16x16 and 32x32, column- and row-bypassing.
// Each unit runs fresh and then aged (with a short aging window, so that the
// indicator switches early); the checking environment verifies products,
// latencies, Razor recoveries and the switch of the judging rule.
module tb_aging_aware_mult;
  import ahl_pkg::*;

  logic done_c, done_r, done_c32, done_r32;
  int   checks_c, checks_r, fails_c, fails_r, checks_c32, checks_r32, fails_c32, fails_r32;

  vl_env #(.W(16), .N_ZEROS(8), .OP_WINDOW(64), .ERR_THRESHOLD(4),
           .BYPASS(BYPASS_COLUMN), .FRESH_OPS(400), .AGED_OPS(800))
    u_col (.done(done_c), .checks(checks_c), .failures(fails_c));
  vl_env #(.W(16), .N_ZEROS(8), .OP_WINDOW(64), .ERR_THRESHOLD(4),
           .BYPASS(BYPASS_ROW), .FRESH_OPS(400), .AGED_OPS(800))
    u_row (.done(done_r), .checks(checks_r), .failures(fails_r));
  vl_env #(.W(32), .N_ZEROS(16), .OP_WINDOW(128), .ERR_THRESHOLD(6),
           .BYPASS(BYPASS_COLUMN), .FRESH_OPS(400), .AGED_OPS(800))
    u_col32 (.done(done_c32), .checks(checks_c32), .failures(fails_c32));
  vl_env #(.W(32), .N_ZEROS(16), .OP_WINDOW(128), .ERR_THRESHOLD(6),
           .BYPASS(BYPASS_ROW), .FRESH_OPS(400), .AGED_OPS(800))
    u_row32 (.done(done_r32), .checks(checks_r32), .failures(fails_r32));

  initial begin
    #1;
    wait (done_c && done_r && done_c32 && done_r32);
    $display("TB_RESULT checks=%0d failures=%0d", checks_c + checks_r + checks_c32 + checks_r32,
             fails_c + fails_r + fails_c32 + fails_r32);
    $finish;
  end

  initial begin
    #(200us);
    $display("tb_aging_aware_mult: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_c + checks_r + checks_c32 + checks_r32,
             fails_c + fails_r + fails_c32 + fails_r32 + 1);
    $finish;
  end
endmodule
