// Testbench of the aging indicator.
// Small instance (window 8 operations, threshold 2): random operation and
// error streams at several error rates, with resets in between, compared
// cycle by cycle with a reference model. Default instance (1024 / 32): one
// window with exactly 32 errors must not set `aged`, the next with 33 must,
// and `aged` must then stay set through error-free windows.
module tb_aging_indicator;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic op_s, err_s, aged_s;
  logic op_d, err_d, aged_d;

  always #5 clk = ~clk;

  aging_indicator #(.OP_WINDOW(8), .ERR_THRESHOLD(2))
    u_small (.clk, .rst_n, .op_start(op_s), .error(err_s), .aged(aged_s));
  aging_indicator
    u_dflt  (.clk, .rst_n, .op_start(op_d), .error(err_d), .aged(aged_d));

  // reference of the small instance
  int ref_ops, ref_errs;
  bit ref_aged;

  task automatic ref_reset();
    ref_ops = 0; ref_errs = 0; ref_aged = 0;
  endtask

  task automatic ref_step(bit op, bit er);
    int e = ref_errs + int'(er);
    if (e > 2) ref_aged = 1;
    if (op && ref_ops == 7) begin ref_ops = 0; ref_errs = 0; end
    else begin ref_ops += int'(op); ref_errs = e; end
  endtask

  int trips = 0, no_trips = 0;

  initial begin
    op_s = 0; err_s = 0; op_d = 0; err_d = 0;
    for (int run = 0; run < 40; run++) begin
      automatic int rate = run % 5;   // error probability rate/8
      rst_n = 1'b0;
      ref_reset();
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      for (int c = 0; c < 60; c++) begin
        #1;
        op_s  = ($urandom_range(3) != 0);
        err_s = ($urandom_range(7) < rate);
        @(posedge clk);
        ref_step(op_s, err_s);
        #1;
        checks++;
        if (aged_s != ref_aged) begin
          failures++;
          $display("small: aged %b, expected %b (run %0d cycle %0d)", aged_s, ref_aged, run, c);
        end
      end
      if (ref_aged) trips++; else no_trips++;
    end
    checks++;
    if (trips == 0 || no_trips == 0) begin failures++; $display("small: runs did not cover both outcomes"); end

    // default instance: 1024-operation windows, threshold 32
    op_s = 0; err_s = 0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < 4; w++) begin
      automatic int nerr = (w == 0) ? 32 : (w == 1) ? 33 : 0;
      for (int i = 0; i < 1024; i++) begin
        op_d  = 1'b1;
        err_d = (i % 31 == 3) && (i / 31 < nerr);
        @(posedge clk);
        #1;
      end
      op_d = 1'b0; err_d = 1'b0;
      checks++;
      if (aged_d != (w >= 1)) begin
        failures++;
        $display("default: window %0d with %0d errors, aged %b", w, nerr, aged_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1ms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
