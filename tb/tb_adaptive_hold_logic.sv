// Testbench of the adaptive hold logic (8-bit patterns, N = 3, aging window
// 16, threshold 2). A reference model of the judging blocks, the aging
// indicator, the mux and the OR/flip-flop loop is stepped alongside; each
// cycle the one_cycle prediction, `aged` and gating_n are compared. Checks
// also that a two-cycle pattern blocks the input registers for exactly one
// cycle and that both judging rules were exercised.
module tb_adaptive_hold_logic;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       en, op_start, error;
  logic [7:0] pattern;
  logic       one_cycle, aged, gating_n;

  always #5 clk = ~clk;

  adaptive_hold_logic #(.W(8), .N_ZEROS(3), .OP_WINDOW(16), .ERR_THRESHOLD(2)) u_dut (
    .clk, .rst_n, .en, .pattern, .op_start, .error, .one_cycle, .aged, .gating_n
  );

  int ref_ops = 0, ref_errs = 0;
  bit ref_aged = 0, ref_q = 1;
  int n_hold = 0, n_one_fresh = 0, n_one_aged = 0, n_diff = 0;

  function automatic int zeros(logic [7:0] x);
    int z = 0;
    for (int i = 0; i < 8; i++) if (!x[i]) z++;
    return z;
  endfunction

  initial begin
    en = 1; op_start = 0; error = 0; pattern = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      automatic bit exp_one;
      automatic int e;
      pattern  = 8'($urandom());
      en       = ($urandom_range(9) != 0);
      op_start = ($urandom_range(1) != 0);
      error    = (c > 1500) && ($urandom_range(5) == 0);
      #1;
      exp_one = ref_aged ? (zeros(pattern) > 4) : (zeros(pattern) > 3);
      if ((zeros(pattern) > 3) != (zeros(pattern) > 4)) n_diff++;
      checks++;
      if (one_cycle != exp_one) begin
        failures++;
        $display("cycle %0d: one_cycle %b, expected %b", c, one_cycle, exp_one);
      end
      if (exp_one && !ref_aged) n_one_fresh++;
      if (exp_one && ref_aged) n_one_aged++;
      @(posedge clk);
      // reference step
      if (en) begin
        if (!ref_q) n_hold++;
        ref_q = exp_one | ~ref_q;
      end
      e = ref_errs + int'(error);
      if (e > 2) ref_aged = 1;
      if (op_start && ref_ops == 15) begin ref_ops = 0; ref_errs = 0; end
      else begin ref_ops += int'(op_start); ref_errs = e; end
      #1;
      checks += 2;
      if (gating_n != ref_q) begin failures++; $display("cycle %0d: gating_n %b, expected %b", c, gating_n, ref_q); end
      if (aged != ref_aged) begin failures++; $display("cycle %0d: aged %b, expected %b", c, aged, ref_aged); end
    end
    checks++;
    if (n_hold == 0 || n_one_fresh == 0 || n_one_aged == 0 || !ref_aged) begin
      failures++;
      $display("coverage: holds=%0d one-cycle fresh=%0d aged=%0d", n_hold, n_one_fresh, n_one_aged);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // gating_n low lasts one cycle whenever the flip-flop is enabled
  always @(posedge clk) if (rst_n && en && !gating_n) begin
    #1;
    checks++;
    if (!gating_n) begin failures++; $display("gating_n low for two enabled cycles"); end
  end

  initial begin
    #(1ms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
