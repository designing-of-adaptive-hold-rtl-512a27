// Testbench of the Razor flip-flops (8 bits). Period 10 ns, clk_del 3 ns
// behind clk. Each cycle a new value arrives either in time (2 ns before the
// clk edge) or late (1 ns after it, before the clk_del edge). In time: q must
// take it and err_any stay 0. Late: q keeps the old value, err_any must rise,
// and with restore asserted the next clk edge must load the late value into
// q from the shadow flip-flop, whatever d shows then.
module tb_razor_ff;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0;
  logic [7:0] d = '0, q;
  logic       restore = 1'b0, err_any;

  always #5 clk = ~clk;
  always @(clk) clk_del <= #3 clk;

  razor_ff #(.W(8)) u_dut (.clk, .clk_del, .rst_n, .d, .restore, .q, .err_any);

  int n_late = 0, n_ok = 0;

  initial begin
    logic [7:0] v, prev;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    prev = '0;
    @(negedge clk);
    for (int c = 0; c < 400; c++) begin
      automatic bit late = ($urandom_range(2) == 0);
      do v = 8'($urandom()); while (v == prev);
      if (!late) begin
        #3 d = v;               // 2 ns before the clk edge
        @(posedge clk);
      end else begin
        @(posedge clk);
        #1 d = v;               // 1 ns after the clk edge
      end
      @(posedge clk_del);
      #1;
      checks++;
      if (err_any != late) begin failures++; $display("cycle %0d: err_any %b, late %b", c, err_any, late); end
      if (late) begin
        n_late++;
        restore = 1'b1;
        d = ~v;                 // whatever d shows, q must take the shadow value
        @(posedge clk);
        #1 restore = 1'b0;
        d = v;
        checks++;
        if (q != v) begin failures++; $display("cycle %0d: restored %h, expected %h", c, q, v); end
      end else begin
        n_ok++;
        checks++;
        if (q != v) begin failures++; $display("cycle %0d: q %h, expected %h", c, q, v); end
      end
      prev = v;
      @(negedge clk);
    end
    checks++;
    if (n_late == 0 || n_ok == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1ms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
