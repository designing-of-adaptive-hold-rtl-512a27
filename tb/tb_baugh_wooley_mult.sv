// Testbench of the Baugh-Wooley signed multiplier: exhaustive over all
// operand pairs at 4 bits (the default), 5 bits and 8 bits, compared with
// the signed `*` operator.
module tb_baugh_wooley_mult;
  int checks = 0, failures = 0;

  logic signed [3:0] a4, b4; logic signed [7:0]  p4;
  logic signed [4:0] a5, b5; logic signed [9:0]  p5;
  logic signed [7:0] a8, b8; logic signed [15:0] p8;

  baugh_wooley_mult          u4 (.a(a4), .b(b4), .p(p4));
  baugh_wooley_mult #(.N(5)) u5 (.a(a5), .b(b5), .p(p5));
  baugh_wooley_mult #(.N(8)) u8 (.a(a8), .b(b8), .p(p8));

  initial begin
    for (int i = -8; i < 8; i++)
      for (int j = -8; j < 8; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        checks++;
        if (int'(p4) != i * j) begin failures++; $display("4b %0d*%0d=%0d", i, j, p4); end
      end
    for (int i = -16; i < 16; i++)
      for (int j = -16; j < 16; j++) begin
        a5 = 5'(i); b5 = 5'(j); #1;
        checks++;
        if (int'(p5) != i * j) begin failures++; $display("5b %0d*%0d=%0d", i, j, p5); end
      end
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        checks++;
        if (int'(p8) != i * j) begin failures++; $display("8b %0d*%0d=%0d", i, j, p8); end
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
