// Testbench of the column-bypassing array multiplier: exhaustive at 4 and 8
// bits, and 20000 random operand pairs at the default 32 bits, biased so that
// many columns are bypassed, compared with the `*` operator.
module tb_column_bypass_mult;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;   logic [7:0]   p4;
  logic [7:0]  a8, b8;   logic [15:0]  p8;
  logic [31:0] a32, b32; logic [63:0]  p32;

  column_bypass_mult #(.W(4)) u4  (.md(a4),  .mr(b4),  .p(p4));
  column_bypass_mult #(.W(8)) u8  (.md(a8),  .mr(b8),  .p(p8));
  column_bypass_mult          u32 (.md(a32), .mr(b32), .p(p32));

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        checks++;
        if (p4 != 8'(i * j)) begin failures++; $display("4b %0d*%0d=%0d", i, j, p4); end
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        checks++;
        if (p8 != 16'(i * j)) begin failures++; $display("8b %0d*%0d=%0d", i, j, p8); end
      end
    for (int n = 0; n < 20000; n++) begin
      a32 = $urandom();
      b32 = $urandom();
      if (n % 3 == 1) a32 &= $urandom();
      if (n % 3 == 2) a32 &= $urandom() & $urandom();
      if (n == 0) begin a32 = '1; b32 = '1; end
      #1;
      checks++;
      if (p32 != 64'(a32) * 64'(b32)) begin
        failures++;
        $display("32b %h*%h=%h", a32, b32, p32);
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
