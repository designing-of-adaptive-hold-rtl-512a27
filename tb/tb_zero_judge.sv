// Testbench of the judging block: random words and words with exactly N-1,
// N, N+1 and N+2 zeros at the default 32 bits / N = 16, plus an exhaustive
// 8-bit instance with N = 3; the expected flag comes from a separate count.
module tb_zero_judge;
  int checks = 0, failures = 0;

  logic [31:0] x32; logic y32;
  logic [7:0]  x8;  logic y8;

  zero_judge                   u32 (.x(x32), .one_cycle(y32));
  zero_judge #(.W(8), .N(3))   u8  (.x(x8),  .one_cycle(y8));

  function automatic int zeros_of(logic [31:0] x, int w);
    int z = 0;
    for (int i = 0; i < w; i++) if (!x[i]) z++;
    return z;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      x8 = 8'(i); #1;
      checks++;
      if (y8 != (zeros_of(32'(i), 8) > 3)) begin failures++; $display("8b %b -> %b", x8, y8); end
    end
    for (int n = 0; n < 4000; n++) begin
      if (n % 2 == 0) x32 = $urandom();
      else begin
        // exactly 15 .. 18 zeros
        automatic int want = 15 + (n / 2) % 4;
        x32 = '1;
        while (zeros_of(x32, 32) < want) x32[$urandom_range(31)] = 1'b0;
      end
      #1;
      checks++;
      if (y32 != (zeros_of(x32, 32) > 16)) begin failures++; $display("32b %h -> %b", x32, y32); end
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
