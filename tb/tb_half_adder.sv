// tb_half_adder: exhaustive check of the half adder against the two-input
// addition truth table (0+0=00, 0+1=01, 1+0=01, 1+1=10).
module tb_half_adder;
  logic a, b, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int sum;
      {a, b} = 2'(v);
      #1;
      sum = int'(a) + int'(b);
      checks++;
      if ({c, s} !== 2'(sum)) begin failures++; $display("FAIL a=%b b=%b -> c=%b s=%b", a, b, c, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
