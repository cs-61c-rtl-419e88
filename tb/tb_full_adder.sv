// tb_full_adder: exhaustive check of the one-bit full adder against its
// truth table (sum = parity of the inputs, carry = at least two inputs set).
module tb_full_adder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a, b, cin} = 3'(v);
      #1;
      ones = int'(a) + int'(b) + int'(cin);
      checks++;
      if (s !== ones[0]) begin failures++; $display("FAIL s v=%0d", v); end
      checks++;
      if (cout !== (ones >= 2)) begin failures++; $display("FAIL cout v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
