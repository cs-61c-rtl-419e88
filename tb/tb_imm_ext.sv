// tb_imm_ext: checks zero and sign extension of 16-bit immediates.
module tb_imm_ext;
  logic [15:0] imm16;
  logic sign_ext;
  logic [31:0] imm32;
  int checks = 0, failures = 0;

  imm_ext dut (.imm16(imm16), .sign_ext(sign_ext), .imm32(imm32));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] v, input logic se);
    int signed sv;
    imm16 = v; sign_ext = se;
    #1;
    sv = se ? int'($signed(v)) : int'(v);
    checks++;
    if (imm32 !== 32'(sv)) begin failures++; $display("FAIL %h se=%b -> %h", v, se, imm32); end
  endtask

  initial begin
    check(16'h0000, 1); check(16'h7FFF, 1); check(16'h8000, 1); check(16'hFFFF, 1);
    check(16'h0000, 0); check(16'h7FFF, 0); check(16'h8000, 0); check(16'hFFFF, 0);
    for (int k = 0; k < 500; k++) check(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
