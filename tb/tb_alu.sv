// tb_alu: checks all four ALU functions (S=00 add, 01 sub, 10 AND, 11 OR),
// the zero flag and the add/subtract overflow against reference arithmetic.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, r;
  alu_op_e s;
  logic overflow, zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .s(s), .r(r), .overflow(overflow), .zero(zero));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic [1:0] op);
    logic [31:0] exp_r;
    longint sr;
    a = x; b = y; s = alu_op_e'(op);
    #1;
    case (op)
      2'b00: exp_r = x + y;
      2'b01: exp_r = x - y;
      2'b10: exp_r = x & y;
      default: exp_r = x | y;
    endcase
    checks++;
    if (r !== exp_r) begin failures++; $display("FAIL r op=%b %h %h -> %h", op, x, y, r); end
    checks++;
    if (zero !== (exp_r == 0)) begin failures++; $display("FAIL zero"); end
    if (op[1] == 1'b0) begin
      sr = op[0] ? longint'($signed(x)) - longint'($signed(y)) : longint'($signed(x)) + longint'($signed(y));
      checks++;
      if (overflow !== ((sr > 64'sd2147483647) || (sr < -64'sd2147483648))) begin
        failures++; $display("FAIL overflow op=%b %h %h", op, x, y);
      end
    end
  endtask

  initial begin
    for (int op = 0; op < 4; op++) begin
      check(32'h7FFF_FFFF, 32'h1, 2'(op));
      check(32'h8000_0000, 32'h1, 2'(op));
      check(32'hF0F0_F0F0, 32'h0FF0_0FF0, 2'(op));
      check(32'h5, 32'h5, 2'(op));
      check(32'h0, 32'h0, 2'(op));
      for (int k = 0; k < 500; k++) check($urandom, $urandom, 2'(op));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
