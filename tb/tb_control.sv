// tb_control: checks the control points for every instruction of the
// subset and the no-op behaviour of unknown opcodes and funct codes. Fields
// that steer nothing for an instruction (e.g. reg_dst of a store) are
// don't-cares and are not compared.
module tb_control;
  import mips_pkg::*;
  logic [5:0] op, funct;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control dut (.op(op), .funct(funct), .ctrl(ctrl));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string name, input string field, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s %s got %0d exp %0d", name, field, got, exp); end
  endtask

  // writes: 0 none, 1 register, 2 memory, 3 branch
  task automatic check(input logic [5:0] o, input logic [5:0] f, input string name,
                       input int kind, input int dst_rd, input int src_imm, input int sext,
                       input int aluop, input int from_mem, input int ill);
    op = o; funct = f;
    #1;
    expect_eq(name, "reg_write", ctrl.reg_write, kind == 1);
    expect_eq(name, "mem_write", ctrl.mem_write, kind == 2);
    expect_eq(name, "branch",    ctrl.branch,    kind == 3);
    expect_eq(name, "illegal",   ctrl.illegal,   ill);
    if (kind != 0) begin
      expect_eq(name, "alu_op", int'(ctrl.alu_op), aluop);
      if (kind != 3) expect_eq(name, "alu_src", ctrl.alu_src, src_imm);
      if (src_imm || kind == 3) expect_eq(name, "ext_sign", ctrl.ext_sign, sext);
    end
    if (kind == 1) begin
      expect_eq(name, "reg_dst", ctrl.reg_dst, dst_rd);
      expect_eq(name, "mem_to_reg", ctrl.mem_to_reg, from_mem);
    end
  endtask

  initial begin
    //    op        funct    name    kind rd imm sx aluop        mem ill
    check(6'h00, 6'h21, "addu",  1,  1, 0, 0, int'(ALU_ADD), 0, 0);
    check(6'h00, 6'h20, "add",   1,  1, 0, 0, int'(ALU_ADD), 0, 0);
    check(6'h00, 6'h23, "subu",  1,  1, 0, 0, int'(ALU_SUB), 0, 0);
    check(6'h0D, 6'h3F, "ori",   1,  0, 1, 0, int'(ALU_OR),  0, 0);
    check(6'h23, 6'h00, "lw",    1,  0, 1, 1, int'(ALU_ADD), 1, 0);
    check(6'h2B, 6'h15, "sw",    2,  0, 1, 1, int'(ALU_ADD), 0, 0);
    check(6'h04, 6'h00, "beq",   3,  0, 0, 1, int'(ALU_SUB), 0, 0);
    check(6'h00, 6'h22, "sub(unsupported)", 0, 0, 0, 0, 0, 0, 1);
    check(6'h00, 6'h00, "sll(unsupported)", 0, 0, 0, 0, 0, 0, 1);
    check(6'h0A, 6'h07, "slti",  1,  0, 1, 1, int'(ALU_SUB), 0, 0);
    checks++;
    if (ctrl.set_less !== 1'b1) begin failures++; $display("FAIL slti set_less"); end
    check(6'h00, 6'h21, "addu", 1, 1, 0, 0, int'(ALU_ADD), 0, 0);
    checks++;
    if (ctrl.set_less !== 1'b0) begin failures++; $display("FAIL addu set_less"); end
    check(6'h02, 6'h00, "j(unsupported)", 0, 0, 0, 0, 0, 0, 1);
    for (int k = 0; k < 64; k++) begin
      if (!(k inside {6'h00, 6'h04, 6'h0A, 6'h0D, 6'h23, 6'h2B}))
        check(6'(k), 6'($urandom), "other", 0, 0, 0, 0, 0, 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
