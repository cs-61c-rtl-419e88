// control: main decoder of the MIPS-lite single-cycle processor.
//
// Reads the opcode, and for R-type instructions the funct field, and sets the
// datapath's control points (see mips_pkg::ctrl_t):
//   ADDU/ADD rd = rs + rt   reg_dst, reg_write, ALU add
//   SUBU     rd = rs - rt   reg_dst, reg_write, ALU subtract
//   ORI      rt = rs | zext(imm)  alu_src, zero extension, ALU OR
//   LW       rt = MEM[rs + sext(imm)]  alu_src, mem_to_reg, reg_write
//   SW       MEM[rs + sext(imm)] = rt  alu_src, mem_write
//   SLTI     rt = (rs < sext(imm)) signed   alu_src, ALU subtract, set_less
//   BEQ      branch when rs - rt == 0  ALU subtract, branch
// Anything else writes nothing and raises illegal (a no-op that advances the
// PC); the notes describe no exceptions, so that is this design's choice. ADD
// is decoded like ADDU: the notes' add walkthrough only adds, and overflow
// does not trap. Purely combinational.
module control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{reg_dst: 1'b0, alu_src: 1'b0, ext_sign: 1'b1, alu_op: ALU_ADD,
             mem_write: 1'b0, mem_to_reg: 1'b0, reg_write: 1'b0,
             branch: 1'b0, set_less: 1'b0, illegal: 1'b0};
    unique case (op)
      OP_RTYPE: begin
        ctrl.reg_dst = 1'b1;
        if (funct == FN_ADDU || funct == FN_ADD) begin
          ctrl.reg_write = 1'b1;
          ctrl.alu_op    = ALU_ADD;
        end else if (funct == FN_SUBU) begin
          ctrl.reg_write = 1'b1;
          ctrl.alu_op    = ALU_SUB;
        end else begin
          ctrl.illegal = 1'b1;
        end
      end
      OP_ORI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.ext_sign  = 1'b0;
        ctrl.alu_op    = ALU_OR;
        ctrl.reg_write = 1'b1;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_write  = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = 1'b1;
      end
      OP_SLTI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.alu_op    = ALU_SUB;
        ctrl.reg_write = 1'b1;
        ctrl.set_less  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.alu_op = ALU_SUB;
        ctrl.branch = 1'b1;
      end
      default: ctrl.illegal = 1'b1;
    endcase
  end
endmodule
