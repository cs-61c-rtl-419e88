// mips_lite_cpu: single-cycle MIPS-lite processor (ADDU, SUBU, ORI, LW, SW,
// BEQ, plus ADD decoded as ADDU and SLTI).
//
// Each instruction runs through the five stages in one long clock cycle:
//   1. fetch   instr_mem[PC]; pc_unit forms PC+4
//   2. decode  control decodes op/funct; reg_file reads R[rs], R[rt];
//              imm_ext extends Imm16
//   3. execute alu computes R[rs] op (R[rt] or the immediate)
//   4. memory  data_mem is read (LW) or written (SW) at the ALU result
//   5. write   R[rd] or R[rt] gets the ALU result, the loaded word or,
//              for SLTI, the less-than bit;
//              PC gets PC+4 or, for a taken BEQ, PC+4+{sext(Imm16),00}
// SLTI reuses the four-function ALU: it subtracts the sign-extended
// immediate, and rs < imm (signed) is the sign of the difference XOR the
// subtractor's overflow; that bit, zero-extended, is written back.
// The block structure (PC, +4, next-PC mux, instruction memory, registers,
// ALU, data memory, write-back path) and the register transfers follow the
// notes; memory sizes, the program-load port, reset and the opcode values are
// this design's choices.
//
// Interface: hold rst_n low while loading the program through imem_we /
// imem_waddr / imem_wdata (one word per clock); after rst_n rises one
// instruction completes per clock, starting at address 0. pc and instr show
// the instruction now executing; alu_overflow is the ALU's signed overflow
// for it (ADDU/SUBU ignore it, as the unsigned MIPS instructions do);
// illegal flags an instruction outside the subset, which is executed as a
// no-op.
module mips_lite_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  localparam int unsigned IAW       = $clog2(IMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           imem_we,
  input  logic [IAW-1:0] imem_waddr,
  input  logic [31:0]    imem_wdata,
  output logic [31:0]    pc,
  output logic [31:0]    instr,
  output logic           alu_overflow,
  output logic           illegal
);
  rtype_t      f_r;
  itype_t      f_i;
  ctrl_t       ctrl;
  logic [31:0] pc_plus4;
  logic [31:0] imm32;
  logic [31:0] rs_val, rt_val;
  logic [31:0] alu_b, alu_r;
  logic        alu_zero;
  logic        less;
  logic [31:0] mem_rdata;
  logic [4:0]  wreg;
  logic [31:0] wdata;
  logic        take_branch;

  // 1. instruction fetch
  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk  (clk),
    .we   (imem_we),
    .waddr(imem_waddr),
    .wdata(imem_wdata),
    .addr (pc),
    .instr(instr)
  );

  assign f_r = rtype_t'(instr);
  assign f_i = itype_t'(instr);

  // 2. decode and register read
  control u_ctrl (
    .op   (f_r.op),
    .funct(f_r.funct),
    .ctrl (ctrl)
  );

  imm_ext u_ext (
    .imm16   (f_i.imm),
    .sign_ext(ctrl.ext_sign),
    .imm32   (imm32)
  );

  reg_file u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .raddr1(f_r.rs),
    .rdata1(rs_val),
    .raddr2(f_r.rt),
    .rdata2(rt_val),
    .we    (ctrl.reg_write),
    .waddr (wreg),
    .wdata (wdata)
  );

  // 3. execute
  assign alu_b = ctrl.alu_src ? imm32 : rt_val;

  alu u_alu (
    .a       (rs_val),
    .b       (alu_b),
    .s       (ctrl.alu_op),
    .r       (alu_r),
    .overflow(alu_overflow),
    .zero    (alu_zero)
  );

  // 4. memory access
  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk  (clk),
    .addr (alu_r),
    .we   (ctrl.mem_write & rst_n),
    .wdata(rt_val),
    .rdata(mem_rdata)
  );

  // 5. register write and next PC
  assign wreg  = ctrl.reg_dst ? f_r.rd : f_r.rt;
  assign less  = alu_r[31] ^ alu_overflow;
  always_comb begin
    if (ctrl.mem_to_reg)    wdata = mem_rdata;
    else if (ctrl.set_less) wdata = {31'b0, less};
    else                    wdata = alu_r;
  end

  // BEQ is decoded with sign extension, so imm32 is sext(Imm16) here
  assign take_branch = ctrl.branch & alu_zero;

  pc_unit u_pc (
    .clk        (clk),
    .rst_n      (rst_n),
    .take_branch(take_branch),
    .imm_sext   (imm32),
    .pc         (pc),
    .pc_plus4   (pc_plus4)
  );

  assign illegal = ctrl.illegal;
endmodule
