// mips_pkg: types and constants shared by the MIPS-lite single-cycle datapath.
//
// The instruction formats follow the three 32-bit MIPS layouts: R-type
// {op, rs, rt, rd, shamt, funct} with 6/5/5/5/5/6 bits and I-type
// {op, rs, rt, imm16} with 6/5/5/16 bits, op in bits 31..26. The ALU select
// codes are the four functions of the simple ALU (00 add, 01 subtract,
// 10 AND, 11 OR). The numeric opcode and funct values are the standard MIPS
// encodings; they are this design's choice, taken from the MIPS architecture
// rather than from the field layout itself.
package mips_pkg;

  // Primary opcodes (bits 31..26)
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_SLTI  = 6'h0A,
    OP_ORI   = 6'h0D,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // funct field values of the R-type instructions handled here (bits 5..0)
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUBU = 6'h23;

  // ALU function select S[1:0]
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_AND = 2'b10,
    ALU_OR  = 2'b11
  } alu_op_e;

  // R-type view of an instruction word
  typedef struct packed {
    logic [5:0] op;
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] rd;
    logic [4:0] shamt;
    logic [5:0] funct;
  } rtype_t;

  // I-type view of an instruction word
  typedef struct packed {
    logic [5:0]  op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [15:0] imm;
  } itype_t;

  // Control points of the single-cycle datapath
  typedef struct packed {
    logic    reg_dst;    // 1: write register is rd (R-type), 0: rt
    logic    alu_src;    // 1: ALU B input is the extended immediate, 0: R[rt]
    logic    ext_sign;   // 1: sign-extend imm16, 0: zero-extend
    alu_op_e alu_op;     // ALU function
    logic    mem_write;  // store R[rt] to data memory
    logic    mem_to_reg; // 1: register write data is the memory read data
    logic    reg_write;  // write the register file
    logic    branch;     // BEQ: take the branch when the ALU result is zero
    logic    set_less;   // SLTI: write 1 if rs < imm (signed), else 0
    logic    illegal;    // opcode/funct not in the subset; behaves as a no-op
  } ctrl_t;

endpackage
