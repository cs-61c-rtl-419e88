// pc_unit: program counter and next-PC logic of the single-cycle datapath.
//
// The PC register holds the byte address of the current instruction. Every
// cycle it is loaded with either PC+4 (byte addressing, one 32-bit word
// further) or, for a taken BEQ, the branch target
// PC + 4 + {sign_ext(Imm16), 2'b00}. The +4 incrementer, the branch adder and
// the two-way mux in front of the PC follow the datapath drawing and the
// register transfers. The +4 is built as a ripple chain of half adders over
// PC[31:2] with a carry of 1 into bit 2 (PC[1:0] pass through), which is this
// design's choice, as is the synchronous active-low reset to RESET_PC.
//
// Timing: pc changes on the rising clock edge; pc_plus4 and the target are
// combinational from pc, imm_sext and take_branch.
module pc_unit #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        take_branch, // taken BEQ this cycle
  input  logic [31:0] imm_sext,    // sign-extended Imm16 of the current instruction
  output logic [31:0] pc,
  output logic [31:0] pc_plus4
);
  logic [31:0] branch_target;
  logic [31:0] pc_next;
  logic [32:2] inc_c;      // carries of the incrementer; inc_c[2] is the +1

  // PC + 4: add 1 at bit 2 through a chain of half adders
  assign inc_c[2]      = 1'b1;
  assign pc_plus4[1:0] = pc[1:0];
  for (genvar i = 2; i < 32; i++) begin : g_inc
    half_adder u_ha (
      .a(pc[i]),
      .b(inc_c[i]),
      .s(pc_plus4[i]),
      .c(inc_c[i+1])
    );
  end

  always_comb begin
    branch_target = pc_plus4 + {imm_sext[29:0], 2'b00};
    pc_next       = take_branch ? branch_target : pc_plus4;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) pc <= RESET_PC;
    else        pc <= pc_next;
  end
endmodule
