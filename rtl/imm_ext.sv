// imm_ext: 16-to-32-bit immediate extender.
//
// With sign_ext high the 16-bit immediate is sign-extended (bit 15 copied
// into bits 31..16), as LW, SW and BEQ use it; with sign_ext low it is
// zero-extended, as ORI uses it. Purely combinational.
module imm_ext (
  input  logic [15:0] imm16,
  input  logic        sign_ext,
  output logic [31:0] imm32
);
  assign imm32 = {{16{sign_ext & imm16[15]}}, imm16};
endmodule
