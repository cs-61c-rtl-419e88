// alu: the simple four-function ALU of the MIPS datapath.
//
// S=00 gives R=A+B, S=01 R=A-B, S=10 R=A AND B, S=11 R=A OR B. As in the
// notes' block diagram, S0 drives the add/subtract unit's SUB input and
// also picks OR over AND in a first 2:1 mux; S1 then picks the logic result
// over the arithmetic one. The overflow output is the add/subtract unit's
// signed overflow and is meaningful only when S1=0. The zero output
// (R == 0) is this design's addition, used by BEQ, which compares by
// subtracting. Purely combinational.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  alu_op_e      s,
  output logic [N-1:0] r,
  output logic         overflow,
  output logic         zero
);
  logic [N-1:0] sum;
  logic [N-1:0] logic_r;
  logic         unused_cout;

  adder_subtractor #(.N(N)) u_addsub (
    .a        (a),
    .b        (b),
    .sub      (s[0]),
    .s        (sum),
    .carry_out(unused_cout),
    .overflow (overflow)
  );

  always_comb begin
    logic_r = s[0] ? (a | b) : (a & b);
    r       = s[1] ? logic_r : sum;
    zero    = (r == '0);
  end
endmodule
