// half_adder: one-bit half adder, the least-significant-bit case of the
// adder where there is no carry in.
//
// s = a XOR b and c = a AND b, the two columns of the two-input addition
// truth table. Purely combinational. In this design a chain of half adders
// forms the PC incrementer in pc_unit.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b;
    c = a & b;
  end
endmodule
