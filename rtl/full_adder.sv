// full_adder: one-bit full adder.
//
// Sum is the three-input XOR of a, b and the carry in; carry out is the
// majority of the three, a&b | a&cin | b&cin, built as three AND terms into
// one OR, exactly as in the one-bit adder of the datapath notes. Purely
// combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
