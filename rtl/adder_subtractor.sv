// adder_subtractor: N-bit ripple-carry adder/subtractor.
//
// N full adders are chained LSB to MSB through their carries. Each b input
// passes through an XOR with SUB, a conditional inverter, and SUB is also the
// carry into bit 0, so SUB=1 computes a + ~b + 1 = a - b ("subtract is invert
// and add 1"). Signed (two's complement) overflow is c_n XOR c_(n-1), the
// carries out of and into the most significant bit; carry_out is c_n.
// Purely combinational; the structure follows the notes, the width is a
// parameter with the datapath's 32 as default.
module adder_subtractor #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  output logic [N-1:0] s,
  output logic         carry_out,
  output logic         overflow
);
  logic [N:0]   c;
  logic [N-1:0] b_x;

  assign c[0] = sub;
  assign b_x  = b ^ {N{sub}};

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b_x[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign carry_out = c[N];
  assign overflow  = c[N] ^ c[N-1];
endmodule
