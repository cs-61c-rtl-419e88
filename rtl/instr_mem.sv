// instr_mem: instruction memory of the single-cycle datapath.
//
// An array of WORDS 32-bit words read combinationally at the byte address
// given by the PC (bits [AW+1:2]; the two low bits are ignored, and
// addresses beyond the array wrap). Fetch therefore completes within the
// same long clock cycle as the rest of the instruction. A synchronous write
// port, word addressed, loads the program before reset is released. The
// memory size and the load port are this design's choices; the notes only
// show an "instruction memory" box addressed by the PC.
module instr_mem #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  // program load port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  // fetch port
  input  logic [31:0]   addr,
  output logic [31:0]   instr
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign instr = mem[addr[AW+1:2]];
endmodule
