// data_mem: data memory of the single-cycle datapath.
//
// WORDS 32-bit words, addressed by the byte address the ALU computes
// (R[rs] + sign_ext(Imm16)); bits [AW+1:2] select the word, the two low
// bits are ignored and addresses beyond the array wrap. The read is
// combinational, so a load's data reaches the register write in the same
// cycle; a store writes on the rising clock edge when we is high. Word
// accesses only, as LW and SW need. Size and timing are this design's
// choices; the notes give only the "Data memory" box and what LW and SW do.
module data_mem #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];
endmodule
