// reg_file: the 32 x 32-bit MIPS integer register file.
//
// Two combinational read ports (rs and rt, read in the decode stage) and one
// write port (rd or rt, written at the end of the cycle in the register-write
// stage). A write happens on the rising clock edge when we is high; a read
// of the register being written in the same cycle returns the old value,
// which is what a single-cycle processor needs. Register 0 always reads
// zero and ignores writes, and a synchronous active-low reset clears all
// registers; both follow the MIPS architecture and are this design's
// choices, the notes only name "registers" with rs, rt and rd inputs.
module reg_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned XLEN  = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AW-1:0]   raddr1,
  output logic [XLEN-1:0] rdata1,
  input  logic [AW-1:0]   raddr2,
  output logic [XLEN-1:0] rdata2,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  logic [XLEN-1:0] wdata
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];
  assign rdata2 = (raddr2 == '0) ? '0 : regs[raddr2];
endmodule
