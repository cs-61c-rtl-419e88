// tb_instr_mem: loads words through the write port and reads them back
// through the byte-addressed fetch port (low two address bits ignored).
module tb_instr_mem;
  localparam int WORDS = 256;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0;
  logic [31:0] wdata = 0, addr = 0, instr;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  instr_mem #(.WORDS(WORDS)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                  .addr(addr), .instr(instr));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 1000; k++) begin
      int w;
      w = $urandom_range(WORDS - 1);
      addr = {22'($urandom), 8'(w), 2'($urandom)};
      #1;
      checks++;
      if (instr !== model[w]) begin failures++; $display("FAIL addr=%h got %h exp %h", addr, instr, model[w]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
