// tb_reg_file: random writes and dual reads against a reference model;
// checks reset to zero, register 0 stuck at zero, and that a read in the
// cycle of a write returns the old value.
module tb_reg_file;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] raddr1 = 0, raddr2 = 0, waddr = 0;
  logic [31:0] rdata1, rdata2, wdata = 0;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  reg_file dut (.clk(clk), .rst_n(rst_n), .raddr1(raddr1), .rdata1(rdata1),
                .raddr2(raddr2), .rdata2(rdata2), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) model[i] = 0;
    for (int i = 0; i < 32; i++) begin
      raddr1 = 5'(i); raddr2 = 5'(31 - i); #1;
      checks++;
      if (rdata1 !== 0 || rdata2 !== 0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 5'($urandom); wdata = $urandom;
      raddr1 = (k % 4 == 0) ? waddr : 5'($urandom);
      raddr2 = 5'($urandom);
      #1;
      checks++;
      if (rdata1 !== model[raddr1]) begin failures++; $display("FAIL rd1 r%0d %h exp %h", raddr1, rdata1, model[raddr1]); end
      checks++;
      if (rdata2 !== model[raddr2]) begin failures++; $display("FAIL rd2 r%0d", raddr2); end
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
