// tb_pc_unit: checks reset, PC+4 sequencing (one word per clock) and branch
// targets PC+4+(offset<<2) for forward and backward offsets.
module tb_pc_unit;
  logic clk = 0, rst_n = 0, take_branch = 0;
  logic [31:0] imm_sext = 0, pc, pc_plus4;
  logic [31:0] model_pc;
  int checks = 0, failures = 0, cycles = 0;

  pc_unit dut (.clk(clk), .rst_n(rst_n), .take_branch(take_branch),
               .imm_sext(imm_sext), .pc(pc), .pc_plus4(pc_plus4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    checks++;
    if (pc !== 32'h0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst_n = 1;
    model_pc = 0;
    for (int k = 0; k < 400; k++) begin
      take_branch = (k % 3 == 0) ? 1'($urandom) : 1'b0;
      imm_sext = 32'($signed(16'($urandom)));
      #1;
      checks++;
      if (pc_plus4 !== model_pc + 4) begin failures++; $display("FAIL pc_plus4"); end
      @(negedge clk);
      model_pc = take_branch ? model_pc + 4 + (imm_sext << 2) : model_pc + 4;
      checks++;
      if (pc !== model_pc) begin failures++; $display("FAIL pc=%h exp %h", pc, model_pc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
