// tb_walkthroughs: runs the classic single-cycle datapath walkthrough
// instructions one per clock and checks, inside the cycle each one executes,
// the values on the datapath: register-file read data, ALU result, data
// memory address/data, and afterwards the register or memory written.
//   add  $r3,$r1,$r2    r3 = r1 + r2
//   slti $r3,$r1,17     r3 = (r1 < 17)
//   sw   $r3,16($r1)    Mem[r1+16] = r3
//   lw   $r3,16($r1)    r3 = Mem[r1+16]
//   lw   $t0,40($t1)    t0 = Mem[t1+40]   ($t0 = r8, $t1 = r9)
// They run in the order add, sw, slti, lw, so that the load reads back the
// word the store wrote; a second sw supplies the data for the last lw.
// The program is run twice, with r1 below and above 17, so both slti results
// are seen. Every instruction must take exactly one clock.
module tb_walkthroughs;
  logic        clk = 0, rst_n = 0;
  logic        imem_we = 0;
  logic [9:0]  imem_waddr = 0;
  logic [31:0] imem_wdata = 0;
  logic [31:0] pc, instr;
  logic        alu_overflow, illegal;
  int checks = 0, failures = 0;

  mips_lite_cpu dut (
    .clk(clk), .rst_n(rst_n),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc(pc), .instr(instr), .alu_overflow(alu_overflow), .illegal(illegal)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] r_ins(logic [5:0] funct, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h0, funct};
  endfunction
  function automatic logic [31:0] i_ins(logic [5:0] op, int rt, int rs, logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  logic [31:0] prog [12];

  task automatic run(logic [31:0] r1, logic [31:0] r2, logic [31:0] t1);
    logic [31:0] r3, exp_mem;
    int n = 0;
    // set up r1, r2, t1 with ori (values fit in 16 bits), then the walkthrough
    prog[n++] = i_ins(6'h0D, 1, 0, r1[15:0]);
    prog[n++] = i_ins(6'h0D, 2, 0, r2[15:0]);
    prog[n++] = i_ins(6'h0D, 9, 0, t1[15:0]);
    prog[n++] = r_ins(6'h20, 3, 1, 2);          // add  $r3,$r1,$r2
    prog[n++] = i_ins(6'h2B, 3, 1, 16'd16);     // sw   $r3,16($r1)  (stores r1+r2)
    prog[n++] = i_ins(6'h0A, 3, 1, 16'd17);     // slti $r3,$r1,17
    prog[n++] = i_ins(6'h23, 3, 1, 16'd16);     // lw   $r3,16($r1)
    prog[n++] = i_ins(6'h2B, 2, 9, 16'd40);     // sw   $r2,40($t1)  (data for the next lw)
    prog[n++] = i_ins(6'h23, 8, 9, 16'd40);     // lw   $t0,40($t1)
    prog[n++] = i_ins(6'h04, 0, 0, 16'hFFFF);   // spin
    rst_n = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 10'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);                  // the three ori
    // add: stage 2 reads reg[1], reg[2]; stage 3 computes reg[1]+reg[2]
    chk("add pc", pc, 32'd12);
    chk("add rs data", dut.rs_val, r1);
    chk("add rt data", dut.rt_val, r2);
    chk("add ALU", dut.alu_r, r1 + r2);
    chk("add memory idle", 32'(dut.u_dmem.we), 0);
    @(negedge clk);
    r3 = r1 + r2;
    chk("add writes r3", dut.u_rf.regs[3], r3);
    // sw: address reg[1]+16, data reg[3]
    chk("sw ALU address", dut.alu_r, r1 + 16);
    chk("sw store data", dut.u_dmem.wdata, r3);
    chk("sw memory write", 32'(dut.u_dmem.we), 1);
    chk("sw no register write", 32'(dut.u_rf.we), 0);
    @(negedge clk);
    exp_mem = r3;
    chk("sw memory word", dut.u_dmem.mem[(r1 + 16) >> 2], exp_mem);
    // slti: compare reg[1] with 17
    chk("slti rs data", dut.rs_val, r1);
    chk("slti immediate", dut.alu_b, 32'd17);
    @(negedge clk);
    chk("slti writes r3", dut.u_rf.regs[3], ($signed(r1) < 17) ? 32'd1 : 32'd0);
    // lw: address reg[1]+16, loads what sw stored
    chk("lw ALU address", dut.alu_r, r1 + 16);
    chk("lw read data", dut.mem_rdata, exp_mem);
    @(negedge clk);
    chk("lw writes r3", dut.u_rf.regs[3], exp_mem);
    @(negedge clk);                             // sw $r2,40($t1)
    chk("lw $t0 address", dut.alu_r, t1 + 40);
    @(negedge clk);
    chk("lw $t0,40($t1)", dut.u_rf.regs[8], r2);
    chk("one instruction per clock", pc, 32'd36);
  endtask

  initial begin
    run(32'd5, 32'd1000, 32'd200);      // r1 < 17
    run(32'd400, 32'd33, 32'd1024);     // r1 >= 17
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
