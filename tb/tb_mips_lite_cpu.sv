// tb_mips_lite_cpu: end-to-end test of the single-cycle MIPS-lite processor
// at its default sizes.
//
// Part 1 runs a short hand-written program (the add / slti / sw / lw examples
// of the datapath walkthrough plus SUBU, ORI and both BEQ outcomes) and compares the
// final registers and memory with values worked out by hand.
// Part 2 fills the whole instruction memory with random instructions of the
// subset (and a few outside it) and runs them against an instruction-set
// model kept in this testbench, comparing PC, all registers and the touched
// memory word after every clock: one instruction must complete per cycle.
// Each mechanism (every instruction, taken and untaken branch, ALU overflow,
// a write aimed at register 0, an illegal instruction) is counted, and one
// that never happened counts as a failure.
module tb_mips_lite_cpu;
  import mips_pkg::*;

  localparam int IMEM_WORDS = 1024;
  localparam int DMEM_WORDS = 1024;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- encoders
  function automatic logic [31:0] r_ins(logic [5:0] funct, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h0, funct};
  endfunction
  function automatic logic [31:0] i_ins(logic [5:0] op, int rt, int rs, logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction

  // --------------------------------------------------------------- model
  logic [31:0] m_pc;
  logic [31:0] m_reg [32];
  logic [31:0] m_mem [DMEM_WORDS];
  logic [31:0] m_imem [IMEM_WORDS];

  // mechanism counters
  int n_addu, n_add, n_subu, n_ori, n_slti, n_slti_1, n_lw, n_sw, n_beq_t, n_beq_nt, n_ovf, n_r0, n_ill;

  // Executes one instruction in the model; returns the data-memory word index
  // it stored to, or -1.
  function automatic int model_step();
    logic [31:0] ins, a, b, addr, res;
    logic [5:0]  op, fn;
    int rs, rt, rd, widx;
    logic [31:0] sx, zx;
    longint sr;
    widx = -1;
    ins = m_imem[m_pc[11:2]];
    op = ins[31:26]; rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
    fn = ins[5:0];
    sx = {{16{ins[15]}}, ins[15:0]};
    zx = {16'h0, ins[15:0]};
    a = m_reg[rs]; b = m_reg[rt];
    res = 0;
    if (op == 6'h00 && (fn == 6'h21 || fn == 6'h20 || fn == 6'h23)) begin
      res = (fn == 6'h23) ? a - b : a + b;
      sr = (fn == 6'h23) ? longint'($signed(a)) - longint'($signed(b))
                         : longint'($signed(a)) + longint'($signed(b));
      if (sr > 64'sd2147483647 || sr < -64'sd2147483648) n_ovf++;
      if (fn == 6'h21) n_addu++; else if (fn == 6'h20) n_add++; else n_subu++;
      if (rd == 0) n_r0++; else m_reg[rd] = res;
      m_pc = m_pc + 4;
    end else if (op == 6'h0D) begin
      n_ori++;
      if (rt == 0) n_r0++; else m_reg[rt] = a | zx;
      m_pc = m_pc + 4;
    end else if (op == 6'h0A) begin
      n_slti++;
      if ($signed(a) < $signed(sx)) n_slti_1++;
      if (rt == 0) n_r0++; else m_reg[rt] = ($signed(a) < $signed(sx)) ? 32'd1 : 32'd0;
      m_pc = m_pc + 4;
    end else if (op == 6'h23) begin
      n_lw++;
      addr = a + sx;
      if (rt == 0) n_r0++; else m_reg[rt] = m_mem[addr[11:2]];
      m_pc = m_pc + 4;
    end else if (op == 6'h2B) begin
      n_sw++;
      addr = a + sx;
      widx = int'(addr[11:2]);
      m_mem[widx] = b;
      m_pc = m_pc + 4;
    end else if (op == 6'h04) begin
      if (a == b) begin n_beq_t++; m_pc = m_pc + 4 + (sx << 2); end
      else begin n_beq_nt++; m_pc = m_pc + 4; end
    end else begin
      n_ill++;
      m_pc = m_pc + 4;
    end
    return widx;
  endfunction

  task automatic load_program();
    rst_n = 0;
    for (int i = 0; i < IMEM_WORDS; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 10'(i); imem_wdata = m_imem[i];
    end
    @(negedge clk);
    imem_we = 0;
    @(negedge clk);
  endtask

  task automatic expect_reg(int r, logic [31:0] v, string what);
    checks++;
    if (dut.u_rf.regs[r] !== v) begin
      failures++; $display("FAIL %s: r%0d = %h, expected %h", what, r, dut.u_rf.regs[r], v);
    end
  endtask

  // ------------------------------------------------------ part 1: directed
  task automatic directed();
    int n;
    for (int i = 0; i < IMEM_WORDS; i++) m_imem[i] = i_ins(6'h04, 0, 0, 16'hFFFF); // beq r0,r0,-1: halt loop
    n = 0;
    m_imem[n++] = i_ins(6'h0D, 1, 0, 16'd100);        // ori  r1,r0,100
    m_imem[n++] = i_ins(6'h0D, 2, 0, 16'd23);         // ori  r2,r0,23
    m_imem[n++] = r_ins(6'h20, 3, 1, 2);              // add  r3,r1,r2      r3=123
    m_imem[n++] = i_ins(6'h2B, 3, 1, 16'd16);         // sw   r3,16(r1)     M[116]=123
    m_imem[n++] = i_ins(6'h23, 4, 1, 16'd16);         // lw   r4,16(r1)     r4=123
    m_imem[n++] = r_ins(6'h23, 5, 4, 2);              // subu r5,r4,r2      r5=100
    m_imem[n++] = i_ins(6'h04, 5, 1, 16'd1);          // beq  r1,r5,+1      taken
    m_imem[n++] = i_ins(6'h0D, 6, 0, 16'hDEAD);       // ori  r6 (skipped)
    m_imem[n++] = i_ins(6'h04, 2, 1, 16'd1);          // beq  r1,r2,+1      not taken
    m_imem[n++] = i_ins(6'h0D, 7, 0, 16'h8001);       // ori  r7,r0,0x8001  zero-extended
    m_imem[n++] = i_ins(6'h23, 8, 7, 16'hFFFF);       // lw   r8,-1(r7)     r8=M[0x8000]
    m_imem[n++] = i_ins(6'h2B, 1, 0, 16'hFFFC);       // sw   r1,-4(r0)     M[0xFFFFFFFC]=100
    m_imem[n++] = r_ins(6'h21, 9, 2, 1);              // addu r9,r2,r1      r9=123
    m_imem[n++] = r_ins(6'h21, 0, 2, 1);              // addu r0,... ignored
    m_imem[n++] = i_ins(6'h23, 10, 0, 16'hFFFC);      // lw   r10,-4(r0)    r10=100
    m_imem[n++] = r_ins(6'h23, 11, 2, 1);             // subu r11,r2,r1     r11=-77
    m_imem[n++] = i_ins(6'h0A, 12, 1, 16'd17);        // slti r12,r1,17     100<17: 0
    m_imem[n++] = i_ins(6'h0A, 13, 2, 16'd100);       // slti r13,r2,100    23<100: 1
    m_imem[n++] = i_ins(6'h0A, 14, 11, 16'hFFFF);     // slti r14,r11,-1    -77<-1: 1
    load_program();
    // known contents for the word read by "lw r8": M[0x8000 & 0xFFF] = M[0]
    dut.u_dmem.mem[0] = 32'hCAFE_F00D;
    rst_n = 1;
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
    end
    checks++;
    if (pc !== 32'(4 * n)) begin failures++; $display("FAIL directed: pc=%h after %0d cycles", pc, n); end
    expect_reg(1, 32'd100, "ori");
    expect_reg(2, 32'd23, "ori");
    expect_reg(3, 32'd123, "add");
    expect_reg(4, 32'd123, "lw after sw");
    expect_reg(5, 32'd100, "subu");
    expect_reg(6, 32'd0, "branch skipped ori");
    expect_reg(7, 32'h0000_8001, "ori zero extension");
    expect_reg(8, 32'hCAFE_F00D, "lw negative offset");
    expect_reg(9, 32'd123, "addu");
    expect_reg(0, 32'd0, "register 0");
    expect_reg(10, 32'd100, "sw/lw negative address");
    expect_reg(11, 32'hFFFF_FFB3, "subu negative");
    expect_reg(12, 32'd0, "slti false");
    expect_reg(13, 32'd1, "slti true");
    expect_reg(14, 32'd1, "slti signed");
    checks++;
    if (dut.u_dmem.mem[29] !== 32'd123) begin failures++; $display("FAIL sw M[116]"); end
    // halt loop: pc stays put
    repeat (3) @(negedge clk);
    checks++;
    if (pc !== 32'(4 * n)) begin failures++; $display("FAIL halt loop pc=%h", pc); end
  endtask

  // ------------------------------------------------------ part 2: random
  function automatic int rreg();
    // mostly a few registers, so that BEQ operands are often equal
    return ($urandom_range(3) == 0) ? int'($urandom_range(31)) : int'($urandom_range(5));
  endfunction

  // mostly short forward branches; a few backward ones (never a self-loop)
  function automatic logic [15:0] branch_offset();
    if ($urandom_range(9) == 0) return 16'(-int'($urandom_range(6, 2)));
    return 16'($urandom_range(6));
  endfunction

  function automatic logic [31:0] rand_ins();
    int k;
    k = $urandom_range(99);
    if (k < 14) return r_ins(6'h21, rreg(), rreg(), rreg());
    if (k < 20) return r_ins(6'h20, rreg(), rreg(), rreg());
    if (k < 34) return r_ins(6'h23, rreg(), rreg(), rreg());
    if (k < 44) return i_ins(6'h0A, rreg(), rreg(), 16'($urandom));
    if (k < 52) return i_ins(6'h0D, rreg(), rreg(), ($urandom_range(1) == 0) ? 16'($urandom_range(3)) : 16'($urandom));
    if (k < 66) return i_ins(6'h23, rreg(), rreg(), 16'($urandom));
    if (k < 80) return i_ins(6'h2B, rreg(), rreg(), 16'($urandom));
    if (k < 97) return i_ins(6'h04, rreg(), rreg(), branch_offset());
    return $urandom;  // mostly outside the subset
  endfunction

  task automatic random_run(int cycles);
    int widx;
    for (int i = 0; i < IMEM_WORDS; i++) m_imem[i] = rand_ins();
    load_program();
    @(negedge clk);
    m_pc = 0;
    for (int i = 0; i < 32; i++) m_reg[i] = 0;
    for (int i = 0; i < DMEM_WORDS; i++) m_mem[i] = dut.u_dmem.mem[i];
    rst_n = 1;
    for (int c = 0; c < cycles; c++) begin
      logic [31:0] cur_pc;
      cur_pc = m_pc;
      #1;
      checks++;
      if (pc !== cur_pc) begin failures++; $display("FAIL pc=%h expected %h (cycle %0d)", pc, cur_pc, c); end
      // overflow flag of the ALU for arithmetic instructions
      if (instr[31:26] == 6'h00 && instr[5:0] inside {6'h20, 6'h21, 6'h23}) begin
        longint sr;
        logic [31:0] a, b;
        a = m_reg[instr[25:21]]; b = m_reg[instr[20:16]];
        sr = (instr[5:0] == 6'h23) ? longint'($signed(a)) - longint'($signed(b))
                                   : longint'($signed(a)) + longint'($signed(b));
        checks++;
        if (alu_overflow !== (sr > 64'sd2147483647 || sr < -64'sd2147483648)) begin
          failures++; $display("FAIL overflow flag at pc=%h", pc);
        end
      end
      widx = model_step();
      @(negedge clk);
      checks++;
      for (int r = 0; r < 32; r++) begin
        if (dut.u_rf.regs[r] !== m_reg[r]) begin
          failures++; $display("FAIL cycle %0d: r%0d=%h expected %h", c, r, dut.u_rf.regs[r], m_reg[r]);
          break;
        end
      end
      if (widx >= 0) begin
        checks++;
        if (dut.u_dmem.mem[widx] !== m_mem[widx]) begin
          failures++; $display("FAIL cycle %0d: M[%0d]=%h expected %h", c, widx, dut.u_dmem.mem[widx], m_mem[widx]);
        end
      end
      if (failures > 20) break;
    end
  endtask

  task automatic need(string what, int n);
    $display("  %-22s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    directed();
    for (int run = 0; run < 20; run++) random_run(1000);
    $display("mechanism counts (random runs):");
    need("addu", n_addu);
    need("add", n_add);
    need("subu", n_subu);
    need("ori", n_ori);
    need("slti", n_slti);
    need("slti true", n_slti_1);
    need("slti false", n_slti - n_slti_1);
    need("lw", n_lw);
    need("sw", n_sw);
    need("beq taken", n_beq_t);
    need("beq not taken", n_beq_nt);
    need("alu overflow", n_ovf);
    need("write to r0 ignored", n_r0);
    need("illegal as no-op", n_ill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
