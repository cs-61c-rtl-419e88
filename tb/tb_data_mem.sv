// tb_data_mem: random word stores and loads against a reference array;
// checks that a store lands on the clock edge and that reads are
// combinational.
module tb_data_mem;
  localparam int WORDS = 1024;
  logic clk = 0, we = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic [31:0] model [WORDS];
  bit          valid [WORDS];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(WORDS)) dut (.clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int w;
      @(negedge clk);
      w = $urandom_range(31);
      addr = {20'h0, 10'(w), 2'b00};
      we = 1'($urandom);
      wdata = $urandom;
      #1;
      if (valid[w]) begin
        checks++;
        if (rdata !== model[w]) begin failures++; $display("FAIL read w=%0d", w); end
      end
      if (we) begin
        @(posedge clk); #1;
        model[w] = wdata; valid[w] = 1;
        checks++;
        if (rdata !== wdata) begin failures++; $display("FAIL write w=%0d", w); end
        we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
