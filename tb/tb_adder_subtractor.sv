// tb_adder_subtractor: checks the ripple adder/subtractor at 32 bits against
// integer arithmetic: sum/difference, carry out and signed overflow, for
// corner values and random operands.
module tb_adder_subtractor;
  localparam int N = 32;
  logic [N-1:0] a, b, s;
  logic sub, carry_out, overflow;
  int checks = 0, failures = 0;

  adder_subtractor #(.N(N)) dut (.a(a), .b(b), .sub(sub), .s(s),
                                 .carry_out(carry_out), .overflow(overflow));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y, input logic op);
    logic [N:0]   wide;
    logic [N-1:0] exp_s;
    logic         exp_ov;
    longint       sx, sy, sr;
    a = x; b = y; sub = op;
    #1;
    wide  = op ? ({1'b0, x} + {1'b0, ~y} + 1) : ({1'b0, x} + {1'b0, y});
    exp_s = wide[N-1:0];
    sx = longint'($signed(x)); sy = longint'($signed(y));
    sr = op ? sx - sy : sx + sy;
    exp_ov = (sr > 64'sd2147483647) || (sr < -64'sd2147483648);
    checks++;
    if (s !== exp_s) begin failures++; $display("FAIL s %h %s %h = %h", x, op ? "-" : "+", y, s); end
    checks++;
    if (carry_out !== wide[N]) begin failures++; $display("FAIL cout %h %h %b", x, y, op); end
    checks++;
    if (overflow !== exp_ov) begin failures++; $display("FAIL ov %h %h %b", x, y, op); end
  endtask

  initial begin
    logic [N-1:0] corners [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1234_5678};
    foreach (corners[i]) foreach (corners[j]) begin
      check(corners[i], corners[j], 1'b0);
      check(corners[i], corners[j], 1'b1);
    end
    for (int k = 0; k < 2000; k++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
