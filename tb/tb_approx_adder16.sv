// tb_approx_adder16: the 16-bit approximate adder against the block-wise
// reference model, with random and directed operands. It also counts the
// cases where the prediction makes the sum differ from exact addition (that
// must happen) and checks that exact sums are returned when no carry crosses
// two propagating blocks.
module tb_approx_adder16;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, inexact = 0;
  logic [15:0] a, b, s; logic co;

  approx_adder16 dut (.a(a), .b(b), .sum(s), .cout(co));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [15:0] x, logic [15:0] y);
    logic [15:0] r;
    logic [4:0]  top;
    a = x; b = y;
    #1;
    r   = ref_add16(x, y, 1'b1);
    top = 5'(x[15:12]) + 5'(y[15:12]);
    checks++;
    if (s !== r || co !== top[4]) begin
      failures++;
      $display("FAIL %h+%h -> %h/%b exp %h/%b", x, y, s, co, r, top[4]);
    end
    if (s != 16'(x + y)) inexact++;
  endtask

  initial begin
    // directed: carry out of bits 1:0 must cross block 3:2 (predicted) ...
    check_one(16'h0003, 16'h0001);   // carry from block 0 into block 1: dropped (cin=0)
    check_one(16'h000F, 16'h0001);   // block 1 propagates: block 2 sees cout of block 0
    check_one(16'h00FF, 16'h0001);   // two propagating blocks: carry lost at block 3
    check_one(16'hFFFF, 16'h0001);
    check_one(16'h0F00, 16'h0100);
    check_one(16'h1234, 16'h4321);
    for (int i = 0; i < 20000; i++) check_one(16'($urandom), 16'($urandom));
    checks++;
    if (inexact == 0) begin failures++; $display("FAIL approximation never visible"); end
    $display("inexact sums: %0d", inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
