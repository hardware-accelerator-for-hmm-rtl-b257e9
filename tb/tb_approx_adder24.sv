// tb_approx_adder24: the 24-bit approximate adder against the block-wise
// reference model, with random and directed operands. It also counts the
// cases where the prediction makes the sum differ from exact addition (that
// must happen) and checks that exact sums are returned when no carry crosses
// two propagating blocks.
module tb_approx_adder24;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, inexact = 0;
  logic [23:0] a, b, s; logic co;

  approx_adder24 dut (.a(a), .b(b), .sum(s), .cout(co));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [23:0] x, logic [23:0] y);
    logic [23:0] r;
    logic [4:0]  top;
    a = x; b = y;
    #1;
    r   = ref_add24(x, y, 1'b1);
    top = 5'(x[23:20]) + 5'(y[23:20]);
    checks++;
    if (s !== r || co !== top[4]) begin
      failures++;
      $display("FAIL %h+%h -> %h/%b exp %h/%b", x, y, s, co, r, top[4]);
    end
    if (s != 24'(x + y)) inexact++;
  endtask

  initial begin
    // directed: predicted carries across the 4-bit blocks
    check_one(24'h0003, 24'h0001);
    check_one(24'h000F, 24'h0001);
    check_one(24'h00FF, 24'h0001);
    check_one(24'hFFFF, 24'h0001);
    check_one(24'h0F00, 24'h0100);
    check_one(24'h1234, 24'h4321);
    for (int i = 0; i < 20000; i++) check_one(24'($urandom), 24'($urandom));
    checks++;
    if (inexact == 0) begin failures++; $display("FAIL approximation never visible"); end
    $display("inexact sums: %0d", inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
