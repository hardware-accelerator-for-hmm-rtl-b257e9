// tb_min_cmp: 48-bit and 24-bit comparators against integer minimum,
// random operands, equal operands (A must win) and extreme values.
module tb_min_cmp;
  int checks = 0, failures = 0;
  logic [47:0] a, b, y; logic bl;
  logic [23:0] a2, b2, y2; logic bl2;

  min_cmp #(.W(48)) dut  (.a(a), .b(b), .y(y), .b_lt_a(bl));
  min_cmp #(.W(24)) dut2 (.a(a2), .b(b2), .y(y2), .b_lt_a(bl2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [47:0] x, logic [47:0] z);
    a = x; b = z; a2 = x[23:0]; b2 = z[23:0];
    #1;
    checks++;
    if (y !== ((z < x) ? z : x) || bl !== (z < x)) begin
      failures++; $display("FAIL48 %h %h -> %h %b", x, z, y, bl);
    end
    checks++;
    if (y2 !== ((z[23:0] < x[23:0]) ? z[23:0] : x[23:0]) || bl2 !== (z[23:0] < x[23:0])) begin
      failures++; $display("FAIL24 %h %h -> %h %b", x[23:0], z[23:0], y2, bl2);
    end
  endtask

  initial begin
    check_one(48'h0, 48'hFFFF_FFFF_FFFF);
    check_one(48'hFFFF_FFFF_FFFF, 48'h0);
    check_one(48'h8000_0000_0000, 48'h7FFF_FFFF_FFFF);
    check_one(48'h1234, 48'h1234);
    for (int i = 0; i < 5000; i++) begin
      logic [47:0] x, z;
      x = {16'($urandom), 32'($urandom)};
      z = (i % 4 == 0) ? x : ((i % 4 == 1) ? x + 48'(($urandom % 5)) - 48'd2 : {16'($urandom), 32'($urandom)});
      check_one(x, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
