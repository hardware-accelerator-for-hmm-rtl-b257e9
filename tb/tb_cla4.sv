// tb_cla4: exhaustive check of the 4-bit CLA against integer addition.
module tb_cla4;
  int checks = 0, failures = 0;
  logic [3:0] a, b, s; logic ci, co;

  cla4 dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic [4:0] ref_s;
      {ci, a, b} = 9'(i);
      #1;
      ref_s = 5'(a) + 5'(b) + 5'(ci);
      checks++;
      if ({co, s} !== ref_s) begin
        failures++;
        $display("FAIL %h+%h+%b -> %b%h exp %h", a, b, ci, co, s, ref_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
