// tb_carry_gen: exhaustive check of the block carry generator for 2- and
// 4-bit blocks: carry-out equals bit W of a+b, propagate equals &(a^b).
module tb_carry_gen;
  int checks = 0, failures = 0;
  logic [3:0] a4, b4; logic c4, p4;
  logic [1:0] a2, b2; logic c2, p2;

  carry_gen #(.W(4)) dut4 (.a(a4), .b(b4), .cout(c4), .pblk(p4));
  carry_gen #(.W(2)) dut2 (.a(a2), .b(b2), .cout(c2), .pblk(p2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        logic [4:0] s;
        a4 = 4'(i); b4 = 4'(j); a2 = 2'(i); b2 = 2'(j);
        #1;
        s = 5'(i) + 5'(j);
        checks++; if (c4 !== s[4]) begin failures++; $display("FAIL c4 %0d %0d", i, j); end
        checks++; if (p4 !== ((4'(i) ^ 4'(j)) == 4'hF)) begin failures++; $display("FAIL p4 %0d %0d", i, j); end
        s = 5'(i % 4) + 5'(j % 4);
        checks++; if (c2 !== s[2]) begin failures++; $display("FAIL c2 %0d %0d", i, j); end
        checks++; if (p2 !== ((2'(i) ^ 2'(j)) == 2'h3)) begin failures++; $display("FAIL p2 %0d %0d", i, j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
