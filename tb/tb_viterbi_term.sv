// tb_viterbi_term: the smallest of three state costs, random and tied.
module tb_viterbi_term;
  int checks = 0, failures = 0;
  logic [47:0] d [3];
  logic [47:0] p;

  viterbi_term #(.NS(3)) dut (.delta(d), .p_out(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [47:0] m;
      for (int s = 0; s < 3; s++) d[s] = {16'($urandom), 32'($urandom)};
      if (i % 5 == 0) d[2] = d[0];
      if (i % 7 == 0) d[1] = 48'hFFFF_FFFF_FFFF;
      #1;
      m = d[0];
      for (int s = 1; s < 3; s++) if (d[s] < m) m = d[s];
      checks++;
      if (p !== m) begin failures++; $display("FAIL %h %h %h -> %h", d[0], d[1], d[2], p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
