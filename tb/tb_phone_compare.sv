// tb_phone_compare: the 28-input comparator tree. Random 48-bit scores,
// some with equal upper halves; the winner index (lowest index on ties),
// the best and second-best upper halves, the margin and the too-close flag
// are compared with a sort done in the testbench. Both outcomes of the
// threshold test must occur.
module tb_phone_compare;
  import hmm_pkg::*;
  int checks = 0, failures = 0, close_cnt = 0, far_cnt = 0;
  logic [47:0] sc [N_HMM];
  logic [23:0] thr, bs, ss, mg;
  logic [4:0]  bi;
  logic        tc;

  phone_compare #(.NH(N_HMM)) dut (.score(sc), .threshold(thr), .best_idx(bi), .best_score(bs),
                                   .second_score(ss), .margin(mg), .too_close(tc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int          wi;
      logic [23:0] w, s2;
      for (int h = 0; h < N_HMM; h++) sc[h] = {8'h00, 16'($urandom), 24'($urandom)};
      if (i % 3 == 0) sc[$urandom % N_HMM][47:24] = sc[$urandom % N_HMM][47:24];
      if (i % 11 == 0) for (int h = 0; h < N_HMM; h++) sc[h][47:24] = 24'h000100;
      thr = 24'($urandom % 4096);
      #1;
      wi = 0; w = sc[0][47:24];
      for (int h = 1; h < N_HMM; h++) if (sc[h][47:24] < w) begin w = sc[h][47:24]; wi = h; end
      s2 = 24'hFFFFFF;
      for (int h = 0; h < N_HMM; h++) if (h != wi && sc[h][47:24] < s2) s2 = sc[h][47:24];
      checks++;
      if (bi !== 5'(wi) || bs !== w || ss !== s2 || mg !== s2 - w || tc !== ((s2 - w) < thr)) begin
        failures++;
        $display("FAIL %0d: idx %0d/%0d best %h/%h second %h/%h tc %b", i, bi, wi, bs, w, ss, s2, tc);
      end
      if (tc) close_cnt++; else far_cnt++;
    end
    checks++;
    if (close_cnt == 0 || far_cnt == 0) begin failures++; $display("FAIL threshold coverage"); end
    $display("too close %0d, clear %0d", close_cnt, far_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
