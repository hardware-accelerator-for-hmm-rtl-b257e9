// tb_hmm_param_mem: loads a full model into memory HMM_ID = 5 with writes
// addressed to it, interleaved with writes to other HMMs that must be
// ignored, then reads every dimension back and checks the per-state
// constants.
module tb_hmm_param_mem;
  import hmm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we;
  param_wr_t wr;
  logic [DIM_AW-1:0] rd_dim;
  logic [15:0] mu [3], sigma [3];
  logic [47:0] omega [3], omega0 [3], a_self [3], a_pred [3];
  logic [15:0] emu [3][39], esig [3][39];
  logic [47:0] econst [6][3];

  hmm_param_mem #(.HMM_ID(5)) dut (.clk, .we, .wr, .rd_dim, .mu, .sigma, .omega, .omega0,
                                   .a_self, .a_pred);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int h, param_kind_e k, int s, int d, logic [47:0] v);
    @(negedge clk);
    we = 1; wr.hmm = 5'(h); wr.kind = k; wr.state = 2'(s); wr.dim = 6'(d); wr.data = v;
    @(negedge clk);
    we = 0;
  endtask

  initial begin
    we = 0; wr = '0; rd_dim = 0;
    for (int s = 0; s < 3; s++) begin
      for (int d = 0; d < 39; d++) begin
        emu[s][d] = 16'($urandom); esig[s][d] = 16'($urandom);
        write(5, PK_MU, s, d, {32'h0, emu[s][d]});
        write(6, PK_MU, s, d, 48'h0);           // other HMM: ignored
        write(5, PK_SIGMA, s, d, {32'h0, esig[s][d]});
        write(4, PK_SIGMA, s, d, 48'h0);         // other HMM: ignored
      end
      for (int k = 0; k < 4; k++) begin
        econst[k][s] = {16'($urandom), 32'($urandom)};
        write(5, param_kind_e'(k + 2), s, 0, econst[k][s]);
        write(3, param_kind_e'(k + 2), s, 0, 48'h0);
      end
    end
    for (int d = 0; d < 39; d++) begin
      @(negedge clk);
      rd_dim = 6'(d);
      #1;
      for (int s = 0; s < 3; s++) begin
        checks += 2;
        if (mu[s] !== emu[s][d])     begin failures++; $display("FAIL mu s%0d d%0d", s, d); end
        if (sigma[s] !== esig[s][d]) begin failures++; $display("FAIL sigma s%0d d%0d", s, d); end
      end
    end
    for (int s = 0; s < 3; s++) begin
      checks += 4;
      if (omega[s]  !== econst[0][s]) begin failures++; $display("FAIL omega %0d", s); end
      if (omega0[s] !== econst[1][s]) begin failures++; $display("FAIL omega0 %0d", s); end
      if (a_self[s] !== econst[2][s]) begin failures++; $display("FAIL a_self %0d", s); end
      if (a_pred[s] !== econst[3][s]) begin failures++; $display("FAIL a_pred %0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
