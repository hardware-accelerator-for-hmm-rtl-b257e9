// tb_logb_unit: output-probability unit over several frames in both modes.
// Each frame streams 39 random (o, mu, sigma) triples, one per clock; after
// the last one logb must equal the reference sum plus omega (omega' on the
// first frame) on the very next cycle. Frames are sent back to back, so the
// check also covers the restart of the accumulator with "first".
module tb_logb_unit;
  import hmm_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, t2_diff = 0;

  logic clk = 0, rst_n = 0;
  mode_e mode;
  logic acc_en, first, init;
  logic [15:0] o, mu, sigma;
  logic [47:0] omega, omega0, logb;

  logb_unit dut (.clk, .rst_n, .mode, .acc_en, .first, .init, .o, .mu, .sigma,
                 .omega, .omega0, .logb);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] acc_ref, acc_exact;
    acc_en = 0; first = 0; init = 0; o = 0; mu = 0; sigma = 0; mode = MODE_T1;
    omega = 48'h0000_0012_3456; omega0 = 48'h0000_00FF_FFFF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      mode = (f % 2) ? MODE_T2 : MODE_T1;
      init = (f % 5 == 0);
      omega  = {16'($urandom), 32'($urandom)};
      omega0 = {16'($urandom), 32'($urandom)};
      acc_ref = 0; acc_exact = 0;
      for (int d = 0; d < N_DIM; d++) begin
        @(negedge clk);
        acc_en = 1; first = (d == 0);
        o     = 16'($signed(16'($urandom % 4001)) - 16'sd2000);
        mu    = 16'($signed(16'($urandom % 4001)) - 16'sd2000);
        sigma = 16'($urandom % 1000);
        acc_ref   = acc_ref + ref_term(o, mu, sigma, mode == MODE_T2);
        acc_exact = acc_exact + ref_term(o, mu, sigma, 1'b0);
      end
      @(negedge clk);
      acc_en = 0; first = 0;
      checks++;
      if (logb !== ref_logb(acc_ref, init ? omega0 : omega)) begin
        failures++;
        $display("FAIL frame %0d mode %0d logb %h exp %h", f, mode, logb, ref_logb(acc_ref, init ? omega0 : omega));
      end
      if (mode == MODE_T2 && acc_ref != acc_exact) t2_diff++;
    end
    checks++;
    if (t2_diff == 0) begin failures++; $display("FAIL approximate subtractor never changed a sum"); end
    $display("T2 frames differing from exact: %0d", t2_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
