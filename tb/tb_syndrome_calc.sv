// tb_syndrome_calc: syndromes of random codewords (must be zero, synd_zero
// high) and of codewords with random errors, against direct evaluation of
// r(alpha^j). Checks that out_enb comes one clock after the last symbol.
module tb_syndrome_calc;
  import rs_ref_pkg::*;
  localparam int N = 32, K = 28, NR = N - K;
  logic clk = 0, reset = 1, in_enb = 0, out_enb, synd_zero;
  sym_t d_in = 0;
  logic [NR-1:0][7:0] syndrome;
  int checks = 0, failures = 0;
  syndrome_calc dut (.*);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  sym_t msg[], cw[], s[];
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int b = 0; b < 60; b++) begin
      msg = new[K];
      foreach (msg[i]) msg[i] = sym_t'($urandom);
      encode(N, K, msg, cw);
      if (b % 2 == 1)
        repeat ($urandom_range(1, 4)) cw[$urandom_range(0, N-1)] ^= sym_t'($urandom_range(1, 255));
      syndromes(N, NR, cw, s);
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin in_enb = 0; @(negedge clk); end
        in_enb = 1; d_in = cw[i];
        if (i < N-1) begin @(posedge clk); #1 check(!out_enb, "no early out_enb"); end
      end
      @(negedge clk) in_enb = 0;
      check(out_enb, "out_enb one clock after the last symbol");
      for (int j = 0; j < NR; j++) check(syndrome[j] == s[j], $sformatf("block %0d S%0d", b, j+1));
      check(synd_zero == (s[0] == 0 && s[1] == 0 && s[2] == 0 && s[3] == 0), "synd_zero");
      @(negedge clk) check(!out_enb, "out_enb is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
