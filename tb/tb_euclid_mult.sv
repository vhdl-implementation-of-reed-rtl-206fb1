// tb_euclid_mult: the modified Euclidean solver on the syndromes of words
// with 1 or 2 random symbol errors; lambda(x) must be a non-zero multiple of
// the true locator prod (1 + X_l x). Clean words (synd_zero) must bypass with
// lambda = 1 on the next clock; the loop must finish within 2t + 2 clocks.
module tb_euclid_mult;
  import rs_ref_pkg::*;
  localparam int N = 32, K = 28, NR = N - K;
  logic clk = 0, reset = 1, start = 0, synd_zero = 0, done;
  logic [NR-1:0][7:0] syndrome = '0;
  logic [NR:0][7:0] lambda;
  logic [3:0] iterations;
  int checks = 0, failures = 0, n_bypass = 0, n_swap = 0;
  euclid_mult dut (.*);
  always #5 clk = ~clk;
  // the Q/R role swap (l < 0) happened
  always @(posedge clk) if (dut.state == dut.RUN && dut.deg_r >= 2 && dut.deg_r < dut.deg_q) n_swap++;
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
  sym_t msg[], cw[], s[], sg[];
  int pos[$];
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int b = 0; b < 300; b++) begin
      int nerr, lat;
      nerr = $urandom_range(0, 2);
      msg = new[K];
      foreach (msg[i]) msg[i] = sym_t'($urandom);
      encode(N, K, msg, cw);
      pos.delete();
      while (pos.size() < nerr) begin
        int p;
        p = $urandom_range(0, N-1);
        if (!(p inside {pos})) pos.push_back(p);
      end
      foreach (pos[i]) cw[pos[i]] ^= sym_t'($urandom_range(1, 255));
      syndromes(N, NR, cw, s);
      locator(N, NR + 1, pos, sg);
      @(negedge clk);
      for (int j = 0; j < NR; j++) syndrome[j] = s[j];
      synd_zero = (nerr == 0);
      start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!done && lat < 20) begin @(negedge clk); lat++; end
      check(done, "done");
      if (nerr == 0) begin
        n_bypass++;
        check(lat == 1, "bypass takes one clock");
        check(lambda == (NR+1)'(1) * 8'h00 + 1, "bypass lambda = 1");
      end else begin
        check(lat <= NR + 2, $sformatf("latency %0d", lat));
        check(lat == iterations + 2, "latency = steps + 2");
        check(lambda[0] != 0, "lambda_0 non-zero");
        for (int i = 0; i <= NR; i++)
          check(rmul(lambda[i], rinv(lambda[0])) == sg[i], $sformatf("block %0d lambda_%0d", b, i));
      end
    end
    check(n_bypass > 0 && n_swap > 0, "bypass and swap both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
