// tb_chien_forney: Chien search and Forney values. For words with 0..2
// random errors the true sigma and omega are fed in; the error memory must
// receive one write per position, in order, holding the error magnitude at
// the error positions and zero elsewhere, with dec_err low. Random locators
// of degree 1..4 test the failure rule (root count != deg sigma, deg sigma
// > t, deg omega >= deg sigma) against direct evaluation. The search must
// take N + 1 + GF_M clocks per root.
module tb_chien_forney;
  import rs_ref_pkg::*;
  localparam int N = 32, K = 28, NR = N - K, T = NR / 2;
  logic clk = 0, reset = 1, start = 0;
  logic [NR:0][7:0] sigma = '0;
  logic [NR-1:0][7:0] omega = '0;
  logic [3:0] deg_sigma = '0;
  logic ram_we, chien_done, dec_err;
  logic [4:0] ram_addr;
  sym_t ram_d_in;
  logic [5:0] root_cnt;
  int checks = 0, failures = 0, n_err = 0, n_ok = 0;
  chien_forney dut (.*);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sym_t wr_val[$];
  int   wr_addr[$];
  always @(posedge clk) if (ram_we) begin wr_val.push_back(ram_d_in); wr_addr.push_back(int'(ram_addr)); end

  function automatic sym_t peval(const ref sym_t p[], sym_t x);
    sym_t r = 0;
    for (int i = p.size() - 1; i >= 0; i--) r = rmul(r, x) ^ p[i];
    return r;
  endfunction

  sym_t msg[], cw[], rx[], s[], sg[], om[];
  int pos[$];
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int b = 0; b < 200; b++) begin
      int nerr, lat, deg, roots, deg_om;
      bit exp_err;
      bit random_loc;
      random_loc = (b % 4 == 3);
      nerr = $urandom_range(0, T);
      msg = new[K];
      foreach (msg[i]) msg[i] = sym_t'($urandom);
      encode(N, K, msg, cw);
      rx = new[N](cw);
      pos.delete();
      while (pos.size() < nerr) begin
        int p;
        p = $urandom_range(0, N-1);
        if (!(p inside {pos})) pos.push_back(p);
      end
      foreach (pos[i]) rx[pos[i]] ^= sym_t'($urandom_range(1, 255));
      syndromes(N, NR, rx, s);
      locator(N, NR + 1, pos, sg);
      if (random_loc) begin
        deg = $urandom_range(1, NR);
        foreach (sg[i]) sg[i] = (i == 0) ? 8'h01 : (i <= deg) ? sym_t'($urandom) : 8'h00;
        if (sg[deg] == 0) sg[deg] = 8'h01;
        foreach (s[i]) s[i] = sym_t'($urandom);
      end
      evaluator(NR, s, sg, om);
      deg = 0;
      foreach (sg[i]) if (sg[i] != 0) deg = i;
      deg_om = -1;
      foreach (om[i]) if (om[i] != 0) deg_om = i;
      roots = 0;
      for (int k = 0; k < N; k++) if (peval(sg, rinv(rpow(N - 1 - k))) == 0) roots++;
      exp_err = (roots != deg) || (deg > T) || (deg_om >= deg);
      wr_val.delete(); wr_addr.delete();
      @(negedge clk) begin
        foreach (sg[i]) sigma[i] = sg[i];
        foreach (om[i]) omega[i] = om[i];
        deg_sigma = 4'(deg);
        start = 1;
      end
      @(negedge clk) start = 0;
      lat = 1;
      while (!chien_done && lat < 200) begin @(negedge clk); lat++; end
      check(chien_done, "chien_done");
      // the last write lands on the same edge as chien_done
      @(negedge clk);
      check(lat == N + 1 + 8 * roots, $sformatf("search time %0d for %0d roots", lat, roots));
      check(dec_err == exp_err, $sformatf("block %0d dec_err %0d expected %0d", b, dec_err, exp_err));
      check(root_cnt == 6'(roots), "root count");
      check(wr_val.size() == N, "one write per position");
      foreach (wr_addr[i]) check(wr_addr[i] == i, "write order");
      if (!random_loc) begin
        n_ok++;
        foreach (wr_val[i]) check(i < N && wr_val[i] == (rx[i] ^ cw[i]), $sformatf("block %0d error value at %0d", b, i));
      end else if (exp_err) n_err++;
    end
    check(n_err > 0 && n_ok > 0, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
