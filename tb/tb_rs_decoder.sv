// tb_rs_decoder: the decoder on its own, at the default RS(32,28) and at a
// shortened RS(20,16). Codewords come from the long-division reference; the
// testbench adds 0..2 errors (must be corrected, dec_err low) or 3..6 errors
// (either flagged and given out unchanged, or miscorrected into a
// codeword). Words are sent back to back with random gaps in in_enb, and
// the time from the last input symbol to the first output symbol must be
// the fixed pipeline delay plus the Euclid steps (plus one when the loop
// is not bypassed) plus GF_M clocks per error
// found. That fixed delay is learnt from the first clean word.
module tb_rs_decoder;
  import rs_ref_pkg::*;
  logic clk = 0, reset = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two decoders, driven one after the other
  logic in_enb_a = 0, in_enb_b = 0;
  sym_t d_in = 0;
  logic rdy_a, oe_a, done_a, err_a, rdy_b, oe_b, done_b, err_b;
  sym_t do_a, do_b;
  rs_decoder dut_a (.clk, .reset, .in_enb(in_enb_a), .d_in, .in_ready(rdy_a),
                    .out_enb(oe_a), .d_out(do_a), .dec_done(done_a), .dec_err(err_a));
  rs_decoder #(.N(20), .K(16)) dut_b (.clk, .reset, .in_enb(in_enb_b), .d_in, .in_ready(rdy_b),
                    .out_enb(oe_b), .d_out(do_b), .dec_done(done_b), .dec_err(err_b));

  int n_corr = 0, n_flag = 0, n_mis = 0;
  int base_lat[2] = '{-1, -1};
  sym_t msg[], cw[], rx[], out[], s[];

  task automatic run_block(int sel, int n, int k, int nerr);
    int sent = 0, got = 0, nr, lat, iters, found;
    longint last_in, first_out;
    bit err_seen;
    int pos[$];
    nr = n - k;
    msg = new[k];
    foreach (msg[i]) msg[i] = sym_t'($urandom);
    encode(n, k, msg, cw);
    rx = new[n](cw);
    while (pos.size() < nerr) begin
      int p;
      p = $urandom_range(0, n-1);
      if (!(p inside {pos})) pos.push_back(p);
    end
    foreach (pos[i]) rx[pos[i]] ^= sym_t'($urandom_range(1, 255));
    out = new[n];
    fork
      begin
        while (sent < n) begin
          @(negedge clk);
          if (sel == 0) in_enb_a = ($urandom_range(0, 5) != 0); else in_enb_b = ($urandom_range(0, 5) != 0);
          d_in = rx[sent];
          @(posedge clk);
          if (sel == 0 ? (in_enb_a && rdy_a) : (in_enb_b && rdy_b)) begin sent++; last_in = cycle; end
        end
        @(negedge clk) begin in_enb_a = 0; in_enb_b = 0; end
      end
      begin
        while (got < n) begin
          @(posedge clk); #1;
          if (sel == 0 ? oe_a : oe_b) begin
            if (got == 0) first_out = cycle;
            out[got] = (sel == 0) ? do_a : do_b;
            check((sel == 0 ? done_a : done_b) == (got == n-1), "dec_done with last symbol");
            got++;
          end
        end
        err_seen = (sel == 0) ? err_a : err_b;
        iters = (sel == 0) ? int'(dut_a.eu_iter) : int'(dut_b.eu_iter);
        found = (sel == 0) ? int'(dut_a.root_cnt) : int'(dut_b.root_cnt);
      end
    join
    lat = int'(first_out - last_in);
    if (nerr == 0 && base_lat[sel] < 0) base_lat[sel] = lat;
    // a bypassed Euclid loop takes one clock; otherwise its steps plus two
    iters = (nerr == 0) ? 0 : iters + 1;
    check(lat == base_lat[sel] + iters + 8 * found,
          $sformatf("latency %0d (base %0d, %0d steps, %0d roots)", lat, base_lat[sel], iters, found));
    if (nerr <= nr / 2) begin
      check(!err_seen, $sformatf("no flag with %0d errors", nerr));
      foreach (out[i]) check(out[i] == cw[i], $sformatf("n=%0d symbol %0d, %0d errors", n, i, nerr));
      if (nerr > 0) n_corr++;
    end else if (err_seen) begin
      n_flag++;
      foreach (out[i]) check(out[i] == rx[i], "flagged word unchanged");
    end else begin
      n_mis++;
      syndromes(n, nr, out, s);
      foreach (s[i]) check(s[i] == 0, "miscorrected output is a codeword");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    run_block(0, 32, 28, 0);
    run_block(1, 20, 16, 0);
    for (int b = 0; b < 400; b++) begin
      int sel, nerr, r;
      sel = b % 2;
      r = $urandom_range(0, 9);
      nerr = (r < 2) ? 0 : (r < 4) ? 1 : (r < 7) ? 2 : $urandom_range(3, 6);
      if (sel == 0) run_block(0, 32, 28, nerr); else run_block(1, 20, 16, nerr);
    end
    check(n_corr > 0 && n_flag > 0, "corrections and flags seen");
    $display("corrected=%0d flagged=%0d miscorrected=%0d base latency %0d / %0d",
             n_corr, n_flag, n_mis, base_lat[0], base_lat[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
