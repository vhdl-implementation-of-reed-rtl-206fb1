// tb_rs_top: end-to-end test of the RS(32,28) link at its default size.
//
// Random messages go through the encoder (with random gaps in enable); the
// encoder output is checked against a long-division reference and against
// the one-clock latency. The testbench then plays the channel: it adds 0, 1,
// 2 or 3..6 random symbol errors, feeds the word to the decoder (also
// offering symbols while the decoder is busy, to exercise in_ready) and
// checks the output: with up to t = 2 errors it must equal the codeword with
// dec_err low; with more errors either dec_err is set and the received word
// comes back unchanged, or the output is a codeword (a miscorrection, which
// no decoder can avoid). Counts how often each mechanism happened and fails
// if one never did.
module tb_rs_top;
  import rs_ref_pkg::*;

  localparam int N = 32;
  localparam int K = 28;
  localparam int NR = N - K;
  localparam int BLOCKS = 300;

  logic clk = 0, reset = 1;
  logic enc_enable = 0;  sym_t enc_d_in = 0;
  logic enc_in_ready, enc_out_enb, enc_rs_ins, enc_rs_calc;  sym_t enc_d_out;
  logic dec_in_enb = 0;  sym_t dec_d_in = 0;
  logic dec_in_ready, dec_out_enb, dec_done, dec_err;  sym_t dec_d_out;

  rs_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_corrected = 0, n_fail_flag = 0, n_miscorr = 0;
  int n_gap = 0, n_parity = 0, n_backpressure = 0, n_chien_wait = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Chien search stalled on a root (waits for the inverter)
  always @(posedge clk) if (dut.u_dec.ch.state == dut.u_dec.ch.WAIT_INV) n_chien_wait++;
  // Euclid bypass for a clean word
  always @(posedge clk) if (dut.u_dec.eu.start && dut.u_dec.eu.synd_zero) n_bypass++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sym_t msg[], cw[], ref_cw[], rx[], out[], s[];

  task automatic encode_block();
    int sent = 0, got = 0;
    longint acc_cycle[$];
    msg = new[K];
    foreach (msg[i]) msg[i] = sym_t'($urandom);
    encode(N, K, msg, ref_cw);
    cw = new[N];
    fork
      begin
        while (sent < K) begin
          @(negedge clk);
          if ($urandom_range(0, 3) == 0) begin
            enc_enable = 0; n_gap++;
          end else begin
            enc_enable = 1; enc_d_in = msg[sent];
          end
          @(posedge clk);
          if (enc_enable && enc_in_ready) begin sent++; acc_cycle.push_back(cycle); end
        end
        @(negedge clk) enc_enable = 0;
      end
      begin
        while (got < N) begin
          @(posedge clk); #1;
          if (enc_out_enb) begin
            cw[got] = enc_d_out;
            if (got < K) begin
              check(enc_rs_ins && !enc_rs_calc, "rs_ins during message");
              check(acc_cycle.size() > 0 && cycle == acc_cycle.pop_front() + 1,
                    "encoder latency one clock");
            end else begin
              check(enc_rs_calc && !enc_rs_ins, "rs_calc during parity");
              n_parity++;
            end
            got++;
          end
        end
      end
    join
    foreach (cw[i]) check(cw[i] == ref_cw[i], $sformatf("codeword symbol %0d", i));
  endtask

  task automatic decode_block(int nerr);
    int sent = 0, got = 0;
    bit err_seen = 0;
    int pos[$];
    rx = new[N](cw);
    while (pos.size() < nerr) begin
      int p = $urandom_range(0, N-1);
      if (!(p inside {pos})) pos.push_back(p);
    end
    foreach (pos[i]) rx[pos[i]] ^= sym_t'($urandom_range(1, 255));
    out = new[N];
    fork
      begin
        while (sent < N) begin
          @(negedge clk);
          dec_in_enb = ($urandom_range(0, 7) != 0);
          dec_d_in = rx[sent];
          @(posedge clk);
          if (dec_in_enb && dec_in_ready) sent++;
        end
        // keep offering (garbage) symbols while busy: they must be refused
        repeat ($urandom_range(1, 5)) begin
          @(negedge clk); dec_in_enb = 1; dec_d_in = sym_t'($urandom);
          @(posedge clk); #1;
          if (!dec_in_ready) n_backpressure++;
          check(!dec_in_ready || got == N, "decoder refuses input while busy");
        end
        @(negedge clk) dec_in_enb = 0;
      end
      begin
        while (got < N) begin
          @(posedge clk); #1;
          if (dec_out_enb) begin
            out[got] = dec_d_out;
            check(dec_done == (got == N-1), "dec_done with last symbol");
            got++;
          end
        end
        err_seen = dec_err;
      end
    join
    if (nerr <= NR/2) begin
      check(!err_seen, $sformatf("no failure flag with %0d errors", nerr));
      foreach (out[i]) check(out[i] == cw[i], $sformatf("corrected symbol %0d (%0d errors)", i, nerr));
      if (nerr > 0) n_corrected++;
    end else if (err_seen) begin
      n_fail_flag++;
      foreach (out[i]) check(out[i] == rx[i], "uncorrectable word given out unchanged");
    end else begin
      n_miscorr++;
      syndromes(N, NR, out, s);
      foreach (s[i]) check(s[i] == 0, "miscorrected output is a codeword");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int b = 0; b < BLOCKS; b++) begin
      int nerr, r;
      r = $urandom_range(0, 9);
      nerr = (r < 2) ? 0 : (r < 4) ? 1 : (r < 7) ? 2 : $urandom_range(3, 6);
      encode_block();
      decode_block(nerr);
    end
    check(n_bypass > 0,       "clean word bypassed the Euclid loop");
    check(n_corrected > 0,    "errors corrected");
    check(n_fail_flag > 0,    "uncorrectable word flagged");
    check(n_gap > 0,          "encoder input gaps");
    check(n_parity > 0,       "parity symbols inserted");
    check(n_backpressure > 0, "decoder back-pressure");
    check(n_chien_wait > 0,   "Chien search waited on the inverter");
    $display("bypass=%0d corrected=%0d flagged=%0d miscorrected=%0d gaps=%0d parity=%0d backpressure=%0d chien_wait_cycles=%0d",
             n_bypass, n_corrected, n_fail_flag, n_miscorr, n_gap, n_parity, n_backpressure, n_chien_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
