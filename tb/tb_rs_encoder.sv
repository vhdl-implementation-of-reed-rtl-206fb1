// tb_rs_encoder: RS(32,28) encoder against a long-division reference.
// First the block of 28 symbols 0x36, whose parity registers must read
// 9D 75 EA A3 (b3..b0) before shifting out; then random blocks with random
// enable gaps. Checks the one-clock latency, the rs_ins/rs_calc flags, the
// parity and, with enable held high, a block period of exactly N clocks.
module tb_rs_encoder;
  import rs_ref_pkg::*;
  localparam int N = 32, K = 28;
  logic clk = 0, reset = 1, enable = 0, in_ready, out_enb, rs_ins, rs_calc;
  sym_t d_in = 0, d_out;
  int checks = 0, failures = 0;
  longint cycle = 0;
  rs_encoder dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sym_t msg[], cw[];
  longint acc_q[$];
  sym_t got[$];
  sym_t exp_q[$];
  longint first_out[$];
  int nout = 0;

  // output monitor
  always @(posedge clk) begin
    int idx;
    #1;
    idx = nout % N;
    if (out_enb) begin
      got.push_back(d_out);
      if (idx == 0) first_out.push_back(cycle);
      if (idx < K) begin
        check(rs_ins && !rs_calc, "rs_ins");
        check(acc_q.size() > 0 && acc_q.pop_front() + 1 == cycle, "one-clock latency");
      end else check(rs_calc && !rs_ins, "rs_calc");
      nout++;
    end
  end

  task automatic send(bit gaps);
    int sent = 0;
    while (sent < K) begin
      @(negedge clk);
      enable = !(gaps && $urandom_range(0, 2) == 0);
      d_in = msg[sent];
      @(posedge clk);
      if (enable && in_ready) begin sent++; acc_q.push_back(cycle); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    // block of the published example
    msg = new[K];
    foreach (msg[i]) msg[i] = 8'h36;
    send(0);
    @(negedge clk) enable = 0;
    check(dut.bb == {8'h9D, 8'h75, 8'hEA, 8'hA3}, "parity registers of the 0x36 block");
    repeat (N) @(negedge clk);
    check(got.size() == N, "32 symbols out");
    encode(N, K, msg, cw);
    foreach (cw[i]) check(got[i] == cw[i], $sformatf("example symbol %0d", i));
    check(got[K] == 8'h9D && got[K+1] == 8'h75 && got[K+2] == 8'hEA && got[K+3] == 8'hA3, "example parity order");
    // random blocks, back to back with enable held high (also through the
    // parity clocks, which must be ignored), then with gaps
    got.delete();
    first_out.delete();
    for (int b = 0; b < 40; b++) begin
      foreach (msg[i]) msg[i] = sym_t'($urandom);
      encode(N, K, msg, cw);
      foreach (cw[i]) exp_q.push_back(cw[i]);
      send(b >= 20);
    end
    @(negedge clk) enable = 0;
    repeat (N) @(negedge clk);
    check(got.size() == exp_q.size(), "all blocks given out");
    foreach (exp_q[i]) check(i < got.size() && got[i] == exp_q[i], $sformatf("block %0d symbol %0d", i / N, i % N));
    // blocks 1..19 were sent without gaps: one block every N clocks
    for (int b = 1; b < 20; b++) check(first_out[b] - first_out[b-1] == N, "block period N clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
