// tb_error_corrector: fills the error memory with random values (some
// zero), then starts the read-out against a behavioural delay buffer that
// answers fifo_re one clock later. Output must be received XOR error, or the
// received word unchanged with bypass; N symbols on N consecutive clocks,
// last with the N-th.
module tb_error_corrector;
  import rs_ref_pkg::*;
  localparam int N = 32;
  logic clk = 0, reset = 1, ram_we = 0, start = 0, bypass = 0;
  logic [4:0] ram_addr = 0;
  sym_t ram_d_in = 0, fifo_d = 0, d_out;
  logic fifo_re, out_enb, last;
  int checks = 0, failures = 0;
  error_corrector dut (.*);
  always #5 clk = ~clk;
  sym_t word [N], errv [N];
  int rd_ptr = 0;
  // behavioural delay buffer with one clock read latency
  always @(posedge clk) if (fifo_re) begin fifo_d <= word[rd_ptr]; rd_ptr <= (rd_ptr + 1) % N; end
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int b = 0; b < 50; b++) begin
      int got;
      bit byp;
      byp = (b % 5 == 4);
      foreach (word[i]) word[i] = sym_t'($urandom);
      foreach (errv[i]) errv[i] = ($urandom_range(0, 3) == 0) ? sym_t'($urandom) : 8'h00;
      for (int i = 0; i < N; i++) begin
        @(negedge clk) begin ram_we = 1; ram_addr = 5'(i); ram_d_in = errv[i]; end
      end
      @(negedge clk) begin ram_we = 0; start = 1; bypass = byp; end
      @(negedge clk) begin start = 0; bypass = 0; end
      got = 0;
      while (!out_enb) @(negedge clk);
      while (out_enb) begin
        checks += 2;
        if (d_out != (byp ? word[got] : word[got] ^ errv[got])) begin
          failures++; $display("FAIL block %0d symbol %0d", b, got);
        end
        if (last != (got == N-1)) failures++;
        got++;
        @(negedge clk);
      end
      checks++;
      if (got != N) begin failures++; $display("FAIL %0d symbols", got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
