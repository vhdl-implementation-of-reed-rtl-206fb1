// tb_fifo_delay: random writes and reads (one block of N at a time, and
// interleaved); data must come back in order one clock after fifo_re, and
// count must track the occupancy.
module tb_fifo_delay;
  import rs_ref_pkg::*;
  localparam int N = 32;
  logic clk = 0, reset = 1, fifo_we = 0, fifo_re = 0;
  sym_t fifo_in = 0, d_out;
  logic [5:0] count;
  int checks = 0, failures = 0;
  fifo_delay dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  sym_t model[$];
  int occ = 0;
  bit pend = 0;
  sym_t pend_val;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int c = 0; c < 5000; c++) begin
      bit we, re;
      @(negedge clk);
      if (pend) begin
        checks++;
        if (d_out != pend_val) begin failures++; $display("FAIL data %02x exp %02x", d_out, pend_val); end
      end
      checks++;
      if (count != 6'(occ)) begin failures++; $display("FAIL count %0d exp %0d", count, occ); end
      // phases: fill a block, drain it, then random traffic
      if ((c / 64) % 2 == 0) begin we = (occ < N) && ($urandom_range(0, 3) != 0); re = 0; end
      else if ((c / 64) % 4 == 1) begin we = 0; re = (occ > 0); end
      else begin
        we = (occ < N) && $urandom_range(0, 1);
        re = (occ > 0) && $urandom_range(0, 1);
        if (occ == N) we = 0;
      end
      fifo_we = we; fifo_re = re; fifo_in = sym_t'($urandom);
      pend = re;
      if (re) pend_val = model.pop_front();
      if (we) model.push_back(fifo_in);
      occ += int'(we) - int'(re);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
