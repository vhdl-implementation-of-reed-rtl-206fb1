// tb_gf_inv: the sequential inverter on every field element; checks
// d_out = gamma^-1 (0 for 0) and the latency of GF_M-1 = 7 clocks from the
// start clock to done.
module tb_gf_inv;
  import rs_ref_pkg::*;
  logic clk = 0, reset = 1, start = 0, busy, done;
  sym_t d_in = 0, d_out;
  int checks = 0, failures = 0;
  gf_inv dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int v = 0; v < 256; v++) begin
      int lat;
      @(negedge clk) begin start = 1; d_in = sym_t'(v); end
      @(negedge clk) begin start = 0; d_in = sym_t'($urandom); end
      lat = 0;
      while (!done) begin @(negedge clk); lat++; end
      checks += 2;
      if (d_out !== rinv(sym_t'(v))) begin failures++; $display("FAIL inv(%02x)=%02x", v, d_out); end
      if (lat != 7) begin failures++; $display("FAIL latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
