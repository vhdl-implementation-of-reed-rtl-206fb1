// tb_sigma_norm: random lambda(x) with lambda_0 != 0 must come out as
// lambda(x)/lambda_0 with the right degree, GF_M + 2 = 10 clocks after start.
module tb_sigma_norm;
  import rs_ref_pkg::*;
  localparam int N = 32, K = 28, NR = N - K;
  logic clk = 0, reset = 1, start = 0, done;
  logic [NR:0][7:0] lambda = '0, sigma;
  logic [3:0] deg_sigma;
  int checks = 0, failures = 0;
  sigma_norm dut (.*);
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
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int b = 0; b < 300; b++) begin
      int lat, d;
      logic [NR:0][7:0] l;
      d = $urandom_range(0, NR);
      l = '0;
      for (int i = 0; i <= d; i++) l[i] = sym_t'($urandom);
      if (l[0] == 0) l[0] = 8'h01;
      if (l[d] == 0) l[d] = 8'h80;
      @(negedge clk) begin lambda = l; start = 1; end
      @(negedge clk) begin start = 0; lambda = '1; end
      lat = 1;
      while (!done && lat < 30) begin @(negedge clk); lat++; end
      check(lat == 10, $sformatf("latency %0d", lat));
      for (int i = 0; i <= NR; i++) check(sigma[i] == rmul(l[i], rinv(l[0])), $sformatf("sigma_%0d", i));
      check(deg_sigma == 4'(d), "deg_sigma");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
