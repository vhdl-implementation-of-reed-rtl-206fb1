// tb_omega_calc: omega = S sigma mod x^2t for random sigma and syndromes,
// against a log-table convolution; done one clock after start.
module tb_omega_calc;
  import rs_ref_pkg::*;
  localparam int N = 32, K = 28, NR = N - K;
  logic clk = 0, reset = 1, start = 0, done;
  logic [NR:0][7:0] sigma = '0;
  logic [NR-1:0][7:0] syndrome = '0, omega;
  int checks = 0, failures = 0;
  omega_calc dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  sym_t s[], sg[], om[];
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int b = 0; b < 300; b++) begin
      s = new[NR]; sg = new[NR+1];
      foreach (s[i]) s[i] = sym_t'($urandom);
      foreach (sg[i]) sg[i] = sym_t'($urandom);
      evaluator(NR, s, sg, om);
      @(negedge clk) begin
        foreach (s[i]) syndrome[i] = s[i];
        foreach (sg[i]) sigma[i] = sg[i];
        start = 1;
      end
      @(negedge clk) start = 0;
      checks++;
      if (!done) failures++;
      foreach (om[k]) begin
        checks++;
        if (omega[k] != om[k]) begin failures++; $display("FAIL omega_%0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
