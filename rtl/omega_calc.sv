// omega_calc: error-evaluator polynomial.
//
// omega(x) = S(x) sigma(x) mod x^2t with S(x) = S_1 + S_2 x + ... +
// S_2t x^(2t-1): omega_k = sum_{i=0..k} sigma_i S_(k-i+1), k = 0..2t-1.
// All products are formed in parallel and the result is registered.
//
// Interface and timing: pulse start with sigma and syndrome valid; done
// pulses on the next clock with omega valid; omega holds until the next
// done. omega[k] is the coefficient of x^k.
module omega_calc
  import gf_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 28
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  gf_t [N-K:0]   sigma,
  input  gf_t [N-K-1:0] syndrome,
  output logic done,
  output gf_t [N-K-1:0] omega
);

  localparam int unsigned NR = N - K;

  gf_t [NR-1:0] omega_nx;

  always_comb begin
    for (int k = 0; k < NR; k++) begin
      omega_nx[k] = '0;
      for (int i = 0; i <= k; i++) omega_nx[k] ^= gf_mul(sigma[i], syndrome[k-i]);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      omega <= '0;
      done  <= 1'b0;
    end else begin
      done <= start;
      if (start) omega <= omega_nx;
    end
  end

endmodule
