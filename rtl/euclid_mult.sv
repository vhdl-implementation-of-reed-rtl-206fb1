// euclid_mult: key-equation solver, modified (inversion-free) Euclidean
// algorithm.
//
// Finds the error-locator lambda(x) with lambda(x) S(x) = R(x) mod x^2t and
// deg R < t, where S(x) = S_1 + S_2 x + ... + S_2t x^(2t-1). Four polynomial
// registers are kept: R and Q (the remainders) and lambda and mu (their
// multipliers of S), started as R = x^2t, Q = S(x), lambda = 0, mu = 1.
// Each step, with l = deg R - deg Q, a = lead(R), b = lead(Q):
//   l >= 0:  R <- b R + a x^l Q,        lambda <- b lambda + a x^l mu
//   l <  0:  R <- a Q + b x^-l R, Q <- R, lambda <- a mu + b x^-l lambda,
//            mu <- lambda
// (in GF(2^m) subtraction is addition). Cross-multiplying by the leading
// coefficients cancels the top term without any field division. The loop
// ends when deg R < t; lambda is then sigma(x) up to a constant factor, which
// the normalisation stage removes.
//
// One step is done per clock, all coefficient products in parallel. A word
// with all syndromes zero bypasses the loop (lambda = 1). At most 2t steps
// are taken.
//
// Interface and timing: pulse start with syndrome/synd_zero valid. done
// pulses for one cycle when lambda is valid: 1 clock after start for the
// bypass, otherwise (steps + 2) clocks after start, at most 2t + 2. lambda
// and iterations hold until the next start. lambda[i] is the coefficient of
// x^i.
module euclid_mult
  import gf_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 28
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  gf_t [N-K-1:0] syndrome,
  input  logic synd_zero,
  output logic done,
  output gf_t [N-K:0] lambda,
  output logic [3:0] iterations
);

  localparam int unsigned NR = N - K;     // 2t
  localparam int unsigned T  = NR / 2;
  localparam int unsigned W  = NR + 1;    // coefficients kept per polynomial

  typedef gf_t [W-1:0] poly_t;
  typedef enum logic [1:0] {IDLE, RUN} state_t;

  state_t state;
  poly_t  rr, qq, ll, mu;
  poly_t  rr_nx, qq_nx, ll_nx, mu_nx;
  int     deg_r, deg_q;

  // Degree of a polynomial; -1 for the zero polynomial.
  function automatic int degree(poly_t p);
    degree = -1;
    for (int i = 0; i < W; i++) if (p[i] != '0) degree = i;
  endfunction

  // p * x^s, truncated to W coefficients.
  function automatic poly_t shift_up(poly_t p, int s);
    poly_t r;
    for (int i = 0; i < W; i++) r[i] = (i >= s) ? p[i-s] : gf_t'(0);
    return r;
  endfunction

  // c1 * p1 + c2 * p2, coefficient by coefficient.
  function automatic poly_t lin_comb(gf_t c1, poly_t p1, gf_t c2, poly_t p2);
    poly_t r;
    for (int i = 0; i < W; i++) r[i] = gf_mul(c1, p1[i]) ^ gf_mul(c2, p2[i]);
    return r;
  endfunction

  always_comb begin
    gf_t a, b;
    int  l;
    deg_r = degree(rr);
    deg_q = degree(qq);
    l     = deg_r - deg_q;
    a     = (deg_r >= 0) ? rr[deg_r] : gf_t'(0);
    b     = (deg_q >= 0) ? qq[deg_q] : gf_t'(0);
    if (l >= 0) begin
      rr_nx = lin_comb(b, rr, a, shift_up(qq, l));
      ll_nx = lin_comb(b, ll, a, shift_up(mu, l));
      qq_nx = qq;
      mu_nx = mu;
    end else begin
      rr_nx = lin_comb(a, qq, b, shift_up(rr, -l));
      ll_nx = lin_comb(a, mu, b, shift_up(ll, -l));
      qq_nx = rr;
      mu_nx = ll;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state      <= IDLE;
      rr         <= '0;
      qq         <= '0;
      ll         <= '0;
      mu         <= '0;
      lambda     <= '0;
      iterations <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          iterations <= '0;
          if (synd_zero) begin
            lambda    <= poly_t'(1);
            done      <= 1'b1;
          end else begin
            rr        <= '0;
            rr[NR]    <= gf_t'(1);
            qq        <= poly_t'(syndrome);
            ll        <= '0;
            mu        <= poly_t'(1);
            state     <= RUN;
          end
        end
        RUN: begin
          if (deg_r < int'(T) || iterations == 4'(NR)) begin
            lambda <= ll;
            done   <= 1'b1;
            state  <= IDLE;
          end else begin
            rr         <= rr_nx;
            qq         <= qq_nx;
            ll         <= ll_nx;
            mu         <= mu_nx;
            iterations <= iterations + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
