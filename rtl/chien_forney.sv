// chien_forney: Chien search for the error locations and Forney's formula
// for the error values.
//
// Position k of a block (k = 0 for the first received symbol) holds the
// coefficient of x^(N-1-k), so its locator is X = alpha^(N-1-k) and the
// search tests x = X^-1. Classic Chien term registers hold sigma_i x^i and
// omega_i x^i; they start at coefficient * alpha^(-(N-1)i) and are multiplied
// by the constant alpha^i every step, so each position costs one clock.
//   sigma(x)  = sum of all sigma terms           (zero at an error)
//   sigma'(x) = (sum of odd sigma terms) * X     (formal derivative)
//   omega(x)  = sum of omega terms
// At a root the error value e = omega(x) / sigma'(x) is formed with the
// sequential inverter and one multiplier, which stalls the search for the
// inverter's latency. Every position writes one error value (zero where
// there is no root) into the error memory, in reception order. When the
// search ends the number of roots is compared with deg sigma: a mismatch,
// or deg sigma > t, marks the word uncorrectable. A third test, this
// design's addition, also flags deg omega >= deg sigma: such a sigma/omega
// pair cannot come from <= t errors, and without the test some words with
// more than t errors would be "corrected" into a non-codeword.
//
// Interface and timing: pulse start with sigma, omega and deg_sigma valid;
// they are sampled on the start clock. One ram_we pulse per position,
// addresses 0..N-1 in order. The search takes N clocks plus GF_M more clocks
// per root; chien_done pulses for one cycle after the last write, with
// dec_err and root_cnt valid (held until the next start).
module chien_forney
  import gf_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 28
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  gf_t [N-K:0]   sigma,
  input  gf_t [N-K-1:0] omega,
  input  logic [3:0]    deg_sigma,
  output logic ram_we,
  output logic [$clog2(N)-1:0] ram_addr,
  output gf_t  ram_d_in,
  output logic chien_done,
  output logic dec_err,
  output logic [$clog2(N+1)-1:0] root_cnt
);

  localparam int unsigned NR = N - K;
  localparam int unsigned T  = NR / 2;
  localparam int unsigned W  = NR + 1;
  localparam int unsigned AW = $clog2(N);

  // alpha^(-(N-1) i): term start values; alpha^i: per-step factors.
  function automatic gf_t [W-1:0] start_table();
    for (int unsigned i = 0; i < W; i++)
      start_table[i] = gf_alpha_pow(((GF_Q1 - (N - 1)) * i) % GF_Q1);
  endfunction
  function automatic gf_t [W-1:0] step_table();
    for (int unsigned i = 0; i < W; i++) step_table[i] = gf_alpha_pow(i);
  endfunction
  localparam gf_t [W-1:0] START = start_table();
  localparam gf_t [W-1:0] STEP  = step_table();
  localparam gf_t X_FIRST = gf_alpha_pow(N - 1);       // locator of position 0
  localparam gf_t ALPHA_INV = gf_alpha_pow(GF_Q1 - 1); // alpha^-1

  typedef enum logic [1:0] {IDLE, SEARCH, WAIT_INV} state_t;
  state_t state;

  gf_t [W-1:0]  sterm;
  gf_t [NR-1:0] oterm;
  gf_t          xpos;          // locator X of the current position
  logic [AW-1:0] step_cnt;
  logic [3:0]   deg_q;
  gf_t          sig_val, odd_sum, om_val, den, om_q;
  gf_t          inv_val, err_val;
  logic         inv_done, inv_busy;
  logic         is_root;
  logic         om_bad;        // deg omega >= deg sigma

  // deg p + 1 (0 for the zero polynomial)
  function automatic logic [3:0] len_of(gf_t [NR-1:0] p);
    len_of = '0;
    for (int i = 0; i < NR; i++) if (p[i] != '0) len_of = 4'(i + 1);
  endfunction

  always_comb begin
    sig_val = '0;
    odd_sum = '0;
    om_val  = '0;
    for (int i = 0; i < W; i++) begin
      sig_val ^= sterm[i];
      if (i % 2 == 1) odd_sum ^= sterm[i];
    end
    for (int i = 0; i < NR; i++) om_val ^= oterm[i];
  end
  assign is_root = (state == SEARCH) && (sig_val == '0);

  gf_mult u_den (.a(odd_sum), .b(xpos),    .p(den));
  gf_mult u_val (.a(om_q),    .b(inv_val), .p(err_val));

  gf_inv u_inv (
    .clk(clk), .reset(reset), .start(is_root), .d_in(den),
    .busy(inv_busy), .done(inv_done), .d_out(inv_val)
  );

  // A position is finished when it is no root, or when its error value is
  // ready; it is then written and the terms move on.
  logic adv, adv_root;
  logic [$clog2(N+1)-1:0] roots_nx;
  assign adv      = (state == SEARCH && sig_val != '0) || (state == WAIT_INV && inv_done);
  assign adv_root = (state == WAIT_INV);
  assign roots_nx = root_cnt + ($bits(roots_nx))'(adv_root);

  always_ff @(posedge clk) begin
    if (reset) begin
      state      <= IDLE;
      sterm      <= '0;
      oterm      <= '0;
      xpos       <= '0;
      step_cnt   <= '0;
      deg_q      <= '0;
      om_q       <= '0;
      om_bad     <= 1'b0;
      ram_we     <= 1'b0;
      ram_addr   <= '0;
      ram_d_in   <= '0;
      chien_done <= 1'b0;
      dec_err    <= 1'b0;
      root_cnt   <= '0;
    end else begin
      ram_we     <= 1'b0;
      chien_done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          for (int i = 0; i < W; i++)  sterm[i] <= gf_mul(sigma[i], START[i]);
          for (int i = 0; i < NR; i++) oterm[i] <= gf_mul(omega[i], START[i]);
          xpos     <= X_FIRST;
          step_cnt <= '0;
          deg_q    <= deg_sigma;
          om_bad   <= (len_of(omega) > deg_sigma);
          root_cnt <= '0;
          dec_err  <= 1'b0;
          state    <= SEARCH;
        end
        SEARCH: if (sig_val == '0) begin
          om_q  <= om_val;
          state <= WAIT_INV;
        end
        WAIT_INV: ;
        default: state <= IDLE;
      endcase
      if (adv) begin
        ram_we   <= 1'b1;
        ram_addr <= step_cnt;
        ram_d_in <= adv_root ? err_val : gf_t'(0);
        root_cnt <= roots_nx;
        for (int i = 0; i < W; i++)  sterm[i] <= gf_mul(sterm[i], STEP[i]);
        for (int i = 0; i < NR; i++) oterm[i] <= gf_mul(oterm[i], STEP[i]);
        xpos     <= gf_mul(xpos, ALPHA_INV);
        step_cnt <= step_cnt + 1'b1;
        state    <= SEARCH;
        if (step_cnt == AW'(N-1)) begin
          state      <= IDLE;
          chien_done <= 1'b1;
          dec_err    <= (roots_nx != ($bits(roots_nx))'(deg_q)) || (deg_q > 4'(T)) || om_bad;
        end
      end
    end
  end

  // A root is only found while the inverter is free.
  a_inv_free: assert property (@(posedge clk) disable iff (reset)
                is_root |-> !inv_busy);

endmodule
