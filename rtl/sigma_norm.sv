// sigma_norm: normalisation of the error-locator polynomial.
//
// The Euclidean solver delivers lambda(x) = c * sigma(x) for an unknown
// constant c = lambda_0. This stage inverts lambda_0 with the sequential
// continuous-square inverter (state INVERSION), then multiplies every
// coefficient by the inverse with one bit-parallel multiplier per
// coefficient (state NORMALIZATION), so that sigma_0 = 1. It also gives the
// degree of sigma(x), which the Chien search compares with its root count.
//
// Interface and timing: pulse start with lambda valid; lambda is sampled on
// the start clock. done pulses for one cycle GF_M + 2 clocks after start,
// with sigma and deg_sigma valid; they hold until the next done. If
// lambda_0 = 0 the inverse is 0 and sigma becomes 0 (the word is then
// reported uncorrectable downstream).
module sigma_norm
  import gf_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 28
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  gf_t [N-K:0] lambda,
  output logic done,
  output gf_t [N-K:0] sigma,
  output logic [3:0] deg_sigma
);

  localparam int unsigned W = N - K + 1;

  typedef enum logic [1:0] {IDLE, INVERSION, NORMALIZATION} state_t;
  state_t state;

  gf_t [W-1:0] lam_q;
  gf_t [W-1:0] prod;
  gf_t         inv_val;
  logic        inv_done, inv_busy;
  gf_t         inv_q;

  gf_inv u_inv (
    .clk(clk), .reset(reset), .start(start && state == IDLE), .d_in(lambda[0]),
    .busy(inv_busy), .done(inv_done), .d_out(inv_val)
  );

  for (genvar i = 0; i < W; i++) begin : g_norm
    gf_mult u_mul (.a(lam_q[i]), .b(inv_q), .p(prod[i]));
  end

  function automatic logic [3:0] degree(gf_t [W-1:0] p);
    degree = '0;
    for (int i = 0; i < W; i++) if (p[i] != '0) degree = 4'(i);
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= IDLE;
      lam_q     <= '0;
      inv_q     <= '0;
      sigma     <= '0;
      deg_sigma <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          lam_q <= lambda;
          state <= INVERSION;
        end
        INVERSION: if (inv_done) begin
          inv_q <= inv_val;
          state <= NORMALIZATION;
        end
        NORMALIZATION: begin
          sigma     <= prod;
          deg_sigma <= degree(prod);
          done      <= 1'b1;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The inverter is started only from IDLE, so it is never busy then.
  a_inv_free: assert property (@(posedge clk) disable iff (reset)
                start && state == IDLE |-> !inv_busy);

endmodule
