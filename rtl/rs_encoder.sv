// rs_encoder: systematic Reed-Solomon encoder, RS(N,K) over GF(2^8).
//
// A linear-feedback shift register of N-K symbol registers bb[0..N-K-1]
// divides x^(N-K) M(x) by the generator g(x) = prod_{i=1}^{N-K}(x + alpha^i).
// For each message symbol the feedback fb = d_in + bb[N-K-1] is multiplied by
// the constant coefficients g_0..g_(N-K-1) and added into the register chain
// (bb[0] <= g_0 fb, bb[i] <= bb[i-1] + g_i fb), while the symbol itself goes
// to the output. After the K-th symbol the feedback is gated off and the
// remainder (the parity) is shifted out of bb[N-K-1], highest power first.
//
// Interface and timing: a message symbol is taken on every clock with
// enable high and in_ready high. Each symbol appears on d_out one clock
// later (out_enb and rs_ins high). The N-K parity symbols follow on the N-K
// clocks right after the K-th message symbol (out_enb and rs_calc high).
// During these clocks in_ready is low and enable is ignored, so a new block
// can start on the clock after the last parity symbol has been registered;
// with enable held high a block takes exactly N clocks. The LFSR structure,
// the gating and the one-clock latency follow the encoder description; the
// in_ready handshake and synchronous active-high reset are this design's.
module rs_encoder
  import gf_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 28
) (
  input  logic clk,
  input  logic reset,
  input  logic enable,
  input  gf_t  d_in,
  output logic in_ready,
  output logic out_enb,
  output gf_t  d_out,
  output logic rs_ins,
  output logic rs_calc
);

  localparam int unsigned NR = N - K;

  initial assert (N > K && N <= GF_Q1) else $fatal(1, "rs_encoder: need K < N <= 255");

  // Generator coefficients g_0 .. g_(N-K-1) (g_(N-K) = 1 is implicit).
  function automatic gf_t [NR-1:0] gen_poly();
    for (int unsigned i = 0; i < NR; i++) gen_poly[i] = gen_coef(NR, i);
  endfunction
  localparam gf_t [NR-1:0] G = gen_poly();

  gf_t [NR-1:0] bb;      // parity registers b0 .. b(2t-1)
  gf_t [NR-1:0] bb_nx;
  gf_t          fb;
  logic         par_mode;
  logic [$clog2(K+1)-1:0]  msg_cnt;
  logic [$clog2(NR+1)-1:0] par_cnt;

  assign in_ready = ~par_mode;
  assign fb       = d_in ^ bb[NR-1];

  always_comb begin
    for (int i = 0; i < NR; i++) begin
      if (i == 0) bb_nx[i] = gf_mul(fb, G[0]);
      else        bb_nx[i] = bb[i-1] ^ gf_mul(fb, G[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      bb       <= '0;
      par_mode <= 1'b0;
      msg_cnt  <= '0;
      par_cnt  <= '0;
      out_enb  <= 1'b0;
      d_out    <= '0;
      rs_ins   <= 1'b0;
      rs_calc  <= 1'b0;
    end else begin
      out_enb <= 1'b0;
      rs_ins  <= 1'b0;
      rs_calc <= 1'b0;
      if (par_mode) begin
        d_out   <= bb[NR-1];
        out_enb <= 1'b1;
        rs_calc <= 1'b1;
        bb      <= {bb[NR-2:0], gf_t'(0)};
        if (par_cnt == ($bits(par_cnt))'(NR-1)) begin
          par_cnt  <= '0;
          par_mode <= 1'b0;
        end else begin
          par_cnt <= par_cnt + 1'b1;
        end
      end else if (enable) begin
        d_out   <= d_in;
        out_enb <= 1'b1;
        rs_ins  <= 1'b1;
        bb      <= bb_nx;
        if (msg_cnt == ($bits(msg_cnt))'(K-1)) begin
          msg_cnt  <= '0;
          par_mode <= 1'b1;
        end else begin
          msg_cnt <= msg_cnt + 1'b1;
        end
      end
    end
  end

endmodule
