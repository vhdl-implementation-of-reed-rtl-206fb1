// rs_decoder: Reed-Solomon RS(N,K) decoder over GF(2^8).
//
// The received word passes through five stages, started one after another
// by done pulses:
//   syndrome_calc  S_1..S_2t as the word arrives; the word is also written
//                  into the delay buffer (fifo_delay)
//   euclid_mult    modified Euclidean algorithm, unnormalised locator
//                  lambda(x); bypassed when all syndromes are zero
//   sigma_norm     sigma(x) = lambda(x) / lambda_0 (inversion, then
//                  normalisation) and deg sigma
//   omega_calc     omega(x) = S(x) sigma(x) mod x^2t
//   chien_forney   error positions and values into the error memory,
//                  failure flag when the root count differs from deg sigma
//   error_corrector  received symbols from the delay buffer XOR their error
//                  values, streamed out in reception order
//
// One block is decoded at a time. in_ready is high while the decoder waits
// for, or is taking in, a block; a symbol is taken on each clock with in_enb
// and in_ready high. After the N-th symbol in_ready stays low until the
// corrected block has been given out: d_out with out_enb high, N symbols on
// N consecutive clocks, the last one with dec_done. dec_err is updated when
// the Chien search ends and stays until the next block's search ends; when
// it is set the block is given out uncorrected. The latency from the last
// input symbol to the first output symbol is fixed for a clean word; a word
// with errors adds the Euclid steps (at most 2t) plus one, and GF_M clocks
// for every error found.
module rs_decoder
  import gf_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 28
) (
  input  logic clk,
  input  logic reset,
  input  logic in_enb,
  input  gf_t  d_in,
  output logic in_ready,
  output logic out_enb,
  output gf_t  d_out,
  output logic dec_done,
  output logic dec_err
);

  localparam int unsigned NR = N - K;
  localparam int unsigned AW = $clog2(N);

  typedef enum logic {ACCEPT, BUSY} state_t;
  state_t state;
  logic [$clog2(N+1)-1:0] in_cnt;
  logic take;

  // stage-to-stage signals
  logic              sy_done, sy_zero;
  gf_t [NR-1:0]      syndrome;
  logic              eu_done;
  gf_t [NR:0]        lambda;
  logic [3:0]        eu_iter;
  logic              no_done;
  gf_t [NR:0]        sigma;
  logic [3:0]        deg_sigma;
  logic              om_done;
  gf_t [NR-1:0]      omega;
  logic              ram_we;
  logic [AW-1:0]     ram_addr;
  gf_t               ram_d_in;
  logic              chien_done, ch_err;
  logic [$clog2(N+1)-1:0] root_cnt;
  logic              fifo_re;
  gf_t               fifo_d;
  logic [$clog2(N+1)-1:0] fifo_cnt;
  logic              last;

  assign in_ready = (state == ACCEPT);
  assign take     = in_enb && in_ready;
  assign dec_err  = ch_err;
  assign dec_done = last;

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= ACCEPT;
      in_cnt <= '0;
    end else begin
      unique case (state)
        ACCEPT: if (take) begin
          if (in_cnt == ($bits(in_cnt))'(N-1)) begin
            in_cnt <= '0;
            state  <= BUSY;
          end else begin
            in_cnt <= in_cnt + 1'b1;
          end
        end
        BUSY: if (last) state <= ACCEPT;
        default: state <= ACCEPT;
      endcase
    end
  end

  syndrome_calc #(.N(N), .K(K)) sy (
    .clk(clk), .reset(reset), .in_enb(take), .d_in(d_in),
    .out_enb(sy_done), .syndrome(syndrome), .synd_zero(sy_zero)
  );

  fifo_delay #(.N(N)) wm (
    .clk(clk), .reset(reset), .fifo_we(take), .fifo_in(d_in),
    .fifo_re(fifo_re), .d_out(fifo_d), .count(fifo_cnt)
  );

  euclid_mult #(.N(N), .K(K)) eu (
    .clk(clk), .reset(reset), .start(sy_done), .syndrome(syndrome),
    .synd_zero(sy_zero), .done(eu_done), .lambda(lambda), .iterations(eu_iter)
  );

  sigma_norm #(.N(N), .K(K)) no (
    .clk(clk), .reset(reset), .start(eu_done), .lambda(lambda),
    .done(no_done), .sigma(sigma), .deg_sigma(deg_sigma)
  );

  omega_calc #(.N(N), .K(K)) om (
    .clk(clk), .reset(reset), .start(no_done), .sigma(sigma),
    .syndrome(syndrome), .done(om_done), .omega(omega)
  );

  chien_forney #(.N(N), .K(K)) ch (
    .clk(clk), .reset(reset), .start(om_done), .sigma(sigma), .omega(omega),
    .deg_sigma(deg_sigma), .ram_we(ram_we), .ram_addr(ram_addr),
    .ram_d_in(ram_d_in), .chien_done(chien_done), .dec_err(ch_err),
    .root_cnt(root_cnt)
  );

  error_corrector #(.N(N)) ec (
    .clk(clk), .reset(reset), .ram_we(ram_we), .ram_addr(ram_addr),
    .ram_d_in(ram_d_in), .start(chien_done), .bypass(ch_err),
    .fifo_re(fifo_re), .fifo_d(fifo_d), .out_enb(out_enb), .d_out(d_out),
    .last(last)
  );

  // The whole block is in the delay buffer when the read-out starts.
  a_word_buffered: assert property (@(posedge clk) disable iff (reset)
                     chien_done |-> fifo_cnt == ($bits(fifo_cnt))'(N));

  // The Euclid loop never runs more than 2t steps.
  a_euclid_bound: assert property (@(posedge clk) disable iff (reset)
                    eu_done |-> eu_iter <= ($bits(eu_iter))'(NR));
  // A word that is not flagged had exactly deg sigma roots.
  a_roots_match: assert property (@(posedge clk) disable iff (reset)
                   chien_done && !ch_err |-> root_cnt == ($bits(root_cnt))'(deg_sigma));

endmodule
