// syndrome_calc: Reed-Solomon syndrome calculator.
//
// Computes S_j = r(alpha^j), j = 1..2t, of a received word of N symbols.
// One Horner accumulator per syndrome: S_j <= S_j * alpha^j + r, fed with the
// received symbols highest power first (the order the encoder sends them).
// The constant multipliers alpha^j are folded into XOR networks.
//
// Interface and timing: a symbol is taken on every clock with in_enb high;
// the first symbol after reset or after a completed word starts a new word.
// On the clock after the N-th symbol, out_enb pulses for one cycle and
// syndrome[j-1] holds S_j; the values stay until the next word begins.
// synd_zero is high when every syndrome is zero (the word is a codeword).
// The syndromes are given out in parallel, this design's choice.
module syndrome_calc
  import gf_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 28
) (
  input  logic clk,
  input  logic reset,
  input  logic in_enb,
  input  gf_t  d_in,
  output logic out_enb,
  output gf_t [N-K-1:0] syndrome,
  output logic synd_zero
);

  localparam int unsigned NR = N - K;

  // alpha^1 .. alpha^(N-K), the roots of the generator.
  function automatic gf_t [NR-1:0] root_table();
    for (int unsigned j = 0; j < NR; j++) root_table[j] = gf_alpha_pow(j + 1);
  endfunction
  localparam gf_t [NR-1:0] ROOT = root_table();

  logic [$clog2(N+1)-1:0] in_cnt;

  assign synd_zero = (syndrome == '0);

  always_ff @(posedge clk) begin
    if (reset) begin
      syndrome <= '0;
      in_cnt   <= '0;
      out_enb  <= 1'b0;
    end else begin
      out_enb <= 1'b0;
      if (in_enb) begin
        for (int j = 0; j < NR; j++) begin
          if (in_cnt == '0) syndrome[j] <= d_in;
          else              syndrome[j] <= gf_mul(syndrome[j], ROOT[j]) ^ d_in;
        end
        if (in_cnt == ($bits(in_cnt))'(N-1)) begin
          in_cnt  <= '0;
          out_enb <= 1'b1;
        end else begin
          in_cnt <= in_cnt + 1'b1;
        end
      end
    end
  end

endmodule
