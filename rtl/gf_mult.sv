// gf_mult: bit-parallel GF(2^8) multiplier (combinational).
//
// The two operands are multiplied as polynomials over GF(2), giving a
// 15-bit partial product whose bits are the XOR of the AND terms a_i b_j with
// i + j = k. The high bits x^14 .. x^8 are then folded back, highest first,
// using x^8 = x^4 + x^3 + x^2 + 1, until a degree-7 result remains. This is
// the two-step product (partial products, then reduction modulo the field
// polynomial) of the standard-basis multiplier; it gives one product per
// clock cycle of the surrounding logic.
//
// Interface: a, b operands; p = a*b. No clock, no latency.
module gf_mult
  import gf_pkg::*;
(
  input  gf_t a,
  input  gf_t b,
  output gf_t p
);

  localparam int unsigned PW = 2*GF_M - 1;   // extended-form product width

  logic [PW-1:0] pp;   // partial products summed, degree <= 14
  logic [PW-1:0] red;  // during reduction

  always_comb begin
    pp = '0;
    for (int j = 0; j < GF_M; j++)
      if (b[j]) pp ^= PW'(a) << j;
    red = pp;
    // x^k = x^(k-8) * (x^4 + x^3 + x^2 + 1): clear bit k, add the fold.
    for (int k = PW-1; k >= GF_M; k--)
      if (red[k]) red ^= (PW'(1) << k) | (PW'(GF_POLY) << (k - GF_M));
    p = red[GF_M-1:0];
  end

endmodule
