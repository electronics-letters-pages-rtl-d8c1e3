// sign_est: 2-bit carry look-ahead sign estimator.
//
// Given a two's complement carry-save pair (c, s) of W = n + 2 bits, it
// returns the sign of T(c) + T(s), where T() clears bits 0 .. n-2, i.e. the
// sign of the sum of the top three bits of each vector taken modulo 2^W:
//
//   SIGN = c[n+1] ^ s[n+1] ^ (G(n) | G(n-1) & P(n))
//   G(i) = c[i] & s[i],  P(n) = c[n] | s[n]
//
// sign = 1 means the estimate is negative. The formula and t = n - 1 follow
// the published sign-estimation method. Combinational: two gate levels past the inputs.
module sign_est #(
  parameter int unsigned N_BITS = 16  // n, the width of the modulus
) (
  input  logic [N_BITS+1:0] c,
  input  logic [N_BITS+1:0] s,
  output logic              sign
);
  logic g_n, g_nm1, p_n;

  always_comb begin
    g_n   = c[N_BITS] & s[N_BITS];
    g_nm1 = c[N_BITS-1] & s[N_BITS-1];
    p_n   = c[N_BITS] | s[N_BITS];
    sign  = c[N_BITS+1] ^ s[N_BITS+1] ^ (g_n | (g_nm1 & p_n));
  end
endmodule
