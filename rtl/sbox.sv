// sbox: AES SubBytes of one byte, computed without a lookup table in the
// composite field F2 = GF(2^4)[x]/(x^2 + x + {8}). Input and output are F2
// bytes b*x + c (b = high nibble, c = low nibble).
//
// The inverse of b*x + c is b*d^-1 * x + (c + b)*d^-1 with
// d = {8}*b^2 + b*c + c^2 (all in GF(2^4)); zero maps to zero.
//   stage 1 (cycle 1): d^-1 through the 16x4 GF(2^4) inverse table, and c + b;
//                      b is registered beside them.
//   stage 2 (cycle 2): the two GF(2^4) products, then the SubBytes affine
//                      transform written in F2 (matrix AFF_F2, constant {c0}).
// Latency two cycles, one new byte per cycle. The split between the stages
// is the published one; the register carrying b is needed by that split.
module sbox
  import aes_f2_pkg::*;
(
  input  logic  clk,
  input  byte_t d,
  output byte_t q
);
  logic [3:0] b, c, d_sq;
  logic [3:0] dinv_q, cb_q, b_q;
  byte_t      inv;

  assign b = d[7:4];
  assign c = d[3:0];
  // {8}*b^2 + b*c + c^2
  assign d_sq = gf4_mul(4'h8, gf4_mul(b, b)) ^ gf4_mul(b, c) ^ gf4_mul(c, c);

  always_ff @(posedge clk) begin
    dinv_q <= gf4_inv(d_sq);
    cb_q   <= c ^ b;
    b_q    <= b;
  end

  assign inv = {gf4_mul(b_q, dinv_q), gf4_mul(cb_q, dinv_q)};

  always_ff @(posedge clk) q <= mat_vec(AFF_F2, inv) ^ AFF_F2_C;
endmodule
