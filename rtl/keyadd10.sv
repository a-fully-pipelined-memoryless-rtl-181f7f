// keyadd10: the last AddRoundKey fused with the way back to the standard
// field. Computes PHI_INV(a XOR k) byte by byte and registers it, so q is
// the ciphertext in the ordinary AES representation. One cycle from a/k to
// q, the last cycle of round 10.
module keyadd10
  import aes_f2_pkg::*;
(
  input  logic   clk,
  input  block_t a,
  input  block_t k,
  output block_t q
);
  always_ff @(posedge clk) q <= phi_inv_block(a ^ k);
endmodule
