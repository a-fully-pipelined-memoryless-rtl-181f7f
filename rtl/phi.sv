// phi: maps every byte of a 128-bit block from the standard AES field F1 to
// the composite field F2 with the 8x8 bit matrix PHI (see aes_f2_pkg), and
// registers the result: one clock cycle from d to q. Each output bit is the
// XOR of the input bits selected by one row of PHI. The matrix is the
// published one; registering the output follows the three one-cycle steps
// of the input round.
module phi
  import aes_f2_pkg::*;
#(
  parameter int W = 128
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] mapped;

  always_comb begin
    for (int k = 0; k < W/8; k++) mapped[8*k +: 8] = phi_byte(d[8*k +: 8]);
  end

  always_ff @(posedge clk) q <= mapped;

  initial assert (W % 8 == 0) else $error("phi: W must be a whole number of bytes");
endmodule
