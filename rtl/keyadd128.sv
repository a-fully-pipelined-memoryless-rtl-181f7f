// keyadd128: the extra AddRoundKey in front of the first round. XORs the
// 128-bit state with round key 0 (the cipher key, already mapped to F2) and
// registers the sum: one clock cycle from a/b to q. XOR is addition in F1
// and F2 alike, so no field mapping is needed here.
module keyadd128 (
  input  logic         clk,
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic [127:0] q
);
  always_ff @(posedge clk) q <= a ^ b;
endmodule
