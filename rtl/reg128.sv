// reg128: plain pipeline register, one clock cycle from d to q. It is the
// balancing stage that keeps the key path and the data path of a round the
// same number of cycles long (round0: key beside keyadd128; round1_9:
// round key beside the data round; round10: data beside the 3-cycle key
// expansion). Width defaults to 128 bits. No reset.
module reg128 #(
  parameter int W = 128
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) q <= d;
endmodule
