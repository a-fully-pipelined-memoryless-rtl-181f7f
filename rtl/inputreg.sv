// inputreg: input register of the encryptor. Captures d on the rising clock
// edge when load is high and holds its value otherwise, so the word on the
// input bus is taken only when the user marks it with load. One cycle from
// d to q. Used twice at the input, once for the plaintext and once for the
// key. The width defaults to 128 bits; holding while load is low is this
// design's reading of "loaded when load is high". No reset: the value is
// qualified downstream by the done pipeline.
module inputreg #(
  parameter int W = 128
) (
  input  logic         clk,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (load) q <= d;
  end
endmodule
