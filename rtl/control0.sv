// control0: control of the input round. A chain of DEPTH 1-bit registers
// delays load so that done rises exactly when the block loaded with it
// leaves round0 (three cycles: input register, PHI, initial AddRoundKey).
// The reset clears the chain so no false done appears after power-up; the
// reset is this design's addition.
module control0 #(
  parameter int DEPTH = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  output logic done
);
  logic [DEPTH-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[DEPTH-2:0], load};
  end

  assign done = sr[DEPTH-1];

  initial assert (DEPTH >= 2) else $error("control0: DEPTH must be at least 2");
endmodule
