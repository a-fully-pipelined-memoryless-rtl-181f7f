// control1_10: control of one cipher round (rounds 1 to 10). A chain of
// DEPTH 1-bit registers passes the valid flag (load of the round) to done
// with the round's latency, four cycles: two for SubBytes, one for
// MixColumns (or the balancing register of the last round), one for
// AddRoundKey. The depth follows from the 43-cycle total latency; the reset
// is this design's addition.
module control1_10 #(
  parameter int DEPTH = 4
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

  initial assert (DEPTH >= 2) else $error("control1_10: DEPTH must be at least 2");
endmodule
