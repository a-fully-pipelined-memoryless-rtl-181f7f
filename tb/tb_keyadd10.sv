// tb_keyadd10: random state and key in the composite field; one cycle later
// q must be the XOR of the two mapped back to the standard field.
module tb_keyadd10;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  block_t a = '0, k = '0, q, exp_q;
  int checks = 0, failures = 0;

  keyadd10 dut (.clk(clk), .a(a), .k(k), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      block_t x, y;
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (q !== exp_q) begin failures++; $display("step %0d: q=%h expected %h", i, q, exp_q); end
      end
      // operands chosen in the standard field, then mapped
      x = rand_block(); y = rand_block();
      a = phi_blk(x); k = phi_blk(y);
      exp_q = x ^ y;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
