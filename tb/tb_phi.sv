// tb_phi: feeds every byte value in every byte lane (plus random blocks) and
// compares with a map to the composite field rebuilt from composite-field
// arithmetic in aes_ref_pkg. Checks the one-cycle latency by comparing with
// the input of the previous cycle. Also checks that the field map respects
// multiplication: phi(a*b) = phi(a)*phi(b) for random pairs, run through the
// hardware.
module tb_phi;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  block_t d = '0, q, exp_q;
  int checks = 0, failures = 0;

  phi dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (q !== exp_q) begin failures++; $display("cycle %0d: q=%h expected %h", i, q, exp_q); end
      end
      if (i < 256) for (int k = 0; k < 16; k++) d[8*k +: 8] = byte_t'((i + 17*k) % 256);
      else d = rand_block();
      exp_q = phi_blk(d);
    end
    // homomorphism check: the image of a product is the product of the images
    for (int i = 0; i < 32; i++) begin
      byte_t a, b, pa, pb, pab;
      a = byte_t'($urandom); b = byte_t'($urandom);
      @(negedge clk); d = {a, b, mul1(a, b), 104'h0};
      @(negedge clk);
      pa = q[127:120]; pb = q[119:112]; pab = q[111:104];
      checks++;
      if (mul2f(pa, pb) !== pab) begin failures++; $display("phi(%h*%h) mismatch", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
