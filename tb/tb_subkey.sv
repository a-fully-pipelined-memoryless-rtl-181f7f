// tb_subkey: a new random key and round index every cycle. The key and the
// round constant are mapped to the composite field; three cycles later the
// output must be the mapped textbook key-expansion step. Also walks the
// FIPS-197 example key 2b7e1516... through all ten steps and checks the last
// round key d014f9a8 c9ee2589 e13f0cc8 b6630ca6.
module tb_subkey;
  import aes_ref_pkg::*;
  localparam int L = 3;
  logic clk = 1'b0;
  block_t keyin = '0, keyout;
  byte_t  rcon = '0;
  block_t hist [$];
  int checks = 0, failures = 0;

  subkey dut (.clk(clk), .keyin(keyin), .rcon(rcon), .keyout(keyout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t k;
    for (int i = 0; i < 200 + L; i++) begin
      int r;
      @(negedge clk);
      if (hist.size() == L) begin
        checks++;
        if (keyout !== hist[0]) begin failures++; $display("step %0d: %h expected %h", i, keyout, hist[0]); end
        void'(hist.pop_front());
      end
      k = rand_block();
      r = $urandom_range(1, 10);
      keyin = phi_blk(k);
      rcon  = phi_ref(rcon1(r));
      hist.push_back(phi_blk(next_key1(k, rcon1(r))));
    end
    // FIPS-197 key schedule, one step at a time through the hardware
    k = phi_blk(128'h2b7e151628aed2a6abf7158809cf4f3c);
    for (int r = 1; r <= 10; r++) begin
      @(negedge clk); keyin = k; rcon = phi_ref(rcon1(r));
      repeat (L) @(negedge clk);
      k = keyout;
    end
    checks++;
    if (phi_inv_blk(k) !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++; $display("FIPS-197 round key 10 = %h", phi_inv_blk(k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
