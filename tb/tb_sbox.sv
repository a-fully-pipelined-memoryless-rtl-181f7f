// tb_sbox: streams all 256 byte values, one per cycle, mapped into the
// composite field, and checks two cycles later that the output is the
// composite-field image of the FIPS-197 S-box value (computed as inverse in
// the standard field plus the affine map). Repeated in random order.
module tb_sbox;
  import aes_ref_pkg::*;
  localparam int L = 2;
  logic clk = 1'b0;
  byte_t d = '0, q;
  byte_t hist [$];
  int checks = 0, failures = 0;

  sbox dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256 + 300 + L; i++) begin
      byte_t a;
      @(negedge clk);
      if (hist.size() == L) begin
        checks++;
        if (q !== hist[0]) begin failures++; $display("step %0d: q=%h expected %h", i, q, hist[0]); end
        void'(hist.pop_front());
      end
      a = (i < 256) ? byte_t'(i) : byte_t'($urandom);
      d = phi_ref(a);
      hist.push_back(phi_ref(sbox1(a)));
    end
    // FIPS-197 spot values in the standard field
    checks++;
    if (sbox1(8'h00) !== 8'h63 || sbox1(8'h53) !== 8'hed || sbox1(8'hff) !== 8'h16) begin
      failures++; $display("reference S-box wrong");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
