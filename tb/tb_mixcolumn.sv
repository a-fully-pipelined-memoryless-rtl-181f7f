// tb_mixcolumn: random columns (and the FIPS-197 example column) in the
// standard field are mapped to the composite field and fed to the block;
// one cycle later the output must be the mapped result of the textbook
// xtime-based MixColumns.
module tb_mixcolumn;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  word_t d = '0, q, exp_q;
  int checks = 0, failures = 0;

  function automatic word_t phi_w(input word_t w);
    return {phi_ref(w[31:24]), phi_ref(w[23:16]), phi_ref(w[15:8]), phi_ref(w[7:0])};
  endfunction

  mixcolumn dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (mix_col1(32'hdb135345) !== 32'h8e4da1bc) begin
      failures++; $display("reference MixColumns wrong");
    end
    for (int i = 0; i < 300; i++) begin
      word_t a;
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (q !== exp_q) begin failures++; $display("step %0d: q=%h expected %h", i, q, exp_q); end
      end
      a = (i == 0) ? 32'hdb135345 : $urandom;
      d = phi_w(a);
      exp_q = phi_w(mix_col1(a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
