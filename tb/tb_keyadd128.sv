// tb_keyadd128: q must be the XOR of the previous cycle's a and b.
module tb_keyadd128;
  logic clk = 1'b0;
  logic [127:0] a = '0, b = '0, q, exp_q;
  int checks = 0, failures = 0;

  keyadd128 dut (.clk(clk), .a(a), .b(b), .q(q));

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
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      for (int k = 0; k < 128; k++) exp_q[k] = (a[k] != b[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
