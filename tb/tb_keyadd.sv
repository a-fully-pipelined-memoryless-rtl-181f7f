// tb_keyadd: q must be the XOR of the previous cycle's column a and key k.
module tb_keyadd;
  logic clk = 1'b0;
  logic [31:0] a = '0, k = '0, q, exp_q;
  int checks = 0, failures = 0;

  keyadd dut (.clk(clk), .a(a), .k(k), .q(q));

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
      a = $urandom; k = $urandom;
      for (int j = 0; j < 32; j++) exp_q[j] = (a[j] != k[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
