// Address adder test: random 30-bit sums with carry-in and carry-out,
// including the longest carry chain.
module tb_spur_addr_adder;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [29:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  spur_addr_adder dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [30:0] e;
    for (int n = 0; n < 2000; n++) begin
      a = (n == 0) ? 30'h3FFFFFFF : 30'($urandom);
      b = (n == 0) ? 30'd0 : 30'($urandom);
      cin = (n == 0) ? 1'b1 : 1'($urandom);
      #1;
      e = {1'b0, a} + {1'b0, b} + 31'(cin);
      checks++;
      if ({cout, sum} !== e) begin failures++; $display("FAIL %h + %h + %0d = %h", a, b, cin, {cout, sum}); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
