// Shifter test: every kind and amount on random words.
module tb_spur_shifter;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] a, y, e;
  logic [1:0] amount, kind;
  int checks = 0, failures = 0;

  spur_shifter dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      a = $urandom; amount = 2'($urandom); kind = 2'($urandom % 3);
      #1;
      e = a;
      for (int i = 0; i < amount; i++)
        e = (kind == 0) ? {e[30:0], 1'b0} : (kind == 1) ? {1'b0, e[31:1]} : {e[31], e[31:1]};
      checks++;
      if (y !== e) begin failures++; $display("FAIL a=%h amt=%0d kind=%0d y=%h", a, amount, kind, y); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
