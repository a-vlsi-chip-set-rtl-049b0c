// Branch condition test: drives the unit from a real subtraction of
// random operands and compares with the signed and unsigned relations
// computed directly; also the tag form.
module tb_spur_branch_cond;
  import spur_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0] cond;
  logic tag_form, zero, neg, ovf, carry, taken;
  logic [5:0] tag_a, tag_imm;
  int checks = 0, failures = 0;

  spur_branch_cond dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b, d;
    logic [32:0] full;
    logic e;
    for (int n = 0; n < 4000; n++) begin
      a = $urandom; b = (n % 5 == 0) ? a : (n % 7 == 0) ? a + 1 : $urandom;
      full = {1'b0, a} + {1'b0, ~b} + 33'd1;
      d = full[31:0];
      zero = (d == 0); neg = d[31]; carry = full[32];
      ovf = (a[31] != b[31]) && (d[31] != a[31]);
      tag_a = 6'($urandom % 4); tag_imm = 6'($urandom % 4);
      tag_form = (n % 4 == 0);
      cond = 5'($urandom % 12);
      #1;
      if (tag_form) e = (cond == C_EQ) ? tag_a == tag_imm : (cond == C_NE) ? tag_a != tag_imm :
                        (cond == C_ALWAYS);
      else unique case (cond)
        C_EQ: e = a == b;   C_NE: e = a != b;
        C_LT: e = $signed(a) < $signed(b);  C_LE: e = $signed(a) <= $signed(b);
        C_GT: e = $signed(a) > $signed(b);  C_GE: e = $signed(a) >= $signed(b);
        C_LTU: e = a < b;  C_LEU: e = a <= b;  C_GTU: e = a > b;  C_GEU: e = a >= b;
        C_ALWAYS: e = 1;
        default: e = 0;
      endcase
      checks++;
      if (taken !== e) begin failures++; $display("FAIL cond=%0d a=%h b=%h tag=%0d", cond, a, b, tag_form); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
