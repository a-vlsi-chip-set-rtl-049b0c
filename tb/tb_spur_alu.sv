// ALU test: random and corner operands for every operation against
// SystemVerilog arithmetic, including carry, overflow, zero and sign.
module tb_spur_alu;
  import spur_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  alu_op_t op;
  logic [31:0] a, b, y;
  logic zero, neg, ovf, carry;
  int checks = 0, failures = 0;

  spur_alu dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] full;
    logic [31:0] ey;
    logic ev, ec;
    logic [31:0] corner [6] = '{32'h0, 32'hFFFFFFFF, 32'h7FFFFFFF, 32'h80000000, 32'h1, 32'h00FF00FF};
    for (int n = 0; n < 6000; n++) begin
      op = alu_op_t'($urandom % 5);
      a = (n % 4 == 0) ? corner[$urandom % 6] : $urandom;
      b = (n % 3 == 0) ? corner[$urandom % 6] : $urandom;
      #1;
      ec = 0; ev = 0;
      unique case (op)
        ALU_ADD: begin full = {1'b0, a} + {1'b0, b}; ey = full[31:0]; ec = full[32];
                       ev = (a[31] == b[31]) && (ey[31] != a[31]); end
        ALU_SUB: begin full = {1'b0, a} + {1'b0, ~b} + 33'd1; ey = full[31:0]; ec = full[32];
                       ev = (a[31] != b[31]) && (ey[31] != a[31]); end
        ALU_AND: ey = a & b;
        ALU_OR:  ey = a | b;
        default: ey = a ^ b;
      endcase
      checks++;
      if (y !== ey || zero !== (ey == 0) || neg !== ey[31]) begin
        failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, ey);
      end
      if (op == ALU_ADD || op == ALU_SUB) begin
        checks++;
        if (ovf !== ev || carry !== ec) begin
          failures++; $display("FAIL flags op=%0d a=%h b=%h v=%b c=%b", op, a, b, ovf, carry);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
