// Internal forwarding test: random addresses and valid bits, including
// forced matches, against a reference priority (destination 1 over
// destination 2 over the register file), counting single and double
// forwards.
module tb_spur_forward;
  import spur_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] src_a, src_b, d1_addr, d2_addr;
  word40_t rf_a, rf_b, d1_data, d2_data, op_a, op_b;
  logic d1_valid, d2_valid;
  logic [1:0] fwd_a, fwd_b;
  int checks = 0, failures = 0, n_double = 0;

  spur_forward dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word40_t ea, eb;
    for (int n = 0; n < 3000; n++) begin
      src_a = 8'($urandom % 8); src_b = 8'($urandom % 8);
      d1_addr = 8'($urandom % 8); d2_addr = 8'($urandom % 8);
      d1_valid = $urandom % 4 != 0; d2_valid = $urandom % 4 != 0;
      rf_a = {$urandom, $urandom}; rf_b = {$urandom, $urandom};
      d1_data = {$urandom, $urandom}; d2_data = {$urandom, $urandom};
      #1;
      ea = (d1_valid && d1_addr == src_a) ? d1_data : (d2_valid && d2_addr == src_a) ? d2_data : rf_a;
      eb = (d1_valid && d1_addr == src_b) ? d1_data : (d2_valid && d2_addr == src_b) ? d2_data : rf_b;
      checks += 2;
      if (op_a !== ea) begin failures++; $display("FAIL a at %0d", n); end
      if (op_b !== eb) begin failures++; $display("FAIL b at %0d", n); end
      if (fwd_a != 0 && fwd_b != 0) n_double++;
      @(posedge clk);
    end
    checks++;
    if (n_double == 0) begin failures++; $display("FAIL no double forwarding seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
