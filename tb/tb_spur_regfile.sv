// Register file test: random writes and two-port reads checked against a
// shadow array; a write becomes visible at the next cycle; all 138
// registers are distinct.
module tb_spur_regfile;
  import spur_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] ra_addr, rb_addr, w_addr;
  word40_t ra_data, rb_data, w_data;
  logic we;
  int checks = 0, failures = 0;
  word40_t shadow [138];

  spur_regfile dut (.clk, .ra_addr, .ra_data, .rb_addr, .rb_data, .we, .w_addr, .w_data);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ra_addr = 0; rb_addr = 0; w_addr = 0; w_data = '0;
    // fill every register with a distinct value
    for (int i = 0; i < 138; i++) begin
      @(negedge clk);
      we = 1; w_addr = 8'(i); w_data = {8'(i), 32'(i * 32'h01010101 + 7)};
      shadow[i] = w_data;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 138; i++) begin
      ra_addr = 8'(i); rb_addr = 8'(137 - i); #1;
      checks += 2;
      if (ra_data !== shadow[i] || rb_data !== shadow[137 - i]) begin
        failures++; $display("FAIL read %0d", i);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ra_addr = 8'($urandom % 138); rb_addr = 8'($urandom % 138);
      we = $urandom % 2 == 1; w_addr = 8'($urandom % 138);
      w_data = {$urandom, $urandom};
      #1;
      checks += 2;
      if (ra_data !== shadow[ra_addr] || rb_data !== shadow[rb_addr]) begin
        failures++; $display("FAIL random read %0d", n);
      end
      @(posedge clk);
      if (we) shadow[w_addr] = w_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
