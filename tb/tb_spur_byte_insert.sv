// Byte inserter test: each byte position and the tag mode, with the
// untouched parts of the word checked too.
module tb_spur_byte_insert;
  import spur_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  word40_t w, y, e;
  logic [7:0] b;
  logic [1:0] sel;
  logic tag_mode;
  int checks = 0, failures = 0;

  spur_byte_insert dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] mask;
    for (int n = 0; n < 1000; n++) begin
      w = {$urandom, $urandom}; b = 8'($urandom); sel = 2'($urandom); tag_mode = $urandom % 3 == 0;
      #1;
      mask = 32'hFF << (8 * sel);
      if (tag_mode) e = {b, w.data};
      else          e = {w[39:32], (w.data & ~mask) | ((32'(b) << (8 * sel)) & mask)};
      checks++;
      if (y !== e) begin failures++; $display("FAIL w=%h b=%h sel=%0d tag=%0d y=%h", w, b, sel, tag_mode, y); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
