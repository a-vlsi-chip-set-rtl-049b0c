// Byte extractor test: each byte position and the tag mode.
module tb_spur_byte_extract;
  import spur_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  word40_t w;
  logic [1:0] sel;
  logic tag_mode;
  logic [31:0] y, e;
  int checks = 0, failures = 0;

  spur_byte_extract dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      w = {$urandom, $urandom}; sel = 2'($urandom); tag_mode = $urandom % 3 == 0;
      #1;
      e = tag_mode ? {24'd0, w[39:32]} : (w.data >> (8 * sel)) & 32'hFF;
      checks++;
      if (y !== e) begin failures++; $display("FAIL w=%h sel=%0d tag=%0d y=%h", w, sel, tag_mode, y); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
