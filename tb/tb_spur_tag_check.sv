// Tag checker test: random tags under each kind of check.
module tb_spur_tag_check;
  import spur_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  word40_t a, b;
  logic chk_data, chk_ptr, chk_gen, tag_err, gen_err;
  int checks = 0, failures = 0, n_tag = 0, n_gen = 0;

  spur_tag_check dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic et, eg;
    for (int n = 0; n < 2000; n++) begin
      a = {6'($urandom % 3), 2'($urandom), $urandom};
      b = {6'($urandom % 3), 2'($urandom), $urandom};
      chk_data = $urandom % 2; chk_ptr = $urandom % 2; chk_gen = $urandom % 2;
      #1;
      et = (chk_data && !(a[39:34] == 0 && b[39:34] == 0)) || (chk_ptr && a[39:34] != 1);
      eg = chk_gen && (b[33:32] > a[33:32]);
      n_tag += et; n_gen += eg;
      checks++;
      if (tag_err !== et || gen_err !== eg) begin
        failures++; $display("FAIL a=%h b=%h d%0d p%0d g%0d -> %b %b", a, b, chk_data, chk_ptr, chk_gen, tag_err, gen_err);
      end
      @(posedge clk);
    end
    checks++;
    if (n_tag == 0 || n_gen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
