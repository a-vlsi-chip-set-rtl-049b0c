// Checks the overlapped-window decoder against an independent model:
// globals shared by all windows, a caller's outgoing registers equal to
// its callee's incoming registers, all 138 physical registers reached,
// and no two live specifiers of one window sharing a register.
module tb_spur_window_dec;
  import spur_pkg::*;
  logic [4:0] spec;
  logic [2:0] cwp;
  logic [7:0] preg;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  spur_window_dec dut (.spec, .cwp, .preg);

  function automatic int model(int s, int w);
    if (s < 10) return s;
    if (s < 16) return 10 + ((w + 7) % 8) * 16 + 10 + (s - 10);
    if (s < 26) return 10 + w * 16 + (s - 16);
    return 10 + w * 16 + 10 + (s - 26);
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [138];
    int p26, p10;
    for (int w = 0; w < 8; w++) begin
      for (int s = 0; s < 32; s++) begin
        spec = 5'(s); cwp = 3'(w); #1;
        checks++;
        if (preg != 8'(model(s, w))) begin
          failures++; $display("FAIL w=%0d s=%0d got %0d", w, s, preg);
        end
        if (preg < 138) seen[preg] = 1;
      end
      // caller's r26+k is callee's r10+k
      for (int k = 0; k < 6; k++) begin
        spec = 5'(26 + k); cwp = 3'(w); #1; p26 = preg;
        spec = 5'(10 + k); cwp = 3'(w + 1); #1; p10 = preg;
        checks++;
        if (p26 != p10) begin failures++; $display("FAIL overlap w=%0d k=%0d", w, k); end
      end
    end
    for (int i = 0; i < 138; i++) begin
      checks++;
      if (!seen[i]) begin failures++; $display("FAIL register %0d unreachable", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
