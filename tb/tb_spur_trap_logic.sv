// Trap logic test: random combinations of conditions and enables against
// a reference priority encoder; vector addresses.
module tb_spur_trap_logic;
  import spur_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic valid, illegal, wovf, wunf, tag_err, gen_err, ovf, fault, fpu_exc, intr, take;
  logic [7:0] kpsw, upsw;
  trap_cause_t cause;
  logic [29:0] vector;
  int checks = 0, failures = 0;

  spur_trap_logic dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trap_cause_t e;
    logic en;
    for (int n = 0; n < 4000; n++) begin
      valid = $urandom % 8 != 0;
      {illegal, wovf, wunf, tag_err, gen_err, ovf, fault, fpu_exc, intr} = 9'($urandom) & 9'($urandom) & 9'($urandom);
      kpsw = 8'($urandom); upsw = 8'($urandom);
      #1;
      en = kpsw[0];
      e = TC_NONE;
      if (valid) begin
        if (fault) e = TC_FAULT;
        else if (illegal) e = TC_ILLEGAL;
        else if (wovf) e = TC_WOVF;
        else if (wunf) e = TC_WUNF;
        else if (tag_err && en && upsw[1]) e = TC_TAG;
        else if (gen_err && en && upsw[2]) e = TC_GEN;
        else if (ovf && en && upsw[0]) e = TC_OVF;
        else if (fpu_exc && en && kpsw[2]) e = TC_FPU;
        else if (intr && en && kpsw[1]) e = TC_INTR;
      end
      checks++;
      if (cause !== e || take !== (e != TC_NONE)) begin
        failures++; $display("FAIL n=%0d cause=%0d exp=%0d", n, cause, e);
      end
      if (take) begin
        checks++;
        if (vector !== 30'h40 + 30'(e) * 4) begin failures++; $display("FAIL vector %h", vector); end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
