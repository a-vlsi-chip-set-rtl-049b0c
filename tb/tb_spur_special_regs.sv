// Special register test: reset values, software writes and reads, window
// moves with overflow and underflow detection, trap entry and RETT.
module tb_spur_special_regs;
  import spur_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, win_call, win_ret, trap_enter, rett, call_ovf, ret_unf;
  logic [2:0] wr_sel, rd_sel, fpu_status, cwp, swp;
  logic [31:0] wr_data, rd_data;
  logic [29:0] trap_pc_in;
  logic [3:0] trap_cause_in;
  logic [7:0] kpsw, upsw;
  int checks = 0, failures = 0;

  spur_special_regs dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask
  task automatic idle();
    wr_en = 0; win_call = 0; win_ret = 0; trap_enter = 0; rett = 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle(); wr_sel = 0; wr_data = 0; rd_sel = 0; fpu_status = 3'b101; trap_pc_in = 0; trap_cause_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("reset kpsw", kpsw, 8'h40);
    check("reset cwp", cwp, 0);
    // software writes, read back
    for (int s = 0; s < 8; s++) begin
      if (s == 6) continue;
      @(negedge clk); wr_en = 1; wr_sel = 3'(s); wr_data = 32'h5A + 32'(s) * 4;
      @(negedge clk); idle(); rd_sel = 3'(s); #1;
      case (s)
        0, 1, 7: check($sformatf("spec %0d", s), rd_data, (32'h5A + s * 4) & 8'hFF);
        2, 3:    check($sformatf("spec %0d", s), rd_data, (32'h5A + s * 4) & 7);
        4:       check("spec 4", rd_data, (32'h5A + 16) & ~32'h3);
        5:       check("spec 5", rd_data, (32'h5A + 20) & 4'hF);
        default: ;
      endcase
    end
    rd_sel = 6; #1; check("fpu status", rd_data, 5);
    // windows: swp = 0, cwp = 0
    @(negedge clk); wr_en = 1; wr_sel = 2; wr_data = 0;
    @(negedge clk); wr_sel = 3; wr_data = 0;
    @(negedge clk); idle(); #1;
    check("underflow at cwp==swp", ret_unf, 1);
    for (int k = 1; k <= 6; k++) begin
      check($sformatf("no overflow before call %0d", k), call_ovf, 0);
      win_call = 1; @(negedge clk); idle(); #1;
      check("cwp after call", cwp, k);
    end
    check("overflow at cwp=6", call_ovf, 1);
    win_ret = 1; @(negedge clk); idle(); #1;
    check("cwp after return", cwp, 5);
    // trap entry and RETT
    @(negedge clk); wr_en = 1; wr_sel = 0; wr_data = 8'h3F;
    @(negedge clk); idle(); trap_enter = 1; trap_pc_in = 30'h123; trap_cause_in = 4'd6;
    @(negedge clk); idle(); #1;
    check("trap clears trap enable", kpsw[K_TRAP_EN], 0);
    check("trap sets kernel", kpsw[K_KERNEL], 1);
    check("trap advances cwp", cwp, 6);
    rd_sel = 4; #1; check("trap pc", rd_data, 32'h123 << 2);
    rd_sel = 5; #1; check("trap cause", rd_data, 6);
    rett = 1; win_ret = 1; @(negedge clk); idle(); #1;
    check("rett restores kpsw", kpsw, 8'h3F);
    check("rett cwp", cwp, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
