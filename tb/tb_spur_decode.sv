// Opcode decoder test: the control word of each instruction class, the
// coprocessor rules with the FPU enabled and disabled, and undefined
// opcodes.
module tb_spur_decode;
  import spur_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] inst;
  logic fpu_en;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  spur_decode dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask
  task automatic dec(logic [6:0] op, logic en = 1);
    inst = {op, 25'h1ABCDE}; fpu_en = en; #1;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dec(OP_ADD);  check("add legal", ctrl.legal, 1); check("add wr", ctrl.wr_rd, 1); check("add alu", ctrl.alu_op, ALU_ADD);
    dec(OP_SUB);  check("sub alu", ctrl.alu_op, ALU_SUB);
    dec(OP_XOR);  check("xor alu", ctrl.alu_op, ALU_XOR);
    dec(OP_ADD_T); check("add_t checks", {ctrl.chk_data, ctrl.chk_ovf}, 2'b11);
    dec(OP_SRA);  check("sra", {ctrl.res_sel, ctrl.shift_kind}, {RES_SHIFT, 2'd2});
    dec(OP_LD);   check("ld", {ctrl.is_load, ctrl.wr_rd, ctrl.cache_op}, {2'b11, CO_LOAD});
    dec(OP_LD_T); check("ld_t ptr check", ctrl.chk_ptr, 1);
    dec(OP_LD_S3); check("special load op", ctrl.cache_op, 4'(CO_LD_S0) + 3);
    dec(OP_ST);   check("st", {ctrl.is_store, ctrl.wr_rd, ctrl.store_imm, ctrl.cache_op}, {3'b101, CO_STORE});
    dec(OP_ST_40); check("st_40 gen", ctrl.chk_gen, 1);
    dec(OP_ST_S2); check("special store op", ctrl.cache_op, CO_ST_S2);
    dec(OP_CMPBR); check("branch", {ctrl.is_branch, ctrl.alu_op}, {1'b1, ALU_SUB});
    dec(OP_CMPBR_TAG); check("tag branch", {ctrl.is_branch, ctrl.is_tag_branch}, 2'b11);
    dec(OP_RETURN); check("return", {ctrl.is_return, ctrl.is_rett}, 2'b10);
    dec(OP_RETT);   check("rett", {ctrl.is_return, ctrl.is_rett}, 2'b11);
    dec(OP_RD_SPEC); check("rd_spec", ctrl.res_sel, RES_SPEC);
    dec(OP_WR_SPEC); check("wr_spec", {ctrl.wr_spec, ctrl.wr_rd}, 2'b10);
    dec(OP_WR_TAG); check("wr_tag", ctrl.res_sel, RES_WRTAG);
    inst = {OP4_CALL, 28'h123}; #1; check("call", {ctrl.is_call, ctrl.wr_rd, ctrl.res_sel}, {2'b11, RES_LINK});
    inst = {OP4_JUMP, 28'h123}; #1; check("jump", {ctrl.is_jump, ctrl.wr_rd}, 2'b10);
    // coprocessor
    for (int op = 'h40; op <= 'h53; op++) begin
      dec(7'(op), 0); check($sformatf("fp %0h disabled illegal", op), ctrl.legal, 0);
      dec(7'(op), 1); check($sformatf("fp %0h enabled legal", op), ctrl.legal, 1);
      check($sformatf("fp %0h no register write", op), ctrl.wr_rd, 0);
      check($sformatf("fp %0h memory", op), ctrl.fpu_mem, (op == OP_FP_LD || op == OP_FP_ST) ? 1 : 0);
    end
    dec(7'h3F); check("undefined illegal", ctrl.legal, 0);
    dec(7'h15); check("undefined illegal 2", ctrl.legal, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
