// Workload: the TAK benchmark of the Gabriel LISP benchmark suite,
// tak(18, 12, 6) = 7, run on the CPU at its default sizes.
//
// TAK makes 63,609 calls and recurses deeply enough to overflow the eight
// register windows many times, so this bench also carries real window
// overflow and underflow trap handlers: the overflow handler saves the
// oldest resident window (its ten locals and six ins, 40 bits each, tags
// included) to a spill stack in memory and advances SWP; the underflow
// handler refills the window below and moves SWP back. Each retries the
// call or return that trapped. Arguments travel in the caller's r27-r29
// (the callee's r11-r13) and the result comes back in the callee's r11
// (caller r27); r10 holds the return address written by the call.
// Globals r2-r7 belong to the handlers and the counters.
//
// Checks: the result, the number of calls, that spills happened and
// that spills and fills balance. The external cache answers at once but
// is randomly busy on data accesses; the instruction cache runs in its
// prefetching mode. The cycle count is printed.
//
// The document only says SPUR was judged on "LISP programs (Gabriel
// benchmarks)"; the choice of TAK, its arguments, the call count and the
// handler code are my own. The spill stack sits at byte 0x1800, inside
// the reach of a 14-bit signed immediate.
module tb_spur_tak;
  import spur_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cache_op_t   ext_op;
  logic [31:0] ext_addr;
  word40_t     ext_wdata, ext_rdata;
  logic        ext_kernel, ext_virtual;
  logic [3:0]  ext_status_out;
  logic [4:0]  ext_status_in;
  logic [21:0] fpu_inst;
  logic        fpu_issue, fpu_cancel;
  logic [8:0]  bus_pc;
  logic [1:0]  iu_state;
  logic        scan_out;

  spur_cpu dut (
    .clk, .rst_n, .ext_op, .ext_addr, .ext_wdata, .ext_rdata, .ext_kernel, .ext_virtual,
    .ext_status_out, .ext_status_in, .fpu_inst, .fpu_issue, .fpu_cancel, .fpu_status(3'b000),
    .diag_sep(1'b0), .diag_inst_valid(1'b0), .diag_inst(32'd0), .bus_pc, .iu_state,
    .scan_shift(1'b0), .scan_in(1'b0), .scan_out);

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- assembler ----------------
  word40_t mem [8192];
  int pc;
  function automatic void emit(logic [31:0] i);
    mem[pc] = '{ttype: 6'd0, gen: 2'd0, data: i};
    pc++;
  endfunction
  function automatic logic [31:0] rrr(opcode_t op, int rd, int rs1, int rs2);
    return {op, 5'(rd), 5'(rs1), 1'b0, 5'(rs2), 9'd0};
  endfunction
  function automatic logic [31:0] rri(opcode_t op, int rd, int rs1, int imm);
    return {op, 5'(rd), 5'(rs1), 1'b1, 14'(imm)};
  endfunction
  function automatic logic [31:0] st(int rs2, int rs1, int imm);
    logic [13:0] i14;
    i14 = 14'(imm);
    return {OP_ST, i14[13:9], 5'(rs1), 1'b1, 5'(rs2), i14[8:0]};
  endfunction
  function automatic logic [31:0] brr(cond_t c, int rs1, int rs2, int off);
    return {OP_CMPBR, c, 5'(rs1), 1'b0, 5'(rs2), 9'(off)};
  endfunction
  localparam logic [31:0] NOP = 32'd0;
  localparam int RESULT = 'h1000, DONE = 'h1FFC, SPILL = 'h1800;
  localparam int OVF_H = 'h200, UNF_H = 'h240, TAK = 'h300;

  task automatic build();
    int br_pc, retz_pc;
    for (int i = 0; i < 8192; i++) mem[i] = '0;
    pc = 0;
    emit({OP4_JUMP, 28'h100}); emit(NOP);
    pc = 'h40 + 4 * TC_WOVF; emit({OP4_JUMP, 28'(OVF_H)}); emit(NOP);
    pc = 'h40 + 4 * TC_WUNF; emit({OP4_JUMP, 28'(UNF_H)}); emit(NOP);
    // ---- main, window 0
    pc = 'h100;
    emit(rri(OP_WR_TAG, 1, 1, 0));
    emit(rrr(OP_XOR, 1, 1, 1));                 // r1 = 0
    emit(rri(OP_ADD, 2, 1, SPILL));             // spill stack pointer
    emit(rri(OP_ADD, 5, 1, 0));                 // spills
    emit(rri(OP_ADD, 6, 1, 0));                 // fills
    emit(rri(OP_ADD, 7, 1, 0));                 // calls
    emit(rri(OP_ADD, 3, 1, 'h59));              // trap enable, I-cache, prefetch, kernel
    emit(rri(OP_WR_SPEC, 0, 3, 0));
    emit(rri(OP_ADD, 27, 1, 18));
    emit(rri(OP_ADD, 28, 1, 12));
    emit(rri(OP_ADD, 29, 1, 6));
    emit({OP4_CALL, 28'(TAK)}); emit(NOP);
    emit(st(27, 1, RESULT));
    emit(st(5, 1, RESULT + 4));
    emit(st(6, 1, RESULT + 8));
    emit(st(7, 1, RESULT + 12));
    emit(st(1, 1, DONE));
    emit({OP4_JUMP, 28'(pc)}); emit(NOP);
    // ---- window overflow: spill the oldest window (SWP), SWP += 1
    pc = OVF_H;
    emit(rri(OP_RD_SPEC, 16, 4, 0));            // trap PC, in the handler's local
    emit(rri(OP_RD_SPEC, 3, 3, 0));             // r3 = SWP
    emit(rri(OP_ADD, 4, 3, -1));                // r4 = handler window = SWP - 1
    emit(rri(OP_WR_SPEC, 2, 3, 0));             // CWP := SWP
    for (int r = 10; r < 26; r++) emit(st(r, 2, 4 * (r - 10)));
    emit(rri(OP_ADD, 2, 2, 64));
    emit(rri(OP_ADD, 3, 3, 1));
    emit(rri(OP_WR_SPEC, 3, 3, 0));             // SWP := SWP + 1
    emit(rri(OP_WR_SPEC, 2, 4, 0));             // back to the handler window
    emit(rri(OP_ADD, 5, 5, 1));
    emit(rri(OP_RETT, 0, 16, 0));               // retry the call
    emit(NOP);
    // ---- window underflow: refill window SWP - 1, SWP -= 1
    pc = UNF_H;
    emit(rri(OP_RD_SPEC, 16, 4, 0));
    emit(rri(OP_RD_SPEC, 3, 3, 0));             // r3 = SWP = CWP of the return
    emit(rri(OP_ADD, 4, 3, 1));                 // r4 = handler window
    emit(rri(OP_ADD, 3, 3, -1));
    emit(rri(OP_WR_SPEC, 3, 3, 0));             // SWP := SWP - 1
    emit(rri(OP_WR_SPEC, 2, 3, 0));             // CWP := the window to refill
    emit(rri(OP_ADD, 2, 2, -64));
    for (int r = 10; r < 26; r++) emit(rri(OP_LD, r, 2, 4 * (r - 10)));
    emit(rri(OP_WR_SPEC, 2, 4, 0));             // back to the handler window
    emit(rri(OP_ADD, 6, 6, 1));
    emit(rri(OP_RETT, 0, 16, 0));               // retry the return
    emit(NOP);
    // ---- tak(x = r11, y = r12, z = r13), return address in r10
    pc = TAK;
    emit(rri(OP_ADD, 7, 7, 1));
    br_pc = pc;
    emit(NOP);                                  // branch, patched below
    emit(NOP);
    emit(rri(OP_ADD, 27, 11, -1)); emit(rri(OP_ADD, 28, 12, 0)); emit(rri(OP_ADD, 29, 13, 0));
    emit({OP4_CALL, 28'(TAK)}); emit(NOP);
    emit(rri(OP_ADD, 16, 27, 0));               // a
    emit(rri(OP_ADD, 27, 12, -1)); emit(rri(OP_ADD, 28, 13, 0)); emit(rri(OP_ADD, 29, 11, 0));
    emit({OP4_CALL, 28'(TAK)}); emit(NOP);
    emit(rri(OP_ADD, 17, 27, 0));               // b
    emit(rri(OP_ADD, 27, 13, -1)); emit(rri(OP_ADD, 28, 11, 0)); emit(rri(OP_ADD, 29, 12, 0));
    emit({OP4_CALL, 28'(TAK)}); emit(NOP);
    emit(rri(OP_ADD, 29, 27, 0));               // c
    emit(rri(OP_ADD, 27, 16, 0)); emit(rri(OP_ADD, 28, 17, 0));
    emit({OP4_CALL, 28'(TAK)}); emit(NOP);
    emit(rri(OP_ADD, 11, 27, 0));
    emit(rri(OP_RETURN, 0, 10, 8)); emit(NOP);
    retz_pc = pc;
    emit(rri(OP_ADD, 11, 13, 0));               // y >= x: result z
    emit(rri(OP_RETURN, 0, 10, 8)); emit(NOP);
    mem[br_pc].data = brr(C_GE, 12, 11, retz_pc - br_pc);
  endtask

  // ---------------- external cache ----------------
  logic busy, is_data;
  assign is_data = ext_op != CO_NONE && ext_op != CO_IFETCH && ext_op != CO_PREFETCH;
  assign ext_status_in = {3'b000, 1'b0, busy};
  assign ext_rdata = mem[ext_addr[14:2]];
  bit done = 0;
  always_ff @(posedge clk) begin
    busy <= is_data && !busy && ($urandom % 8 == 0);
    if (rst_n && is_data && !busy && ext_op == CO_STORE) begin
      if (ext_addr == DONE) done <= 1;
      else mem[ext_addr[14:2]] <= ext_wdata;
    end
  end

  int cycles = 0;
  always_ff @(posedge clk) if (rst_n && !done) cycles <= cycles + 1;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    busy = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done);
    repeat (2) @(posedge clk);
    check("tak(18,12,6)", mem[RESULT / 4].data, 7);
    check("calls", mem[RESULT / 4 + 3].data, 63609);
    check("spills happened", mem[RESULT / 4 + 1].data > 0, 1);
    check("spills = fills", mem[RESULT / 4 + 1].data, mem[RESULT / 4 + 2].data);
    $display("tak: %0d cycles, %0d spills", cycles, mem[RESULT / 4 + 1].data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
