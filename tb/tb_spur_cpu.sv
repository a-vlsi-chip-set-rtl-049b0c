// End-to-end test of the CPU at its default sizes.
//
// A program, assembled here by small functions, is placed in a
// behavioural external cache (40-bit words, tag bits included) together
// with trap handlers. The model answers every external access in the
// same cycle, randomly holds data accesses with busy, randomly ignores
// prefetches, faults on addresses with bit 30 set, and raises one
// interrupt. A small FPU model turns busy after each coprocessor
// instruction and raises one exception. The program exercises, and this
// bench counts: instruction-cache disabled mode and the switch to the
// prefetching mode, demand misses and prefetches, single and double
// forwarding, use of a loaded word by the next instruction, delayed branches, calls and returns
// with window overlap, window overflow and underflow traps, tag, pointer,
// generation and overflow traps, illegal instructions, MMU/CC faults,
// busy stalls, FPU stalls and exceptions, interrupts and special cache
// opcodes. Results the program stores are compared with values worked
// out by hand, and the steady-state loop is checked to run one
// instruction per cycle.
module tb_spur_cpu;
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
  logic [2:0]  fpu_status;
  logic [8:0]  bus_pc;
  logic [1:0]  iu_state;
  logic        scan_out;

  spur_cpu dut (
    .clk, .rst_n, .ext_op, .ext_addr, .ext_wdata, .ext_rdata, .ext_kernel, .ext_virtual,
    .ext_status_out, .ext_status_in, .fpu_inst, .fpu_issue, .fpu_cancel, .fpu_status,
    .diag_sep(1'b0), .diag_inst_valid(1'b0), .diag_inst(32'd0), .bus_pc, .iu_state,
    .scan_shift(1'b0), .scan_in(1'b0), .scan_out);

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------- assembler ----------------
  word40_t mem [4096];
  int pc;
  function automatic void emit(logic [31:0] i);
    mem[pc] = '{ttype: 6'd0, gen: 2'd0, data: i};
    pc++;
  endfunction
  function automatic logic [31:0] rrr(opcode_t op, int rd, int rs1, int rs2, int pos = 0);
    return {op, 5'(rd), 5'(rs1), 1'b0, 5'(rs2), 7'd0, 2'(pos)};
  endfunction
  function automatic logic [31:0] rri(opcode_t op, int rd, int rs1, int imm);
    return {op, 5'(rd), 5'(rs1), 1'b1, 14'(imm)};
  endfunction
  function automatic logic [31:0] st(opcode_t op, int rs2, int rs1, int imm);
    logic [13:0] i14;
    i14 = 14'(imm);
    return {op, i14[13:9], 5'(rs1), 1'b1, 5'(rs2), i14[8:0]};
  endfunction
  function automatic logic [31:0] bri(cond_t c, int rs1, int simm, int off);
    return {OP_CMPBR, c, 5'(rs1), 1'b1, 5'(simm), 9'(off)};
  endfunction
  function automatic logic [31:0] brr(cond_t c, int rs1, int rs2, int off);
    return {OP_CMPBR, c, 5'(rs1), 1'b0, 5'(rs2), 9'(off)};
  endfunction
  function automatic logic [31:0] brt(cond_t c, int rs1, int tg, int off);
    return {OP_CMPBR_TAG, c, 5'(rs1), 6'(tg), 9'(off)};
  endfunction
  function automatic logic [31:0] call(int wa);
    return {OP4_CALL, 28'(wa)};
  endfunction
  function automatic logic [31:0] jump(int wa);
    return {OP4_JUMP, 28'(wa)};
  endfunction
  localparam logic [31:0] NOP = 32'd0;
  localparam int DATA = 'h1000;       // byte address of the result area
  localparam int DONE = 'h1FFC;       // store here ends the run
  int loop_pc, func_pc, intr_pc;

  // result slots (byte offsets from DATA) and expected values
  typedef struct { int off; longint val; string name; } exp_t;
  exp_t exps[$];
  function automatic void expect_at(int off, longint val, string name);
    exps.push_back('{off, val, name});
  endfunction

  task automatic build();
    for (int i = 0; i < 4096; i++) mem[i] = '0;
    pc = 0;
    emit(jump('h100)); emit(NOP);
    // trap vectors: 4 words per cause at word 0x40 + 4*cause
    for (int c = 0; c <= 8; c++) begin
      int back;
      back = (c == TC_INTR || c == TC_FPU) ? 0 : 4;   // retry or skip
      pc = 'h40 + 4*c;
      emit(rri(OP_RD_SPEC, 16, 4, 0));          // r16 = trap PC
      emit(rri(OP_RETT, 0, 16, back));
      emit(rri(OP_ADD, 9, 9, 1));               // delay slot: count traps
      emit(NOP);
    end
    pc = 'h100;
    // --- runs with the instruction cache disabled
    emit(rri(OP_WR_TAG, 1, 1, 0));              // r1 tag := 0
    emit(rrr(OP_XOR, 1, 1, 1));                 // r1 := 0 (forward from dest 1)
    emit(rri(OP_ADD, 9, 1, 0));                 // r9 := 0 (forward from dest 2)
    emit(rri(OP_ADD, 8, 1, DATA));
    emit(rri(OP_ADD, 2, 1, 'h3F));              // traps, intr, fp exc, cache, prefetch, FPU
    emit(rri(OP_ADD, 3, 1, 7));
    emit(rri(OP_WR_SPEC, 1, 3, 0));             // UPSW := 7
    emit(rri(OP_WR_SPEC, 0, 2, 0));             // KPSW := 0x3F (mode switch)
    emit(rri(OP_ADD, 2, 1, 0));
    // --- arithmetic and forwarding
    emit(rri(OP_ADD, 4, 1, 100));
    emit(rri(OP_ADD, 5, 1, 23));
    emit(rrr(OP_SUB, 6, 4, 5));                 // double forwarding
    emit(st(OP_ST, 6, 8, 0));          expect_at(0, 77, "sub");
    emit(rrr(OP_AND, 7, 4, 5));
    emit(st(OP_ST, 7, 8, 4));          expect_at(4, 4, "and");
    emit(rri(OP_SLL, 7, 4, 3));
    emit(st(OP_ST, 7, 8, 8));          expect_at(8, 800, "sll");
    emit(rrr(OP_OR, 7, 4, 5));
    emit(rri(OP_SRA, 7, 7, 2));
    emit(st(OP_ST, 7, 8, 12));         expect_at(12, 29, "or/sra");
    // --- loaded word used at once
    emit(rri(OP_ADD, 16, 1, 5));
    emit(rri(OP_LD, 16, 8, 0));                 // r16 := 77
    emit(rri(OP_ADD, 17, 16, 1));               // loaded word forwarded at once
    emit(rri(OP_ADD, 18, 16, 1));
    emit(st(OP_ST, 17, 8, 16));        expect_at(16, 78, "load use next cycle");
    emit(st(OP_ST, 18, 8, 20));        expect_at(20, 78, "load forward");
    // --- loop with delayed branch
    emit(rri(OP_ADD, 16, 1, 0));
    emit(rri(OP_ADD, 17, 1, 0));
    loop_pc = pc;
    emit(rri(OP_ADD, 16, 16, 1));
    emit(bri(C_LT, 16, 10, -1));
    emit(rri(OP_ADD, 17, 17, 2));               // delay slot
    emit(st(OP_ST, 16, 8, 24));        expect_at(24, 10, "loop count");
    emit(st(OP_ST, 17, 8, 28));        expect_at(28, 20, "delay slots");
    // --- call / return with overlapped windows
    emit(rri(OP_ADD, 27, 1, 7));                // outgoing arg
    func_pc = 'h300;
    emit(call(func_pc));
    emit(NOP);
    emit(st(OP_ST, 27, 8, 32));        expect_at(32, 14, "callee result via window");
    emit(st(OP_ST, 16, 8, 36));        expect_at(36, 10, "caller local kept");
    // --- window overflow and underflow
    emit(rri(OP_ADD, 19, 1, 6));
    emit(rri(OP_WR_SPEC, 2, 19, 0));            // CWP := 6, SWP = 0
    emit(call(func_pc));                         // overflows, skipped
    emit(NOP);
    emit(rri(OP_WR_SPEC, 2, 1, 0));             // CWP := 0
    emit(rri(OP_RETURN, 0, 1, 0));              // underflows, skipped
    emit(NOP);
    // --- tag traps
    emit(rri(OP_WR_TAG, 19, 1, 4));             // r19: pair pointer, data 0
    emit(rrr(OP_ADD_T, 20, 19, 4));             // data type trap
    emit(rrr(OP_ADD_T, 20, 4, 5));
    emit(st(OP_ST, 20, 8, 40));        expect_at(40, 123, "tagged add");
    emit(rri(OP_ADD, 21, 1, -1));
    emit(rri(OP_SRL, 21, 21, 1));               // 0x7fffffff
    emit(rrr(OP_ADD_T, 22, 21, 21));            // overflow trap
    emit(rri(OP_ADD, 22, 1, 0));
    emit(rri(OP_LD_T, 23, 19, DATA + 4));       // pointer ok: loads 4
    emit(rri(OP_LD_T, 22, 4, 0));               // pointer trap, skipped
    emit(st(OP_ST, 23, 8, 44));        expect_at(44, 4, "checked load");
    emit(st(OP_ST, 22, 8, 48));        expect_at(48, 0, "trapped load skipped");
    emit(rri(OP_WR_TAG, 24, 1, 2));             // generation 2
    emit(st(OP_ST_40, 24, 8, 52));              // generation trap, skipped
    emit(st(OP_ST_40, 1, 24, DATA + 56));       // gen 0 into gen 2: allowed
    expect_at(56, 0, "generation store");
    emit(brt(C_EQ, 19, 1, 3));                  // taken: r19 is a pair
    emit(rri(OP_ADD, 25, 1, 1));                // delay slot
    emit(rri(OP_ADD, 25, 1, 99));               // skipped
    emit(st(OP_ST, 25, 8, 60));        expect_at(60, 1, "tag branch");
    // --- byte and tag moves
    emit(rrr(OP_RD_TAG, 16, 24, 0));
    emit(st(OP_ST, 16, 8, 64));        expect_at(64, 2, "read_tag");
    emit(rrr(OP_INSERT, 17, 4, 5, 1));
    emit(st(OP_ST, 17, 8, 68));        expect_at(68, 100 + 23*256, "insert");
    emit(rri(OP_EXTRACT, 18, 17, 1));
    emit(st(OP_ST, 18, 8, 72));        expect_at(72, 23, "extract");
    // --- illegal instruction, fault, special cache op
    emit({7'h3F, 25'd0});                     // undefined opcode
    emit(rri(OP_ADD, 20, 1, 1));
    emit(rri(OP_SLL, 20, 20, 3));
    emit(rri(OP_SLL, 20, 20, 3));
    emit(rri(OP_SLL, 20, 20, 3));               // 512
    emit(rri(OP_LD, 21, 8, 0));                 // r21 := 77
    emit(rrr(OP_SUB, 19, 1, 1));
    emit(rri(OP_ADD, 19, 1, 1));
    for (int k = 0; k < 10; k++) emit(rri(OP_SLL, 19, 19, 3)); // 1 << 30
    emit(rrr(OP_LD, 21, 19, 8));                // faults, skipped
    emit(rri(OP_LD_S0, 22, 8, 0));              // special load, cache op 5
    emit(NOP);
    emit(st(OP_ST, 21, 8, 76));        expect_at(76, 77, "faulted load skipped");
    emit(st(OP_ST, 22, 8, 80));        expect_at(80, 77, "special load");
    // --- coprocessor
    emit({OP_FP_FIRST, 25'h1});
    emit({OP_FP_FIRST, 25'h2});                 // waits while FPU busy
    emit(rri(OP_FP_LD, 3, 8, 0));
    emit({7'h41, 25'h3});                       // FPU raises an exception
    for (int k = 0; k < 6; k++) emit(rri(OP_ADD, 4, 4, 1));
    emit(st(OP_ST, 4, 8, 84));         expect_at(84, 106, "after fpu");
    // --- a straight run for the interrupt
    intr_pc = pc;
    for (int k = 0; k < 30; k++) emit(rri(OP_ADD, 5, 5, 1));
    emit(st(OP_ST, 5, 8, 88));         expect_at(88, 53, "interrupted run");
    emit(st(OP_ST, 9, 8, 92));
    emit(st(OP_ST, 1, 1, DONE));
    emit(jump(pc)); emit(NOP);
    // --- function: doubles caller's r27 (its r11), uses a local
    pc = func_pc;
    emit(rrr(OP_ADD, 11, 11, 11));
    emit(rri(OP_ADD, 16, 1, 99));
    emit(rri(OP_RETURN, 0, 10, 8));
    emit(NOP);
  endtask

  // ---------------- external cache model ----------------
  logic busy, pf_ign, fault, intr;
  int   busy_next = 0, busy_left = 0;
  logic is_data;
  assign is_data = ext_op != CO_NONE && ext_op != CO_IFETCH && ext_op != CO_PREFETCH;
  assign fault   = is_data && ext_addr[30];
  assign busy    = is_data && busy_left > 0;
  assign ext_status_in = {1'b0, intr, pf_ign, fault, busy};
  assign ext_rdata = mem[ext_addr[13:2]];

  always_ff @(posedge clk) begin
    if (is_data) begin
      if (busy_left > 0) busy_left <= busy_left - 1;
      else begin
        busy_left <= ($urandom % 3 == 0) ? 1 + $urandom % 2 : 0;
        if ((ext_op == CO_STORE || (ext_op >= CO_ST_S0 && ext_op <= CO_ST_S2)) && !fault)
          mem[ext_addr[13:2]] <= ext_wdata;
      end
    end
    pf_ign <= ($urandom % 10 == 0);
  end

  // ---------------- FPU model ----------------
  // busy for three cycles after each coprocessor instruction; the one with
  // opcode 0x41 reports an exception when it completes, held until taken
  int  fbusy = 0, fexc_timer = 0;
  logic fexc = 0, fexc_done = 0;
  assign fpu_status = {1'b0, fexc, fbusy > 0};
  always_ff @(posedge clk) begin
    if (fbusy > 0) fbusy <= fbusy - 1;
    if (fexc_timer > 0) begin
      fexc_timer <= fexc_timer - 1;
      if (fexc_timer == 1) fexc <= 1'b1;
    end
    if (fpu_issue && fpu_inst[21:15] >= OP_FP_FIRST && fpu_inst[21:15] <= OP_FP_ST) begin
      fbusy <= 3;
      if (fpu_inst[21:15] == 7'h41 && !fexc_done) fexc_timer <= 3;
    end
    if (ext_status_out[3] && dut.u_eu.trap_cause == TC_FPU) begin
      fexc <= 1'b0;
      fexc_done <= 1'b1;
    end
  end

  // ---------------- event counters ----------------
  int n_cycles, n_disabled, n_miss, n_pf, n_fwd1, n_fwd2, n_dfwd, n_branch, n_busy,
      n_fpstall, n_call, n_ret, n_pfblock, n_spop, n_fpu_issue, n_cancel;
  int n_trap [16];
  int n_traps_total;
  int loop_br_cycle [$];
  always_ff @(posedge clk) if (rst_n) begin
    n_cycles <= n_cycles + 1;
    if (ext_op == CO_IFETCH && !dut.u_iu.en) n_disabled <= n_disabled + 1;
    if (ext_op == CO_IFETCH && dut.u_iu.en) n_miss <= n_miss + 1;
    if (dut.u_mmu.pf_done) n_pf <= n_pf + 1;
    if (dut.u_mmu.pf_stop) n_pfblock <= n_pfblock + 1;
    if (dut.u_eu.ex_valid && !dut.u_eu.freeze && (dut.u_eu.fwd_a == 1 || dut.u_eu.fwd_b == 1)) n_fwd1 <= n_fwd1 + 1;
    if (dut.u_eu.ex_valid && !dut.u_eu.freeze && (dut.u_eu.fwd_a == 2 || dut.u_eu.fwd_b == 2)) n_fwd2 <= n_fwd2 + 1;
    if (dut.u_eu.ex_valid && !dut.u_eu.freeze && dut.u_eu.ctrl.rd_a && dut.u_eu.ctrl.rd_b && !dut.u_eu.ex_inst[14]
        && dut.u_eu.fwd_a != 0 && dut.u_eu.fwd_b != 0) n_dfwd <= n_dfwd + 1;
    if (dut.u_eu.redirect && !dut.u_eu.freeze && dut.u_eu.ctrl.is_branch) n_branch <= n_branch + 1;
    if (dut.u_eu.mem_stall) n_busy <= n_busy + 1;
    if (dut.u_eu.freeze && !dut.u_eu.mem_stall) n_fpstall <= n_fpstall + 1;
    if (dut.u_eu.ex_go && dut.u_eu.ctrl.is_call) n_call <= n_call + 1;
    if (dut.u_eu.ex_go && dut.u_eu.ctrl.is_return && !dut.u_eu.ctrl.is_rett) n_ret <= n_ret + 1;
    if (ext_op == CO_LD_S0 && !busy) n_spop <= n_spop + 1;
    if (fpu_issue) n_fpu_issue <= n_fpu_issue + 1;
    if (fpu_cancel) n_cancel <= n_cancel + 1;
    if (ext_status_out[3]) begin
      n_trap[dut.u_eu.trap_cause] <= n_trap[dut.u_eu.trap_cause] + 1;
      n_traps_total <= n_traps_total + 1;
    end
    if (dut.u_eu.ex_go && dut.u_eu.ctrl.is_branch && dut.u_eu.ex_pc == 30'(loop_pc + 1))
      loop_br_cycle.push_back(n_cycles);
  end

  // interrupt: raised once the FPU test is over, held until taken
  logic intr_done = 0;
  assign intr = !intr_done && dut.u_eu.fetch_pc > 30'(intr_pc + 5) && dut.u_eu.fetch_pc < 30'(intr_pc + 25);
  always_ff @(posedge clk) if (ext_status_out[3] && dut.u_eu.trap_cause == TC_INTR) intr_done <= 1'b1;

  // optional cycle trace (+trace)
  always_ff @(posedge clk) if (rst_n && $test$plusargs("trace"))
    $display("%0d fpc=%h ex=%0d pc=%h inst=%h fz=%0d trap=%0d cause=%0d op=%0d addr=%h cwp=%0d",
             n_cycles, dut.u_eu.fetch_pc, dut.u_eu.ex_valid, dut.u_eu.ex_pc, dut.u_eu.ex_inst,
             dut.u_eu.freeze, ext_status_out[3], dut.u_eu.trap_cause, ext_op, ext_addr, dut.u_eu.cwp);

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ext_op == CO_STORE && ext_addr == DONE && !busy);
    @(posedge clk);
    foreach (exps[i]) check(exps[i].name, mem[(DATA + exps[i].off) >> 2].data, exps[i].val);
    check("trap count", mem[(DATA + 92) >> 2].data, n_traps_total);
    // steady-state loop: one instruction per cycle, three per iteration
    check("loop iterations", loop_br_cycle.size(), 10);
    if (loop_br_cycle.size() == 10) check("loop cycles (iter 2..10)", loop_br_cycle[9] - loop_br_cycle[1], 24);
    check("window overflow traps", n_trap[TC_WOVF], 1);
    check("window underflow traps", n_trap[TC_WUNF], 1);
    check("tag traps", n_trap[TC_TAG], 2);
    check("generation traps", n_trap[TC_GEN], 1);
    check("overflow traps", n_trap[TC_OVF], 1);
    check("illegal traps", n_trap[TC_ILLEGAL], 1);
    check("fault traps", n_trap[TC_FAULT], 1);
    check("fpu traps", n_trap[TC_FPU], 1);
    check("interrupt traps", n_trap[TC_INTR], 1);
    $display("events: cycles=%0d disabled_fetch=%0d miss=%0d prefetch=%0d pf_stop=%0d fwd1=%0d fwd2=%0d double=%0d branch=%0d busy=%0d fpstall=%0d call=%0d ret=%0d spop=%0d fpu_issue=%0d cancel=%0d traps=%0d",
             n_cycles, n_disabled, n_miss, n_pf, n_pfblock, n_fwd1, n_fwd2, n_dfwd, n_branch, n_busy,
             n_fpstall, n_call, n_ret, n_spop, n_fpu_issue, n_cancel, n_traps_total);
    check("event: disabled-mode fetch", n_disabled > 0, 1);
    check("event: demand miss", n_miss > 0, 1);
    check("event: prefetch", n_pf > 0, 1);
    check("event: prefetch stopped", n_pfblock > 0, 1);
    check("event: forward dest1", n_fwd1 > 0, 1);
    check("event: forward dest2", n_fwd2 > 0, 1);
    check("event: double forwarding", n_dfwd > 0, 1);
    check("event: taken branch", n_branch > 0, 1);
    check("event: busy stall", n_busy > 0, 1);
    check("event: fpu stall", n_fpstall > 0, 1);
    check("event: call", n_call > 0, 1);
    check("event: return", n_ret > 0, 1);
    check("event: special cache op", n_spop > 0, 1);
    check("event: fpu issue", n_fpu_issue > 0, 1);
    check("event: fpu cancel", n_cancel > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
