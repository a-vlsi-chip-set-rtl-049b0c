// Test of the CPU's diagnostic features at default sizes. The
// instruction unit is separated from the execution unit with diag_sep,
// and this bench delivers the instructions itself, looking each one up by
// the fetch address the chip shows on bus_pc (busPC<10:2>). The program
// computes and stores results through the MMU/CC port, which are checked.
// While it runs, the passive scan chain is shifted out at the moment a
// chosen subtraction is in the execute stage, and the 150 bits read
// serially must be {busPC, operand A, operand B, result} of that
// instruction. Finally the instruction cache must have seen no access.
module tb_spur_cpu_diag;
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
  logic        scan_shift, scan_out;
  logic [31:0] diag_inst;

  spur_cpu dut (
    .clk, .rst_n, .ext_op, .ext_addr, .ext_wdata, .ext_rdata, .ext_kernel, .ext_virtual,
    .ext_status_out, .ext_status_in, .fpu_inst, .fpu_issue, .fpu_cancel, .fpu_status(3'b000),
    .diag_sep(1'b1), .diag_inst_valid(1'b1), .diag_inst, .bus_pc, .iu_state,
    .scan_shift, .scan_in(1'b0), .scan_out);

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // program, indexed by busPC<10:2>
  logic [31:0] prog [512];
  word40_t     dmem [64];
  int pc, sub_pc;
  function automatic void emit(logic [31:0] i); prog[pc] = i; pc++; endfunction
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

  assign diag_inst = prog[bus_pc];

  // data side of the external cache: answers at once
  assign ext_status_in = '0;
  assign ext_rdata = dmem[ext_addr[7:2]];
  int n_stores = 0, iu_access = 0;
  always_ff @(posedge clk) begin
    if (rst_n && ext_op == CO_STORE) begin
      dmem[ext_addr[7:2]] <= ext_wdata;
      n_stores <= n_stores + 1;
    end
    if (rst_n && (ext_op == CO_IFETCH || ext_op == CO_PREFETCH || iu_state != 0))
      iu_access <= iu_access + 1;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [149:0] got, want;
    for (int i = 0; i < 512; i++) prog[i] = 0;
    for (int i = 0; i < 64; i++) dmem[i] = '0;
    pc = 0;
    emit(rri(OP_WR_TAG, 1, 1, 0));
    emit(rrr(OP_XOR, 1, 1, 1));                // r1 = 0
    emit(rri(OP_ADD, 8, 1, 'h40));             // data base
    emit(rri(OP_ADD, 4, 1, 100));
    emit(rri(OP_ADD, 5, 1, 23));
    sub_pc = pc;
    emit(rrr(OP_SUB, 6, 4, 5));                // observed through the scan chain
    emit(st(6, 8, 0));
    emit(rri(OP_SLL, 7, 6, 2));
    emit(st(7, 8, 4));
    emit(rri(OP_LD, 9, 8, 0));
    emit(rrr(OP_ADD, 9, 9, 7));
    emit(st(9, 8, 8));
    emit({OP4_JUMP, 28'(pc)});                 // spin here
    emit(0);
    scan_shift = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // wait until the subtraction is in execute, then stop capturing
    while (dut.pc_ex != 30'(sub_pc) || dut.stalled) @(negedge clk);
    @(posedge clk);
    #1 scan_shift = 1;
    for (int i = 0; i < 150; i++) begin
      @(negedge clk);
      got[149 - i] = scan_out;
    end
    scan_shift = 0;
    want = {30'(sub_pc), 8'd0, 32'd100, 8'd0, 32'd23, 8'd0, 32'd77};
    check("scan busPC", got[149:120], want[149:120]);
    check("scan operand A", got[119:80], want[119:80]);
    check("scan operand B", got[79:40], want[79:40]);
    check("scan result", got[39:0], want[39:0]);
    repeat (20) @(posedge clk);
    check("stored sub", dmem['h40 / 4].data, 77);
    check("stored sll", dmem['h44 / 4].data, 308);
    check("stored load+add", dmem['h48 / 4].data, 385);
    check("store count", n_stores, 3);
    check("instruction unit idle", iu_access, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
