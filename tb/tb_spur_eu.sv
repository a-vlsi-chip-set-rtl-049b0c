// Execution unit test. The execution unit runs alone against ideal
// memories: instruction words arrive with random fetch bubbles and data
// accesses are randomly held busy. A random program of register and
// immediate ALU operations, shifts, loads, stores and short forward
// branches with delay slots (plus one call and return) is generated
// together with a reference result, so every dependency distance the
// forwarding paths must cover occurs many times. At the end the program
// stores its registers and load/store slots; the stored words are compared with the reference.
module tb_spur_eu;
  import spur_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        fetch_req, inst_valid, d_req, d_done, d_fault, intr;
  logic [29:0] fetch_pc, pc_ex;
  logic [31:0] inst, d_addr, issue_inst;
  cache_op_t   d_op;
  word40_t     d_wdata, rdata;
  logic        issue_valid, ex_is_fpu, fp_stall, fp_exc, trap_taken, stalled;
  logic [2:0]  fpu_status;
  logic [7:0]  kpsw;
  trap_cause_t trap_cause;
  word40_t     bus_a, bus_b, bus_res;

  spur_eu dut (.*);

  int checks = 0, failures = 0;
  localparam int DATA = 'h1000, DONE = 'h1FFC;

  logic [31:0] imem [2048];
  word40_t     dmem [2048];
  int pc;
  logic [31:0] ref_r [32];
  logic [31:0] ref_m [10];

  function automatic void emit(logic [31:0] i); imem[pc] = i; pc++; endfunction
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

  // one random instruction, applied to the reference when 'apply'
  function automatic logic [31:0] rand_op(bit apply);
    int k, rd, a, b, imm;
    logic [31:0] bv, y;
    bit use_imm;
    opcode_t op;
    k = $urandom % 10;
    rd = 16 + $urandom % 10; a = 16 + $urandom % 10; b = 16 + $urandom % 10;
    use_imm = $urandom % 2;
    imm = int'($urandom % 16384) - 8192;
    if (k == 8) begin                      // store to a slot
      if (apply) ref_m[b - 16] = ref_r[a];
      return st(a, 8, (b - 16) * 4);
    end
    if (k == 9) begin                      // load from a slot
      if (apply) ref_r[rd] = ref_m[b - 16];
      return rri(OP_LD, rd, 8, (b - 16) * 4);
    end
    op = opcode_t'(7'(1 + k));             // ADD SUB AND OR XOR SLL SRL SRA
    if (k >= 5) begin imm = $urandom % 4; end
    bv = use_imm ? 32'(imm) : ref_r[b];
    case (op)
      OP_ADD: y = ref_r[a] + bv;
      OP_SUB: y = ref_r[a] - bv;
      OP_AND: y = ref_r[a] & bv;
      OP_OR:  y = ref_r[a] | bv;
      OP_XOR: y = ref_r[a] ^ bv;
      OP_SLL: y = ref_r[a] << bv[1:0];
      OP_SRL: y = ref_r[a] >> bv[1:0];
      default: y = $signed(ref_r[a]) >>> bv[1:0];
    endcase
    if (apply) ref_r[rd] = y;
    return use_imm ? rri(op, rd, a, imm) : rrr(op, rd, a, b);
  endfunction

  task automatic build();
    int a, simm;
    bit taken;
    for (int i = 0; i < 2048; i++) begin imem[i] = 0; dmem[i] = '0; end
    for (int i = 0; i < 10; i++) ref_m[i] = 0;
    pc = 'h100;
    emit(rrr(OP_XOR, 1, 1, 1));            ref_r[1] = 0;
    emit(rri(OP_ADD, 8, 1, DATA));         ref_r[8] = DATA;
    for (int r = 16; r < 26; r++) begin
      int v;
      v = int'($urandom % 16384) - 8192;
      emit(rri(OP_ADD, r, 1, v));          ref_r[r] = 32'(v);
    end
    for (int n = 0; n < 600; n++) begin
      if ($urandom % 8 == 0) begin
        // branch: compare a register with a small constant, skip one
        a = 16 + $urandom % 10;
        simm = int'($urandom % 32) - 16;
        case ($urandom % 3)
          0: begin taken = $signed(ref_r[a]) < simm;   emit({OP_CMPBR, C_LT, 5'(a), 1'b1, 5'(simm), 9'd3}); end
          1: begin taken = ref_r[a] != 32'(simm);      emit({OP_CMPBR, C_NE, 5'(a), 1'b1, 5'(simm), 9'd3}); end
          default: begin taken = ref_r[a] == 32'(simm); emit({OP_CMPBR, C_EQ, 5'(a), 1'b1, 5'(simm), 9'd3}); end
        endcase
        emit(rand_op(1));                  // delay slot
        emit(rand_op(!taken));             // skipped when taken
      end else begin
        emit(rand_op(1));
      end
    end
    // call: the callee doubles its out-of-caller register r12 (caller r28);
    // the call writes its own address into caller r26 (callee r10), and
    // the delay slot already runs in the callee's window
    emit(rri(OP_ADD, 27, 1, 77));          ref_r[27] = 77;
    emit(rri(OP_ADD, 28, 17, 0));          ref_r[28] = ref_r[17] + ref_r[17];
    emit({OP4_CALL, 28'h700});
    ref_r[26] = 32'((pc - 1) * 4);
    emit(rri(OP_ADD, 16, 16, 1));          // delay slot: callee's r16
    for (int r = 16; r < 29; r++) emit(st(r, 8, 'h100 + 4 * (r - 16)));
    emit(st(1, 1, DONE));
    emit({OP4_JUMP, 28'(pc)}); emit(0);
    pc = 'h700;
    emit(rrr(OP_ADD, 12, 12, 12));
    emit(rri(OP_ADD, 16, 1, 5));           // callee local, not the caller's
    emit(rri(OP_RETURN, 0, 10, 8));        // return to call + 2 (r10 holds call address)
    emit(0);
  endtask

  // memories
  logic fetch_ok, busy;
  assign inst_valid = fetch_req && fetch_ok;
  assign inst       = imem[fetch_pc[10:0]];
  assign d_done     = d_req && !busy;
  assign d_fault    = 1'b0;
  assign rdata      = dmem[d_addr[12:2]];
  assign intr = 0; assign fp_stall = 0; assign fp_exc = 0; assign fpu_status = 0;

  bit done = 0;
  always @(posedge clk) begin
    fetch_ok <= $urandom % 5 != 0;
    busy     <= $urandom % 4 == 0;
    if (rst_n && d_done && (d_op == CO_STORE)) begin
      if (d_addr == DONE) done <= 1;
      else dmem[d_addr[12:2]] <= d_wdata;
    end
    if (rst_n && trap_taken) begin
      failures++;
      $display("FAIL unexpected trap cause %0d at pc %h", trap_cause, pc_ex);
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_r [32];
    build();
    exp_r = ref_r;
    // reset vector is word 0: jump to 0x100
    imem[0] = {OP4_JUMP, 28'h100}; imem[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done);
    repeat (3) @(posedge clk);
    for (int r = 16; r < 29; r++) begin
      checks++;
      if (dmem[(DATA + 'h100) / 4 + r - 16].data !== exp_r[r]) begin
        failures++;
        $display("FAIL r%0d got %h exp %h", r, dmem[(DATA + 'h100) / 4 + r - 16].data, exp_r[r]);
      end
    end
    // the slots the program used for loads and stores
    for (int s = 0; s < 10; s++) begin
      checks++;
      if (dmem[DATA / 4 + s].data !== ref_m[s]) begin
        failures++;
        $display("FAIL slot %0d got %h exp %h", s, dmem[DATA / 4 + s].data, ref_m[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
