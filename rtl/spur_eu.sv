// Execution unit: the four-stage pipeline (fetch, execute, memory, write)
// with the 40-bit lower data path, the 30-bit upper data path and the
// control.
//
// Fetch: the fetch PC (a 30-bit word address) is offered to the
// instruction unit every cycle. When it returns an instruction, the
// instruction enters execute; when it misses, an internal "miss" no-op
// enters instead and the fetch PC holds.
// Execute: operands are read from the register file through the
// overlapped-window decoder and the internal forwarding block; the ALU,
// shifter, byte extractor and byte inserter form the result while the
// tag checker examines the tags. Compare-and-branch compares in the ALU
// while the address adder forms the target; all control transfers
// (branch, call, jump, return) are delayed by one instruction. Calls and
// returns move the current window here, and special registers are written
// here.
// Memory: loads and stores use the external cache through the MMU/CC
// interface. All traps are taken here: the instruction in memory and
// those behind it are cancelled, fetching restarts at the trap vector and
// the trap PC, cause and window are set (the internal trap_call and
// read_pc steps of the document are folded into this one action).
// Write: the result is written to the register file.
//
// Results wait two cycles in destination registers 1 and 2 (the memory
// and write stage results) and are forwarded from there. A loaded word
// arrives from the external cache during the memory stage and is
// forwarded from the memory buffer path straight to the instruction
// behind, so a load costs no stall and has no delay slot; while the
// MMU/CC holds the access with busy, everything waits.
// Stalls: an external access held by the MMU/CC's busy line, or a
// coprocessor instruction while the FPU is busy, freezes all stages.
// Call writes its own byte address into outgoing register 26 (incoming
// register 10 of the callee); return and RETT jump to (Rs1 + operand) / 4.
module spur_eu
  import spur_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instruction unit
  output logic        fetch_req,
  output logic [29:0] fetch_pc,
  input  logic        inst_valid,
  input  logic [31:0] inst,
  // data access through the MMU/CC interface
  output logic        d_req,
  output cache_op_t   d_op,
  output logic [31:0] d_addr,
  output word40_t     d_wdata,
  input  logic        d_done,
  input  logic        d_fault,
  input  word40_t     rdata,
  input  logic        intr,
  // coprocessor
  output logic        issue_valid,
  output logic [31:0] issue_inst,
  output logic        ex_is_fpu,
  input  logic        fp_stall,
  input  logic        fp_exc,
  input  logic [2:0]  fpu_status,
  // status
  output logic [7:0]  kpsw,
  output logic        trap_taken,
  output trap_cause_t trap_cause,
  output logic        stalled,
  output logic [29:0] pc_ex,       // PC of the instruction in execute (busPC)
  // buses observed by the scan register
  output word40_t     bus_a,       // operand A after forwarding
  output word40_t     bus_b,       // operand B after forwarding
  output word40_t     bus_res      // execute-stage result
);
  // ---------------- pipeline registers ----------------
  logic        ex_valid;
  logic [31:0] ex_inst;
  logic [29:0] ex_pc;

  logic        mem_valid, mem_wr, mem_load, mem_access;
  logic [PREG_W-1:0] mem_pd;
  word40_t     mem_res;          // destination register 1
  word40_t     mem_sdata;
  logic [31:0] mem_addr;         // memory address register
  cache_op_t   mem_op;
  logic [29:0] mem_pc;
  logic        mem_illegal, mem_wovf, mem_wunf, mem_tag, mem_gen, mem_ovf;

  logic        wb_valid, wb_wr;
  logic [PREG_W-1:0] wb_pd;
  word40_t     wb_data;          // destination register 2

  logic        pend;
  logic [29:0] pend_pc;

  // ---------------- special registers ----------------
  logic [7:0]  upsw;
  logic [2:0]  cwp, swp;
  logic        call_ovf, ret_unf;
  logic [31:0] spec_rdata;
  logic        trap_take;
  trap_cause_t tcause;
  logic [29:0] tvector;
  logic        freeze, mem_stall;

  // ---------------- execute stage ----------------
  ctrl_t ctrl;
  spur_decode u_dec (.inst(ex_inst), .fpu_en(kpsw[K_FPU_EN]), .ctrl(ctrl));

  logic [4:0] f_rd, f_rs1, f_rs2;
  logic       f_imm;
  assign f_rd  = ex_inst[24:20];
  assign f_rs1 = ex_inst[19:15];
  assign f_imm = ex_inst[14];
  assign f_rs2 = ex_inst[13:9];

  logic [PREG_W-1:0] pa, pb, pd;
  spur_window_dec u_wa (.spec(f_rs1), .cwp(cwp), .preg(pa));
  spur_window_dec u_wb (.spec(f_rs2), .cwp(cwp), .preg(pb));
  spur_window_dec u_wd (.spec(ctrl.is_call ? 5'd26 : f_rd), .cwp(cwp), .preg(pd));

  word40_t rf_a, rf_b, op_a, op_b;
  logic [1:0] fwd_a, fwd_b;
  spur_regfile u_rf (
    .clk(clk), .ra_addr(pa), .ra_data(rf_a), .rb_addr(pb), .rb_data(rf_b),
    .we(wb_valid && wb_wr), .w_addr(wb_pd), .w_data(wb_data));

  spur_forward u_fwd (
    .src_a(pa), .src_b(pb), .rf_a(rf_a), .rf_b(rf_b),
    .d1_valid(mem_valid && mem_wr), .d1_addr(mem_pd), .d1_data(mem_load ? rdata : mem_res),
    .d2_valid(wb_valid && wb_wr), .d2_addr(wb_pd), .d2_data(wb_data),
    .op_a(op_a), .op_b(op_b), .fwd_a(fwd_a), .fwd_b(fwd_b));

  // second operand
  logic [31:0] imm14, imm_st, imm_sh, opb_val;
  assign imm14  = {{18{ex_inst[13]}}, ex_inst[13:0]};
  assign imm_st = {{18{ex_inst[24]}}, ex_inst[24:20], ex_inst[8:0]};
  assign imm_sh = {{27{ex_inst[13]}}, ex_inst[13:9]};
  always_comb begin
    if (ctrl.store_imm)               opb_val = imm_st;
    else if (ctrl.is_branch && f_imm) opb_val = imm_sh;
    else if (f_imm)                   opb_val = imm14;
    else                              opb_val = op_b.data;
  end

  logic [31:0] alu_y;
  logic        z, n, v, c;
  spur_alu u_alu (.op(ctrl.alu_op), .a(op_a.data), .b(opb_val), .y(alu_y),
                  .zero(z), .neg(n), .ovf(v), .carry(c));

  logic [31:0] sh_y;
  spur_shifter u_sh (.a(op_a.data), .amount(opb_val[1:0]), .kind(ctrl.shift_kind), .y(sh_y));

  logic [31:0] ext_y;
  spur_byte_extract u_bx (.w(op_a), .sel(opb_val[1:0]), .tag_mode(ctrl.res_sel == RES_RDTAG), .y(ext_y));

  word40_t ins_y;
  spur_byte_insert u_bi (.w(op_a), .b(opb_val[7:0]), .sel(ex_inst[1:0]),
                         .tag_mode(ctrl.res_sel == RES_WRTAG), .y(ins_y));

  logic tag_err, gen_err;
  spur_tag_check u_tc (.a(op_a), .b(op_b), .chk_data(ctrl.chk_data), .chk_ptr(ctrl.chk_ptr),
                       .chk_gen(ctrl.chk_gen), .tag_err(tag_err), .gen_err(gen_err));

  logic br_taken;
  spur_branch_cond u_bc (.cond(f_rd), .tag_form(ctrl.is_tag_branch), .tag_a(op_a.ttype),
                         .tag_imm(ex_inst[14:9]), .zero(z), .neg(n), .ovf(v), .carry(c),
                         .taken(br_taken));

  logic [29:0] br_target;
  logic        br_cout;    // carry out of the address adder, not used
  spur_addr_adder #(.W(30)) u_aa (.a(ex_pc), .b({{21{ex_inst[8]}}, ex_inst[8:0]}), .cin(1'b0),
                                  .sum(br_target), .cout(br_cout));

  word40_t ex_res;
  always_comb begin
    ex_res = '{ttype: op_a.ttype, gen: op_a.gen, data: alu_y};
    unique case (ctrl.res_sel)
      RES_SHIFT:   ex_res.data = sh_y;
      RES_EXTRACT: ex_res = '{ttype: TAG_FIXNUM, gen: 2'd0, data: ext_y};
      RES_RDTAG:   ex_res = '{ttype: TAG_FIXNUM, gen: 2'd0, data: ext_y};
      RES_INSERT:  ex_res = ins_y;
      RES_WRTAG:   ex_res = ins_y;
      RES_SPEC:    ex_res = '{ttype: TAG_FIXNUM, gen: 2'd0, data: spec_rdata};
      RES_LINK:    ex_res = '{ttype: TAG_FIXNUM, gen: 2'd0, data: {ex_pc, 2'b00}};
      default: ;
    endcase
  end

  logic ex_illegal, ex_wovf, ex_wunf, ex_ovf, ex_exc, ex_live, ex_go;
  assign ex_illegal = ex_valid && !ctrl.legal;
  assign ex_wovf    = ex_valid && ctrl.is_call && call_ovf;
  assign ex_wunf    = ex_valid && ctrl.is_return && !ctrl.is_rett && ret_unf;
  assign ex_ovf     = ex_valid && ctrl.chk_ovf && v;
  assign ex_exc     = ex_illegal || ex_wovf || ex_wunf || (ex_valid && (tag_err || gen_err)) || ex_ovf;
  assign ex_live    = ex_valid && !trap_take;
  assign ex_go      = ex_live && !freeze && !ex_exc;  // execute-stage side effects happen

  logic        redirect;
  logic [29:0] target;
  always_comb begin
    redirect = ex_live && (ctrl.is_call || ctrl.is_jump || ctrl.is_return ||
                           (ctrl.is_branch && br_taken));
    if (ctrl.is_call || ctrl.is_jump) target = {ex_pc[29:28], ex_inst[27:0]};
    else if (ctrl.is_return)          target = alu_y[31:2];
    else                              target = br_target;
  end

  spur_special_regs u_sr (
    .clk(clk), .rst_n(rst_n),
    .wr_en(ex_go && ctrl.wr_spec), .wr_sel(f_rd[2:0]), .wr_data(op_a.data),
    .rd_sel(f_rs1[2:0]), .rd_data(spec_rdata),
    .win_call(ex_go && ctrl.is_call), .win_ret(ex_go && ctrl.is_return),
    .trap_enter(trap_take), .trap_pc_in(mem_pc), .trap_cause_in(tcause),
    .rett(ex_go && ctrl.is_rett), .fpu_status(fpu_status),
    .kpsw(kpsw), .upsw(upsw), .cwp(cwp), .swp(swp), .call_ovf(call_ovf), .ret_unf(ret_unf));

  // ---------------- memory stage ----------------
  logic mem_exc;
  assign mem_exc   = mem_illegal || mem_wovf || mem_wunf || mem_tag || mem_gen || mem_ovf;
  assign d_req     = mem_valid && mem_access && !mem_exc;
  assign d_op      = mem_op;
  assign d_addr    = mem_addr;
  assign d_wdata   = mem_sdata;
  assign mem_stall = d_req && !d_done;

  spur_trap_logic u_trap (
    .valid(mem_valid && !mem_stall), .illegal(mem_illegal), .wovf(mem_wovf), .wunf(mem_wunf),
    .tag_err(mem_tag), .gen_err(mem_gen), .ovf(mem_ovf), .fault(d_fault),
    .fpu_exc(fp_exc), .intr(intr), .kpsw(kpsw), .upsw(upsw),
    .take(trap_take), .cause(tcause), .vector(tvector));

  assign freeze     = mem_stall || (fp_stall && ex_valid && !trap_take);
  assign trap_taken = trap_take;
  assign trap_cause = tcause;
  assign stalled    = freeze;
  assign pc_ex      = ex_pc;
  assign ex_is_fpu  = ex_valid && ctrl.is_fpu;

  // ---------------- fetch ----------------
  assign fetch_req   = !freeze && !trap_take;
  assign issue_valid = fetch_req && inst_valid;
  assign issue_inst  = inst;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_pc  <= '0;
      pend      <= 1'b0;
      pend_pc   <= '0;
      ex_valid  <= 1'b0;
      ex_inst   <= '0;
      ex_pc     <= '0;
      mem_valid <= 1'b0;
      mem_wr    <= 1'b0;
      mem_load  <= 1'b0;
      mem_access<= 1'b0;
      mem_pd    <= '0;
      mem_res   <= '0;
      mem_sdata <= '0;
      mem_addr  <= '0;
      mem_op    <= CO_NONE;
      mem_pc    <= '0;
      {mem_illegal, mem_wovf, mem_wunf, mem_tag, mem_gen, mem_ovf} <= '0;
      wb_valid  <= 1'b0;
      wb_wr     <= 1'b0;
      wb_pd     <= '0;
      wb_data   <= '0;
    end else if (trap_take) begin
      // cancel memory and execute stages, restart at the vector
      fetch_pc  <= tvector;
      pend      <= 1'b0;
      ex_valid  <= 1'b0;
      ex_inst   <= '0;
      mem_valid <= 1'b0;
      wb_valid  <= 1'b0;
    end else if (!freeze) begin
      // fetch -> execute
      if (inst_valid) begin
        ex_valid <= 1'b1;
        ex_inst  <= inst;
        ex_pc    <= fetch_pc;
        fetch_pc <= redirect ? target : pend ? pend_pc : fetch_pc + 30'd1;
        pend     <= 1'b0;
      end else begin
        ex_valid <= 1'b0;              // internal miss instruction
        ex_inst  <= '0;
        if (redirect) begin
          pend    <= 1'b1;
          pend_pc <= target;
        end
      end
      // execute -> memory
      mem_valid   <= ex_valid;
      mem_wr      <= ex_valid && ctrl.wr_rd;
      mem_load    <= ctrl.is_load;
      mem_access  <= ctrl.is_load || ctrl.is_store || ctrl.fpu_mem;
      mem_pd      <= pd;
      mem_res     <= ex_res;
      mem_sdata   <= op_b;
      mem_addr    <= alu_y;
      mem_op      <= ctrl.cache_op;
      mem_pc      <= ex_pc;
      mem_illegal <= ex_illegal;
      mem_wovf    <= ex_wovf;
      mem_wunf    <= ex_wunf;
      mem_tag     <= ex_valid && tag_err;
      mem_gen     <= ex_valid && gen_err;
      mem_ovf     <= ex_ovf;
      // memory -> write
      wb_valid <= mem_valid;
      wb_wr    <= mem_wr;
      wb_pd    <= mem_pd;
      wb_data  <= mem_load ? rdata : mem_res;
    end
  end
  assign bus_a   = op_a;
  assign bus_b   = op_b;
  assign bus_res = ex_res;
endmodule
