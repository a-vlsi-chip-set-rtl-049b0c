// SPUR-style CPU chip: a 32-bit RISC processor with 40-bit tagged
// registers for LISP, an on-chip prefetching instruction cache, an
// interface to an external MMU/cache controller and a floating-point
// coprocessor interface.
//
// The chip is the instruction unit (instruction cache with fetch and
// prefetch machines) and the execution unit (pipeline, data paths,
// control and trap logic), joined through the MMU/CC interface, which
// shares the single external cache port between data accesses, demand
// instruction fetches and prefetches, and the FPU interface, which shows
// every issued instruction to the coprocessor.
// Pins: external cache port (cache opcode, address, 40-bit data, mode and
// status lines), 27 FPU lines, and test pins: the fetch address bits
// busPC<10:2>, the instruction-unit state bits, and a diagnostic mode
// that disconnects the instruction unit and feeds instructions to the
// execution unit straight from pins, and a passive scan chain that
// copies busPC, the two operand buses and the result bus every cycle and
// shifts them out serially when scan_shift is high (spur_scan).
// One clock; all state changes on its rising edge (the four-phase clock of the chip is not modelled).
module spur_cpu
  import spur_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // MMU/CC and external cache
  output cache_op_t   ext_op,
  output logic [31:0] ext_addr,
  output word40_t     ext_wdata,
  input  word40_t     ext_rdata,
  output logic        ext_kernel,
  output logic        ext_virtual,
  output logic [3:0]  ext_status_out,
  input  logic [4:0]  ext_status_in,
  // floating-point coprocessor
  output logic [21:0] fpu_inst,
  output logic        fpu_issue,
  output logic        fpu_cancel,
  input  logic [2:0]  fpu_status,
  // test and diagnostics
  input  logic        diag_sep,         // separate IU from EU
  input  logic        diag_inst_valid,
  input  logic [31:0] diag_inst,
  output logic [8:0]  bus_pc,           // busPC<10:2>
  output logic [1:0]  iu_state,
  input  logic        scan_shift,       // scan chain: shift (1) or capture (0)
  input  logic        scan_in,
  output logic        scan_out
);
  localparam int unsigned SCAN_W = 30 + 3 * 40;
  logic        fetch_req, inst_valid, iu_inst_valid;
  logic [29:0] fetch_pc, if_addr, pf_addr, pc_ex;
  logic [31:0] inst, iu_inst;
  logic        if_req, if_done, pf_req, pf_done, pf_stop;
  logic        d_req, d_done, d_fault, intr;
  cache_op_t   d_op;
  logic [31:0] d_addr;
  word40_t     d_wdata, rdata;
  logic [7:0]  kpsw;
  logic        trap_taken, stalled;
  trap_cause_t trap_cause;
  logic        issue_valid, ex_is_fpu, fp_stall, fp_exc;
  word40_t     bus_a, bus_b, bus_res;
  logic [31:0] issue_inst;

  spur_iu u_iu (
    .clk(clk), .rst_n(rst_n),
    .en(kpsw[K_IU_EN] && !diag_sep), .pf_en(kpsw[K_IU_PF]), .kernel(kpsw[K_KERNEL]),
    .fetch_req(fetch_req && !diag_sep), .fetch_pc(fetch_pc),
    .inst_valid(iu_inst_valid), .inst(iu_inst),
    .if_req(if_req), .if_addr(if_addr), .if_done(if_done),
    .pf_req(pf_req), .pf_addr(pf_addr), .pf_done(pf_done), .pf_stop(pf_stop),
    .ext_inst(rdata.data),
    .st_fetching(iu_state[0]), .st_prefetching(iu_state[1]));

  assign inst_valid = diag_sep ? diag_inst_valid : iu_inst_valid;
  assign inst       = diag_sep ? diag_inst : iu_inst;

  spur_eu u_eu (
    .clk(clk), .rst_n(rst_n),
    .fetch_req(fetch_req), .fetch_pc(fetch_pc), .inst_valid(inst_valid), .inst(inst),
    .d_req(d_req), .d_op(d_op), .d_addr(d_addr), .d_wdata(d_wdata),
    .d_done(d_done), .d_fault(d_fault), .rdata(rdata), .intr(intr),
    .issue_valid(issue_valid), .issue_inst(issue_inst), .ex_is_fpu(ex_is_fpu),
    .fp_stall(fp_stall), .fp_exc(fp_exc), .fpu_status(fpu_status),
    .kpsw(kpsw), .trap_taken(trap_taken), .trap_cause(trap_cause), .stalled(stalled),
    .pc_ex(pc_ex), .bus_a(bus_a), .bus_b(bus_b), .bus_res(bus_res));

  spur_mmucc_if u_mmu (
    .d_req(d_req), .d_op(d_op), .d_addr(d_addr), .d_wdata(d_wdata),
    .d_done(d_done), .d_fault(d_fault),
    .if_req(if_req && !diag_sep), .if_addr(if_addr), .if_done(if_done),
    .pf_req(pf_req && !diag_sep), .pf_addr(pf_addr), .pf_done(pf_done), .pf_stop(pf_stop),
    .rdata(rdata),
    .kernel(kpsw[K_KERNEL]), .virt(kpsw[K_VIRTUAL]), .trap_taken(trap_taken), .stalled(stalled),
    .ext_op(ext_op), .ext_addr(ext_addr), .ext_wdata(ext_wdata),
    .ext_kernel(ext_kernel), .ext_virtual(ext_virtual),
    .ext_status_out(ext_status_out), .ext_status_in(ext_status_in),
    .ext_rdata(ext_rdata), .intr(intr));

  spur_fpu_if u_fpu (
    .clk(clk), .rst_n(rst_n),
    .issue_inst(issue_inst), .issue_valid(issue_valid), .squash(trap_taken),
    .ex_is_fpu(ex_is_fpu), .fpu_inst(fpu_inst), .fpu_issue(fpu_issue), .fpu_cancel(fpu_cancel),
    .fpu_status(fpu_status), .fp_stall(fp_stall), .fp_exc(fp_exc));

  assign bus_pc = fetch_pc[8:0];

  // passive scan chain on busPC, operand buses A and B and the result bus
  spur_scan #(.W(SCAN_W)) u_scan (
    .clk(clk), .rst_n(rst_n), .shift(scan_shift), .scan_in(scan_in),
    .cap_data({pc_ex, bus_a, bus_b, bus_res}), .scan_out(scan_out));
endmodule
