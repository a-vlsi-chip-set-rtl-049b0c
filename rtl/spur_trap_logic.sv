// Trap logic. Gathers every unusual condition of the instruction in its
// third pipeline stage (memory stage), where all traps are taken, so at
// most one instruction traps per cycle. Sources are CPU exceptions
// (illegal instruction, window overflow and underflow, tag and
// generation mismatches, integer overflow), faults reported by the MMU/CC
// for the instruction's data access, floating-point exceptions, and
// external interrupts. Enable bits of the KPSW and UPSW mask the
// maskable sources; the highest-priority remaining source wins and
// selects a vectored trap address TRAP_BASE + 4 * cause (word address).
// Faults, illegal instructions and window traps cannot be masked. The
// priority order, vector layout and enable assignment are this design's;
// the document says only that traps are vectored, prioritised, and
// selectively enabled by eight bits in each PSW. Combinational.
module spur_trap_logic
  import spur_pkg::*;
(
  input  logic        valid,      // a real instruction is in the memory stage
  input  logic        illegal,
  input  logic        wovf,
  input  logic        wunf,
  input  logic        tag_err,
  input  logic        gen_err,
  input  logic        ovf,
  input  logic        fault,      // MMU/CC fault on this instruction's access
  input  logic        fpu_exc,    // floating-point exception pending
  input  logic        intr,       // external interrupt request
  input  logic [7:0]  kpsw,
  input  logic [7:0]  upsw,
  output logic        take,
  output trap_cause_t cause,
  output logic [29:0] vector
);
  logic en;
  assign en = kpsw[K_TRAP_EN];

  always_comb begin
    cause = TC_NONE;
    if (valid) begin
      if      (fault)                                  cause = TC_FAULT;
      else if (illegal)                                cause = TC_ILLEGAL;
      else if (wovf)                                   cause = TC_WOVF;
      else if (wunf)                                   cause = TC_WUNF;
      else if (tag_err && en && upsw[U_TAG_EN])        cause = TC_TAG;
      else if (gen_err && en && upsw[U_GEN_EN])        cause = TC_GEN;
      else if (ovf     && en && upsw[U_OVF_EN])        cause = TC_OVF;
      else if (fpu_exc && en && kpsw[K_FPEXC_EN])      cause = TC_FPU;
      else if (intr    && en && kpsw[K_INTR_EN])       cause = TC_INTR;
    end
    take   = (cause != TC_NONE);
    vector = TRAP_BASE + 30'(cause) * 30'(TRAP_VEC_WORDS);
  end
endmodule
