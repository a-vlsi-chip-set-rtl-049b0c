// Floating-point coprocessor interface (27 pins in all).
//
// 22 pins carry the opcode and the three register specifiers of every
// instruction the CPU issues into its execute stage, so the FPU can
// follow the instruction stream. Two control lines tell it that the
// instruction on those pins was really issued (fpu_issue) and that the
// instruction issued in the previous cycle has been cancelled by a trap
// (fpu_cancel). Three status lines come back: busy, exception and a
// condition bit. While the FPU is busy, a coprocessor instruction waits
// in the execute stage (fp_stall), so CPU and FPU otherwise run
// concurrently. The meaning given to each control and status line is this
// design's reading of the document, which gives only their counts.
// No instruction here tests the condition bit, so it enters and stops at
// this port.
// Outputs are registered except fp_stall.
module spur_fpu_if
  import spur_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] issue_inst,   // instruction entering execute
  input  logic        issue_valid,
  input  logic        squash,       // trap: instructions in flight cancelled
  input  logic        ex_is_fpu,    // coprocessor instruction in execute
  output logic [21:0] fpu_inst,     // {opcode[6:0], rd[4:0], rs1[4:0], rs2[4:0]}
  output logic        fpu_issue,
  output logic        fpu_cancel,
  input  logic [2:0]  fpu_status,   // {cond, exception, busy}
  output logic        fp_stall,
  output logic        fp_exc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fpu_inst   <= '0;
      fpu_issue  <= 1'b0;
      fpu_cancel <= 1'b0;
    end else begin
      fpu_inst   <= {issue_inst[31:25], issue_inst[24:20], issue_inst[19:15], issue_inst[13:9]};
      fpu_issue  <= issue_valid;
      fpu_cancel <= squash;
    end
  end
  assign fp_stall = ex_is_fpu && fpu_status[0];
  assign fp_exc   = fpu_status[1];
endmodule
