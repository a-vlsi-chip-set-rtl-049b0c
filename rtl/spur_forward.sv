// Internal forwarding.
//
// In the four-stage pipeline a result is written to the register file two
// cycles after it is computed. Until then it waits in two temporary
// registers: destination register 1 holds the result of the instruction
// one ahead (in its memory stage) and destination register 2 the result
// of the instruction two ahead (in its write stage). Four address
// comparisons, each source operand against each temporary register,
// decide whether an operand is taken from a temporary register instead of
// the register file; the newer result wins. Both operands may be
// forwarded at once (double forwarding). Addresses compared are physical
// register indices, so forwarding stays correct across a window change;
// that choice is this design's. Combinational.
module spur_forward
  import spur_pkg::*;
(
  input  logic [PREG_W-1:0] src_a,     // physical address of operand A
  input  logic [PREG_W-1:0] src_b,
  input  word40_t           rf_a,      // register file read data
  input  word40_t           rf_b,
  input  logic              d1_valid,  // destination register 1 holds a pending result
  input  logic [PREG_W-1:0] d1_addr,
  input  word40_t           d1_data,
  input  logic              d2_valid,  // destination register 2
  input  logic [PREG_W-1:0] d2_addr,
  input  word40_t           d2_data,
  output word40_t           op_a,
  output word40_t           op_b,
  output logic [1:0]        fwd_a,     // 0 register file, 1 from dest 1, 2 from dest 2
  output logic [1:0]        fwd_b
);
  logic a1, a2, b1, b2;  // the four comparators

  assign a1 = d1_valid && (d1_addr == src_a);
  assign a2 = d2_valid && (d2_addr == src_a);
  assign b1 = d1_valid && (d1_addr == src_b);
  assign b2 = d2_valid && (d2_addr == src_b);

  always_comb begin
    op_a  = a1 ? d1_data : a2 ? d2_data : rf_a;
    fwd_a = a1 ? 2'd1 : a2 ? 2'd2 : 2'd0;
    op_b  = b1 ? d1_data : b2 ? d2_data : rf_b;
    fwd_b = b1 ? 2'd1 : b2 ? 2'd2 : 2'd0;
  end
endmodule
