// General register file: 138 registers of 40 bits (6-bit type tag,
// 2-bit generation number, 32 data bits), addressed by physical index.
//
// Two read ports and one write port per cycle, as the pipeline needs.
// Reads are combinational; the write takes effect at the clock edge, so a
// value written in a cycle is visible to reads from the next cycle on.
// Results that are not yet written are supplied by the internal
// forwarding block, not by a write-through path here. The registers
// have no reset: software initialises what it uses.
module spur_regfile
  import spur_pkg::*;
#(
  parameter int unsigned NREGS = NREG_PHYS
)(
  input  logic              clk,
  input  logic [PREG_W-1:0] ra_addr,
  output word40_t           ra_data,
  input  logic [PREG_W-1:0] rb_addr,
  output word40_t           rb_data,
  input  logic              we,
  input  logic [PREG_W-1:0] w_addr,
  input  word40_t           w_data
);
  word40_t regs [NREGS];

  assign ra_data = (ra_addr < PREG_W'(NREGS)) ? regs[ra_addr] : '0;
  assign rb_data = (rb_addr < PREG_W'(NREGS)) ? regs[rb_addr] : '0;

  always_ff @(posedge clk) begin
    if (we && w_addr < PREG_W'(NREGS)) regs[w_addr] <= w_data;
  end
endmodule
