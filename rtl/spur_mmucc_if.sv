// Interface to the MMU/cache controller (MMU/CC).
//
// One external cache port is shared by three requesters, in priority
// order: the execution unit's data access (memory stage), the instruction
// unit's demand fetch, and its prefetch. The winner's address, 4-bit
// cache opcode and store data go to the pins together with two mode bits
// (kernel/user, virtual/physical). Handshake, this design's choice: an
// access completes in the cycle it is driven unless the MMU/CC raises
// busy, in which case it is repeated until busy falls; read data is
// valid in the completing cycle. A prefetch that misses in the external
// cache is simply ignored by the MMU/CC (pf_ignored), and the prefetch
// unit is told when a data access took the port from it.
// Nine status lines: to the MMU/CC trap_taken, stalled, iu_miss and
// data_access; from it busy, fault, pf_ignored, interrupt and error (an
// error counts as a fault). The document gives the 4-bit opcode, the
// two mode bits and the count of nine status bits; which status bits
// they are is this design's reading. Combinational.
module spur_mmucc_if
  import spur_pkg::*;
(
  // execution unit, memory stage
  input  logic        d_req,
  input  cache_op_t   d_op,
  input  logic [31:0] d_addr,
  input  word40_t     d_wdata,
  output logic        d_done,
  output logic        d_fault,
  // instruction unit
  input  logic        if_req,
  input  logic [29:0] if_addr,
  output logic        if_done,
  input  logic        pf_req,
  input  logic [29:0] pf_addr,
  output logic        pf_done,
  output logic        pf_stop,      // prefetch lost the port or was ignored
  output word40_t     rdata,
  // CPU status
  input  logic        kernel,
  input  logic        virt,
  input  logic        trap_taken,
  input  logic        stalled,
  // pins
  output cache_op_t   ext_op,
  output logic [31:0] ext_addr,
  output word40_t     ext_wdata,
  output logic        ext_kernel,
  output logic        ext_virtual,
  output logic [3:0]  ext_status_out,  // {trap_taken, stalled, iu_miss, data_access}
  input  logic [4:0]  ext_status_in,   // {error, interrupt, pf_ignored, fault, busy}
  input  word40_t     ext_rdata,
  output logic        intr
);
  logic busy, fault, pf_ign;
  assign busy   = ext_status_in[0];
  assign fault  = ext_status_in[1] | ext_status_in[4];
  assign pf_ign = ext_status_in[2];
  assign intr   = ext_status_in[3];

  always_comb begin
    ext_op    = CO_NONE;
    ext_addr  = '0;
    ext_wdata = '0;
    if (d_req) begin
      ext_op    = d_op;
      ext_addr  = d_addr;
      ext_wdata = d_wdata;
    end else if (if_req) begin
      ext_op    = CO_IFETCH;
      ext_addr  = {if_addr, 2'b00};
    end else if (pf_req) begin
      ext_op    = CO_PREFETCH;
      ext_addr  = {pf_addr, 2'b00};
    end
  end

  assign d_done   = d_req && !busy;
  assign d_fault  = d_req && !busy && fault;
  assign if_done  = !d_req && if_req && !busy;
  assign pf_done  = !d_req && !if_req && pf_req && !busy && !pf_ign;
  assign pf_stop  = pf_req && (d_req || (!if_req && !busy && pf_ign));
  assign rdata    = ext_rdata;

  assign ext_kernel     = kernel;
  assign ext_virtual    = virt;
  assign ext_status_out = {trap_taken, stalled, if_req, d_req};
endmodule
