// Special registers of the upper data path: kernel and user processor
// status words (KPSW, UPSW), current and saved window pointers (CWP,
// SWP), the trap PC and trap cause, and a copy of the KPSW saved on trap
// entry.
//
// Window management: a call advances CWP by one and a return moves it
// back by one. SWP marks the oldest window still held in registers. A
// call overflows when the window after the new one would be the saved
// window (its incoming registers would overwrite the oldest frame); a
// return underflows when CWP already equals SWP. Software spills and
// refills windows in the trap handlers and moves SWP itself.
// Trap entry saves the KPSW, clears the master trap enable, enters
// kernel mode, records PC and cause and advances CWP, like a call. RETT
// restores the saved KPSW. Everything updates at the clock edge; read
// ports are combinational. Special register numbers for software access:
// 0 KPSW, 1 UPSW, 2 CWP, 3 SWP, 4 trap PC (byte address), 5 trap cause,
// 6 FPU status, 7 saved KPSW. Bit layouts and numbering are this
// design's choice; the document gives only the register names and that
// eight enable bits sit in KPSW and UPSW.
module spur_special_regs
  import spur_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [2:0]  wr_sel,
  input  logic [31:0] wr_data,
  input  logic [2:0]  rd_sel,
  output logic [31:0] rd_data,
  input  logic        win_call,
  input  logic        win_ret,
  input  logic        trap_enter,
  input  logic [29:0] trap_pc_in,
  input  logic [3:0]  trap_cause_in,
  input  logic        rett,
  input  logic [2:0]  fpu_status,
  output logic [7:0]  kpsw,
  output logic [7:0]  upsw,
  output logic [2:0]  cwp,
  output logic [2:0]  swp,
  output logic        call_ovf,   // a call now would overflow
  output logic        ret_unf     // a return now would underflow
);
  logic [7:0]  kpsw_saved;
  logic [29:0] trap_pc;
  logic [3:0]  trap_cause;

  assign call_ovf = (cwp + 3'd2) == swp;
  assign ret_unf  = (cwp == swp);

  always_comb begin
    unique case (rd_sel)
      3'd0: rd_data = {24'd0, kpsw};
      3'd1: rd_data = {24'd0, upsw};
      3'd2: rd_data = {29'd0, cwp};
      3'd3: rd_data = {29'd0, swp};
      3'd4: rd_data = {trap_pc, 2'b00};
      3'd5: rd_data = {28'd0, trap_cause};
      3'd6: rd_data = {29'd0, fpu_status};
      default: rd_data = {24'd0, kpsw_saved};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kpsw       <= 8'(1 << K_KERNEL);
      upsw       <= '0;
      cwp        <= '0;
      swp        <= '0;
      kpsw_saved <= '0;
      trap_pc    <= '0;
      trap_cause <= TC_NONE;
    end else if (trap_enter) begin
      kpsw_saved           <= kpsw;
      kpsw[K_TRAP_EN]      <= 1'b0;
      kpsw[K_KERNEL]       <= 1'b1;
      trap_pc              <= trap_pc_in;
      trap_cause           <= trap_cause_in;
      cwp                  <= cwp + 3'd1;
    end else begin
      if (win_call) cwp <= cwp + 3'd1;
      if (win_ret)  cwp <= cwp - 3'd1;
      if (rett)     kpsw <= kpsw_saved;
      if (wr_en) begin
        unique case (wr_sel)
          3'd0: kpsw       <= wr_data[7:0];
          3'd1: upsw       <= wr_data[7:0];
          3'd2: cwp        <= wr_data[2:0];
          3'd3: swp        <= wr_data[2:0];
          3'd4: trap_pc    <= wr_data[31:2];
          3'd5: trap_cause <= wr_data[3:0];
          3'd7: kpsw_saved <= wr_data[7:0];
          default: ;
        endcase
      end
    end
  end
endmodule
