// Overlapped-window register decoder.
//
// Maps a 5-bit register specifier seen by the program, together with the
// 3-bit current window pointer, onto one of 138 physical registers.
// Specifiers 0-9 are the ten globals. Each of the eight windows owns
// sixteen physical registers: ten locals (specifiers 16-25) and six
// outgoing registers (26-31). The six incoming registers (10-15) of window
// w are the outgoing registers of window w-1, so a caller's register 26+k
// and its callee's register 10+k reach the same cell: the two specifiers
// agree in bits 3:0 and differ in bit 4, as in the published decoder.
// Physical layout (this design's choice): globals at 0-9, window w at
// 10+16w (locals) and 20+16w (outs). Purely combinational.
module spur_window_dec
  import spur_pkg::*;
(
  input  logic [4:0]        spec,   // register specifier from the instruction
  input  logic [2:0]        cwp,    // current window pointer
  output logic [PREG_W-1:0] preg    // physical register index, 0..137
);
  logic [2:0] win;
  logic [3:0] off;   // offset inside the 16-register window slot

  always_comb begin
    win = cwp;
    off = 4'd0;
    preg = '0;
    if (spec < 5'd10) begin
      preg = PREG_W'(spec);
    end else begin
      if (spec < 5'd16) begin          // incoming: caller's outgoing
        win = cwp - 3'd1;
        off = 4'(spec - 5'd10) + 4'd10;
      end else if (spec < 5'd26) begin // local
        off = 4'(spec - 5'd16);
      end else begin                   // outgoing
        off = 4'(spec - 5'd26) + 4'd10;
      end
      preg = PREG_W'(NGLOBAL) + {1'b0, win, off};
    end
  end
endmodule
