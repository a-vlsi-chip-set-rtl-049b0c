// 32-bit ALU: XOR, OR, AND, ADD, SUBTRACT, and the flags that compares use.
//
// The adder is split into four 8-bit carry-lookahead groups; inside a
// group every carry is formed from the generate and propagate terms of
// the lower bits, and the group carry-out ripples into the next group,
// as in the four 8-bit lookahead adders of the data path. SUBTRACT adds
// the inverted operand with a carry-in of one, so carry=1 means no borrow
// (a >= b unsigned). Flags: zero, negative, signed overflow, carry.
// Combinational.
module spur_alu
  import spur_pkg::*;
(
  input  alu_op_t     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        zero,
  output logic        neg,
  output logic        ovf,
  output logic        carry
);
  logic [31:0] bb, g, p, sum;
  logic [32:0] c;
  logic        sub;

  assign sub = (op == ALU_SUB);
  assign bb  = sub ? ~b : b;
  assign g   = a & bb;
  assign p   = a ^ bb;

  // carry lookahead within each 8-bit group: carry into bit i of a group
  // is formed from the group's carry-in and the generate/propagate terms
  // below bit i; group carry-outs ripple to the next group
  function automatic logic [8:1] cla8(logic [7:0] gg, logic [7:0] pp, logic cin);
    logic [8:1] co;
    for (int i = 1; i <= 8; i++) begin
      logic acc;
      acc = cin;
      for (int j = 0; j < i; j++) acc = gg[j] | (pp[j] & acc);
      co[i] = acc;
    end
    return co;
  endfunction

  assign c[0] = sub;
  for (genvar grp = 0; grp < 4; grp++) begin : g_cla
    assign c[grp*8+8 : grp*8+1] = cla8(g[grp*8 +: 8], p[grp*8 +: 8], c[grp*8]);
  end

  assign sum = p ^ c[31:0];

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: y = sum;
      ALU_AND:          y = a & b;
      ALU_OR:           y = a | b;
      ALU_XOR:          y = a ^ b;
      default:          y = sum;
    endcase
  end

  assign zero  = (y == 32'd0);
  assign neg   = y[31];
  assign carry = c[32];
  assign ovf   = (op == ALU_ADD || op == ALU_SUB) && (a[31] == bb[31]) && (sum[31] != a[31]);
endmodule
