// Simple shifter of the lower data path: shifts a 32-bit word by 0 to 3
// places, left, right logical or right arithmetic. Longer shifts are
// left to software, which repeats the instruction. The shift amount is
// the low two bits of the second operand (this design's choice of
// encoding). Combinational.
module spur_shifter (
  input  logic [31:0] a,
  input  logic [1:0]  amount,
  input  logic [1:0]  kind,    // 0 left, 1 right logical, 2 right arithmetic
  output logic [31:0] y
);
  always_comb begin
    unique case (kind)
      2'd1:    y = a >> amount;
      2'd2:    y = 32'($signed(a) >>> amount);
      default: y = a << amount;
    endcase
  end
endmodule
