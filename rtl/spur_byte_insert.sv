// Byte inserter of the lower data path.
//
// Replaces one byte of a word's data part (byte position sel) with the
// given byte and leaves the tag alone. In tag mode it instead writes the
// byte into the 8-bit tag (type in bits 7:2, generation in 1:0) and
// keeps the data part, which is how write_tag moves a value from data
// into the tag. Combinational.
module spur_byte_insert
  import spur_pkg::*;
(
  input  word40_t    w,
  input  logic [7:0] b,
  input  logic [1:0] sel,
  input  logic       tag_mode,
  output word40_t    y
);
  always_comb begin
    y = w;
    if (tag_mode) begin
      y.ttype = b[7:2];
      y.gen   = b[1:0];
    end else begin
      y.data[8*sel +: 8] = b;
    end
  end
endmodule
