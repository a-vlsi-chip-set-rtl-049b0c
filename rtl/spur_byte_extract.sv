// Byte extractor of the lower data path.
//
// Selects one of the four bytes of a word's data part (byte 0 is bits
// 7:0) and returns it zero-extended. In tag mode it returns the 8-bit
// tag (type and generation) of the word in the low byte instead, which is
// how read_tag moves a tag into the data part where ordinary arithmetic
// can work on it. Combinational.
module spur_byte_extract
  import spur_pkg::*;
(
  input  word40_t     w,
  input  logic [1:0]  sel,
  input  logic        tag_mode,
  output logic [31:0] y
);
  always_comb begin
    if (tag_mode) y = {24'd0, w.ttype, w.gen};
    else          y = {24'd0, w.data[8*sel +: 8]};
  end
endmodule
