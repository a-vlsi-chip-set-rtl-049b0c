// Tag checker for LISP support. Runs beside the data operation on the
// upper 8 bits of the operands; tag and data never exchange information.
//
//  - data type check: both operands must carry the fixnum type (type 0);
//  - pointer type check: the address operand must carry the pair type
//    (type 1), used by list loads;
//  - generation check: storing an object whose generation number is
//    higher than that of the object it is stored into is flagged, which
//    the garbage collector uses to track pointers between generations.
// The type codes are this design's. The outputs are raw mismatches; the
// trap logic applies the enable bits. Combinational.
module spur_tag_check
  import spur_pkg::*;
(
  input  word40_t a,          // Rs1 (object stored into / address base)
  input  word40_t b,          // Rs2 (second operand / object being stored)
  input  logic    chk_data,
  input  logic    chk_ptr,
  input  logic    chk_gen,
  output logic    tag_err,    // data or pointer type mismatch
  output logic    gen_err
);
  assign tag_err = (chk_data && (a.ttype != TAG_FIXNUM || b.ttype != TAG_FIXNUM))
                || (chk_ptr  &&  a.ttype != TAG_PAIR);
  assign gen_err = chk_gen && (b.gen > a.gen);
endmodule
