// Branch condition unit: turns the flags of the ALU's compare (Rs1 minus
// the second operand) into the taken/not-taken decision of a
// compare-and-branch, or compares the 6-bit type tag of Rs1 with the tag
// immediate for the tag form (only EQ and NE apply there). Signed
// conditions use negative xor overflow; unsigned ones use the carry (set
// when there is no borrow). Combinational.
module spur_branch_cond
  import spur_pkg::*;
(
  input  logic [4:0] cond,
  input  logic       tag_form,
  input  logic [5:0] tag_a,
  input  logic [5:0] tag_imm,
  input  logic       zero,
  input  logic       neg,
  input  logic       ovf,
  input  logic       carry,
  output logic       taken
);
  logic lt, ltu, eq;
  assign lt  = neg ^ ovf;
  assign ltu = ~carry;

  always_comb begin
    eq = tag_form ? (tag_a == tag_imm) : zero;
    unique case (cond)
      C_EQ:     taken = eq;
      C_NE:     taken = !eq;
      C_LT:     taken = lt;
      C_LE:     taken = lt || zero;
      C_GT:     taken = !(lt || zero);
      C_GE:     taken = !lt;
      C_LTU:    taken = ltu;
      C_LEU:    taken = ltu || zero;
      C_GTU:    taken = !(ltu || zero);
      C_GEU:    taken = !ltu;
      C_ALWAYS: taken = 1'b1;
      default:  taken = 1'b0;
    endcase
    if (tag_form && cond > C_NE && cond != C_ALWAYS) taken = 1'b0;
  end
endmodule
