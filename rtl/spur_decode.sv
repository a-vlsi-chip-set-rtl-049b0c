// Master control opcode decoder: the combinational "opcode PLA" that
// turns the 7-bit primary opcode (or the 4-bit call/jump opcode) into the
// high-level control word that travels with the instruction through the
// execute, memory and write stages, where local logic uses it.
//
// Coprocessor opcodes (0x40-0x53, twenty of them) are illegal while the
// FPU is disabled. When it is enabled they are no-ops for the CPU, except
// coprocessor load and store, for which the CPU forms the address and the
// FPU moves the data. Undefined opcodes are illegal. The opcode values
// are this design's; the document gives the formats and the instruction
// classes but not the encodings. Combinational.
module spur_decode
  import spur_pkg::*;
(
  input  logic [31:0] inst,
  input  logic        fpu_en,
  output ctrl_t       ctrl
);
  logic [6:0] op;
  assign op = inst[31:25];

  always_comb begin
    ctrl = '0;
    ctrl.alu_op  = ALU_ADD;
    ctrl.res_sel = RES_ALU;
    ctrl.cache_op = CO_NONE;
    ctrl.legal = 1'b1;
    if (op[6:3] == OP4_CALL) begin
      ctrl.is_call = 1'b1;
      ctrl.wr_rd   = 1'b1;
      ctrl.res_sel = RES_LINK;
    end else if (op[6:3] == OP4_JUMP) begin
      ctrl.is_jump = 1'b1;
    end else if (op >= OP_FP_FIRST && op <= OP_FP_ST) begin
      ctrl.is_fpu = 1'b1;
      ctrl.legal  = fpu_en;
      if (fpu_en && (op == OP_FP_LD || op == OP_FP_ST)) begin
        ctrl.fpu_mem  = 1'b1;
        ctrl.rd_a     = 1'b1;
        ctrl.rd_b     = 1'b1;
        ctrl.cache_op = (op == OP_FP_LD) ? CO_LOAD : CO_STORE;
      end
    end else begin
      unique case (op)
        OP_NOP: ;
        OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_ADD_T, OP_SUB_T: begin
          ctrl.rd_a = 1'b1; ctrl.rd_b = 1'b1; ctrl.wr_rd = 1'b1;
          ctrl.alu_op = (op == OP_SUB || op == OP_SUB_T) ? ALU_SUB :
                        (op == OP_AND) ? ALU_AND : (op == OP_OR) ? ALU_OR :
                        (op == OP_XOR) ? ALU_XOR : ALU_ADD;
          ctrl.chk_data = (op == OP_ADD_T || op == OP_SUB_T);
          ctrl.chk_ovf  = (op == OP_ADD_T || op == OP_SUB_T);
        end
        OP_SLL, OP_SRL, OP_SRA: begin
          ctrl.rd_a = 1'b1; ctrl.rd_b = 1'b1; ctrl.wr_rd = 1'b1;
          ctrl.res_sel = RES_SHIFT;
          ctrl.shift_kind = (op == OP_SLL) ? 2'd0 : (op == OP_SRL) ? 2'd1 : 2'd2;
        end
        OP_EXTRACT: begin
          ctrl.rd_a = 1'b1; ctrl.rd_b = 1'b1; ctrl.wr_rd = 1'b1; ctrl.res_sel = RES_EXTRACT;
        end
        OP_INSERT: begin
          ctrl.rd_a = 1'b1; ctrl.rd_b = 1'b1; ctrl.wr_rd = 1'b1; ctrl.res_sel = RES_INSERT;
        end
        OP_RD_TAG: begin
          ctrl.rd_a = 1'b1; ctrl.wr_rd = 1'b1; ctrl.res_sel = RES_RDTAG;
        end
        OP_WR_TAG: begin
          ctrl.rd_a = 1'b1; ctrl.rd_b = 1'b1; ctrl.wr_rd = 1'b1; ctrl.res_sel = RES_WRTAG;
        end
        OP_LD, OP_LD_T, OP_LD_S0, OP_LD_S1, OP_LD_S2, OP_LD_S3, OP_LD_S4, OP_LD_S5, OP_LD_S6: begin
          ctrl.rd_a = 1'b1; ctrl.rd_b = 1'b1; ctrl.wr_rd = 1'b1; ctrl.is_load = 1'b1;
          ctrl.chk_ptr  = (op == OP_LD_T);
          ctrl.cache_op = (op >= OP_LD_S0) ? cache_op_t'(4'(op - OP_LD_S0) + CO_LD_S0) : CO_LOAD;
        end
        OP_ST, OP_ST_40, OP_ST_S0, OP_ST_S1, OP_ST_S2: begin
          ctrl.rd_a = 1'b1; ctrl.rd_b = 1'b1; ctrl.is_store = 1'b1; ctrl.store_imm = 1'b1;
          ctrl.chk_gen  = (op == OP_ST_40);
          ctrl.cache_op = (op >= OP_ST_S0) ? cache_op_t'(4'(op - OP_ST_S0) + CO_ST_S0) : CO_STORE;
        end
        OP_RD_SPEC: begin
          ctrl.wr_rd = 1'b1; ctrl.res_sel = RES_SPEC;
        end
        OP_WR_SPEC: begin
          ctrl.rd_a = 1'b1; ctrl.wr_spec = 1'b1;
        end
        OP_RETURN, OP_RETT: begin
          ctrl.rd_a = 1'b1; ctrl.rd_b = 1'b1;
          ctrl.is_return = 1'b1;
          ctrl.is_rett   = (op == OP_RETT);
        end
        OP_CMPBR: begin
          ctrl.rd_a = 1'b1; ctrl.rd_b = 1'b1; ctrl.is_branch = 1'b1; ctrl.alu_op = ALU_SUB;
        end
        OP_CMPBR_TAG: begin
          ctrl.rd_a = 1'b1; ctrl.is_branch = 1'b1; ctrl.is_tag_branch = 1'b1;
        end
        default: ctrl.legal = 1'b0;
      endcase
    end
  end
endmodule
