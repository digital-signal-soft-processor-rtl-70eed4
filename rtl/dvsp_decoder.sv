// dvsp_decoder: instruction decoder of the DVSP ID stage.
//
// Combinational. Splits the 32-bit instruction word into its operation,
// accumulator-mode bit and three operands, and derives the control signals
// that travel with the instruction down the pipeline (dvsp_pkg::ctrl_t):
// which fields are operands, the instruction group (arithmetic/logic,
// movement, jump, load, store, constant, call), whether it is conditional,
// whether the ALU result is a 32-bit product and whether the carry flag is
// updated. An undefined operation code decodes as a no-operation (nothing is
// written). 'use_s1/use_s2' tell the ID stage which sources may read a queue
// or memory; 'dst_op' says the destination field is a written operand.
// The grouping follows the processor description; the encoding is this
// design's (see dvsp_pkg).
module dvsp_decoder
  import dvsp_pkg::*;
(
  input  logic [31:0] instr,
  output op_e         op,
  output logic        acc,
  output operand_t    dst,
  output operand_t    src1,
  output operand_t    src2,
  output ctrl_t       ctrl
);
  instr_t i;
  assign i    = instr_t'(instr);
  assign op   = i.op;
  assign acc  = i.acc;
  assign dst  = i.dst;
  assign src1 = i.src1;
  assign src2 = i.src2;

  always_comb begin
    ctrl = '0;
    unique case (i.op)
      OP_ADD, OP_ADDC, OP_SUB, OP_SUBC: begin
        ctrl.is_alu = 1'b1; ctrl.use_s1 = 1'b1; ctrl.use_s2 = 1'b1; ctrl.dst_op = 1'b1;
        ctrl.wr_carry = 1'b1;
      end
      OP_MUL, OP_MULU: begin
        ctrl.is_alu = 1'b1; ctrl.use_s1 = 1'b1; ctrl.use_s2 = 1'b1; ctrl.dst_op = 1'b1;
        ctrl.is_mult = 1'b1;
      end
      OP_MULH, OP_MULHU, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_SRA: begin
        ctrl.is_alu = 1'b1; ctrl.use_s1 = 1'b1; ctrl.use_s2 = 1'b1; ctrl.dst_op = 1'b1;
      end
      OP_MOV: begin
        ctrl.is_mov = 1'b1; ctrl.use_s1 = 1'b1; ctrl.dst_op = 1'b1;
      end
      OP_MOVEQ, OP_MOVNE, OP_MOVLT, OP_MOVGE, OP_MOVGT, OP_MOVLE: begin
        ctrl.is_mov = 1'b1; ctrl.use_s1 = 1'b1; ctrl.use_s2 = 1'b1; ctrl.dst_op = 1'b1;
        ctrl.cond_en = 1'b1; ctrl.cond = 3'(i.op - OP_MOV);
      end
      OP_JMP, OP_RET: begin
        ctrl.is_jmp = 1'b1; ctrl.use_s1 = 1'b1;
      end
      OP_JEQ, OP_JNE, OP_JLT, OP_JGE, OP_JGT, OP_JLE: begin
        ctrl.is_jmp = 1'b1; ctrl.use_s1 = 1'b1; ctrl.use_s2 = 1'b1;
        ctrl.cond_en = 1'b1; ctrl.cond = 3'(i.op - OP_JMP);
      end
      OP_CALL: begin
        ctrl.is_jmp = 1'b1; ctrl.is_call = 1'b1; ctrl.use_s1 = 1'b1; ctrl.dst_op = 1'b1;
      end
      OP_LD: begin
        ctrl.is_ld = 1'b1; ctrl.use_s1 = 1'b1; ctrl.use_s2 = 1'b1; ctrl.dst_op = 1'b1;
      end
      OP_ST: begin
        ctrl.is_st = 1'b1; ctrl.use_s1 = 1'b1; ctrl.use_s2 = 1'b1;
      end
      OP_MOVI: begin
        ctrl.is_movi = 1'b1; ctrl.dst_op = 1'b1;
      end
      default: ctrl = '0;
    endcase
  end
endmodule
