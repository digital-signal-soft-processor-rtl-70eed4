// dvsp_alu: arithmetic-logic unit of the DVSP execute (EX) stage.
//
// Purely combinational. Computes, from operands a (source 1) and b
// (source 2): additions and subtractions with and without the carry flag,
// signed and unsigned 16x16 multiplication with a 32-bit result (w_h:w_l),
// AND/OR/XOR, shifts by b[3:0], and the pass-through of a used by moves and
// jumps. cond_ok is the signed comparison of b with zero that guards
// conditional moves and jumps. For subtraction the carry is the inverted
// borrow (set when no borrow occurs), as on the MSP430 whose instruction set
// the processor partly follows.
//
// The operation groups, the 32-bit product and the carry-flag support follow
// the processor description; the exact operation list, the carry convention
// and the shift-amount field are this design's choices. For operations that
// are not multiplications w_h is zero.
module dvsp_alu
  import dvsp_pkg::*;
(
  input  op_e         op,
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        carry_in,
  output logic [15:0] w_l,
  output logic [15:0] w_h,
  output logic        carry_out,
  output logic        cond_ok
);
  logic [16:0] sum;
  logic [31:0] prod_s, prod_u;

  assign prod_s = 32'($signed(a) * $signed(b));
  assign prod_u = 32'(a * b);

  always_comb begin
    sum       = '0;
    w_l       = a;
    w_h       = '0;
    carry_out = carry_in;
    unique case (op)
      OP_ADD:   begin sum = {1'b0, a} + {1'b0, b};                   w_l = sum[15:0]; carry_out = sum[16]; end
      OP_ADDC:  begin sum = {1'b0, a} + {1'b0, b} + 17'(carry_in);   w_l = sum[15:0]; carry_out = sum[16]; end
      OP_SUB:   begin sum = {1'b0, a} + {1'b0, ~b} + 17'd1;          w_l = sum[15:0]; carry_out = sum[16]; end
      OP_SUBC:  begin sum = {1'b0, a} + {1'b0, ~b} + 17'(carry_in);  w_l = sum[15:0]; carry_out = sum[16]; end
      OP_MUL:   begin w_l = prod_s[15:0];  w_h = prod_s[31:16]; end
      OP_MULU:  begin w_l = prod_u[15:0];  w_h = prod_u[31:16]; end
      OP_MULH:  begin w_l = prod_s[31:16]; w_h = '0; end
      OP_MULHU: begin w_l = prod_u[31:16]; w_h = '0; end
      OP_AND:   w_l = a & b;
      OP_OR:    w_l = a | b;
      OP_XOR:   w_l = a ^ b;
      OP_SHL:   w_l = a << b[3:0];
      OP_SHR:   w_l = a >> b[3:0];
      OP_SRA:   w_l = 16'($signed(a) >>> b[3:0]);
      default:  w_l = a;
    endcase
  end

  always_comb begin
    unique case (op)
      OP_MOVEQ, OP_JEQ: cond_ok = cond_true(3'd1, b);
      OP_MOVNE, OP_JNE: cond_ok = cond_true(3'd2, b);
      OP_MOVLT, OP_JLT: cond_ok = cond_true(3'd3, b);
      OP_MOVGE, OP_JGE: cond_ok = cond_true(3'd4, b);
      OP_MOVGT, OP_JGT: cond_ok = cond_true(3'd5, b);
      OP_MOVLE, OP_JLE: cond_ok = cond_true(3'd6, b);
      default:          cond_ok = 1'b1;
    endcase
  end
endmodule
