// dvsp_pkg: shared types, constants and instruction encoding of the DVSP
// 16-bit digital signal soft-processor.
//
// Instruction word (32 bits, fixed length):
//   [31:26] operation (6 bits)       [25] accumulator mode    [24] reserved (0)
//   [23:16] destination operand      [15:8] source 1           [7:0] source 2
// Each 8-bit operand is {mode[3:0], idx[3:0]}. Sixteen modes fit in the field,
// seven are defined (register field, special register field, positive
// constant, negative constant, I/O queue, memory at register address, memory
// through a pointer).
//
// The 8-bit opcode split (6 operation bits, accumulator bit, reserved bit),
// the three-operand form, the 16 general and 16 special registers and the
// list of addressing modes follow the processor description. The bit
// positions, the numbering of operations, modes and special registers and
// the field layout of each operation are this design's own choices; the
// processor description does not publish its binary coding.
package dvsp_pkg;


  // ---------------------------------------------------------------- operations
  typedef enum logic [5:0] {
    OP_ADD   = 6'd0,  OP_ADDC  = 6'd1,  OP_SUB   = 6'd2,  OP_SUBC  = 6'd3,
    OP_MUL   = 6'd4,  OP_MULU  = 6'd5,  OP_MULH  = 6'd6,  OP_MULHU = 6'd7,
    OP_AND   = 6'd8,  OP_OR    = 6'd9,  OP_XOR   = 6'd10, OP_SHL   = 6'd11,
    OP_SHR   = 6'd12, OP_SRA   = 6'd13,
    // unconditional / conditional moves: dst <= src1 [if cond(src2)]
    OP_MOV   = 6'd16, OP_MOVEQ = 6'd17, OP_MOVNE = 6'd18, OP_MOVLT = 6'd19,
    OP_MOVGE = 6'd20, OP_MOVGT = 6'd21, OP_MOVLE = 6'd22,
    // jumps: pc <= src1 [if cond(src2)]
    OP_JMP   = 6'd24, OP_JEQ   = 6'd25, OP_JNE   = 6'd26, OP_JLT   = 6'd27,
    OP_JGE   = 6'd28, OP_JGT   = 6'd29, OP_JLE   = 6'd30,
    // special operations
    OP_LD    = 6'd32, // dst <= DM[src1 + src2]
    OP_ST    = 6'd33, // DM[src1 + sext(dst field)] <= src2
    OP_MOVI  = 6'd34, // dst <= {src1 field, src2 field} (16-bit constant)
    OP_CALL  = 6'd35, // dst <= return address, pc <= src1
    OP_RET   = 6'd36  // pc <= src1
  } op_e;

  // ---------------------------------------------------------- addressing modes
  typedef enum logic [3:0] {
    M_GPR  = 4'd0,  // general register R[idx]
    M_SPR  = 4'd1,  // special register S[idx]
    M_CPOS = 4'd2,  // constant +idx (0..15)
    M_CNEG = 4'd3,  // constant -(idx+1) (-1..-16)
    M_QUE  = 4'd4,  // input queue idx[0] (source) / output queue idx[0] (destination)
    M_MEMR = 4'd5,  // data memory at address R[idx]
    M_PTR  = 4'd6   // through a pointer: idx[0] auto-increment, idx[1] code pointer (source)
  } mode_e;

  typedef struct packed {
    mode_e      mode;
    logic [3:0] idx;
  } operand_t;

  typedef struct packed {
    op_e      op;
    logic     acc;
    logic     rsvd;
    operand_t dst;
    operand_t src1;
    operand_t src2;
  } instr_t;

  // ------------------------------------------------------- special registers
  localparam logic [3:0] SR_ACCL  = 4'd0;   // accumulator bits 15:0
  localparam logic [3:0] SR_ACCH  = 4'd1;   // accumulator bits 31:16
  localparam logic [3:0] SR_CNT   = 4'd2;   // zero-overhead loop count
  localparam logic [3:0] SR_BEG   = 4'd3;   // loop first instruction address
  localparam logic [3:0] SR_END   = 4'd4;   // loop last instruction address
  localparam logic [3:0] SR_PS    = 4'd5;   // data read pointer S
  localparam logic [3:0] SR_PS_LO = 4'd6;   // pointer S cyclic buffer first address
  localparam logic [3:0] SR_PS_HI = 4'd7;   // pointer S cyclic buffer last address
  localparam logic [3:0] SR_PD    = 4'd8;   // data write pointer D
  localparam logic [3:0] SR_PD_LO = 4'd9;
  localparam logic [3:0] SR_PD_HI = 4'd10;
  localparam logic [3:0] SR_PC    = 4'd11;  // code pointer C (16-bit halfword address)
  localparam logic [3:0] SR_PC_LO = 4'd12;
  localparam logic [3:0] SR_PC_HI = 4'd13;
  localparam logic [3:0] SR_FLAGS = 4'd14;  // bit 0: carry flag
  // 15 reserved, reads zero

  // Decoded control signals, produced in ID and carried down the pipeline.
  typedef struct packed {
    logic use_s1;      // source 1 is an operand
    logic use_s2;      // source 2 is an operand
    logic dst_op;      // destination field is an operand that is written
    logic is_alu;      // arithmetic / logic operation
    logic is_mov;      // MOV or MOVcc
    logic is_jmp;      // JMP, Jcc, CALL, RET
    logic is_ld;
    logic is_st;
    logic is_movi;
    logic is_call;
    logic cond_en;     // operation is conditional on src2
    logic [2:0] cond;  // 1 EQ, 2 NE, 3 LT, 4 GE, 5 GT, 6 LE
    logic is_mult;     // ALU result is a 32-bit product
    logic wr_carry;    // operation updates the carry flag
  } ctrl_t;

  // --------------------------------------------------------- encoding helpers
  function automatic operand_t opnd(mode_e m, int unsigned idx);
    opnd.mode = m;
    opnd.idx  = 4'(idx);
  endfunction

  function automatic logic [31:0] enc(op_e op, logic acc, operand_t d, operand_t s1, operand_t s2 = '0);
    instr_t i;
    i.op = op; i.acc = acc; i.rsvd = 1'b0; i.dst = d; i.src1 = s1; i.src2 = s2;
    return i;
  endfunction

  function automatic logic [31:0] enc_movi(operand_t d, logic [15:0] k);
    return {OP_MOVI, 2'b00, d, k};
  endfunction

  function automatic logic [31:0] enc_st(operand_t base, logic [7:0] off, operand_t data);
    return {OP_ST, 2'b00, off, base, data};
  endfunction

  // Signed comparison of a value with zero.
  function automatic logic cond_true(logic [2:0] c, logic [15:0] v);
    logic z, n;
    z = (v == 16'd0);
    n = v[15];
    case (c)
      3'd1: return z;
      3'd2: return !z;
      3'd3: return n;
      3'd4: return !n;
      3'd5: return !n && !z;
      3'd6: return n || z;
      default: return 1'b1;
    endcase
  endfunction

endpackage
