// dvsp_core: the DVSP 16-bit digital signal soft-processor with its program
// and data memories.
//
// A four-stage pipeline, all stages advancing together:
//   FE  program counter with zero-overhead loops (dvsp_pc_zol) addresses the
//       synchronous program memory; the instruction word arrives in ID.
//   ID  decodes, reads general registers (ports A/B) and special registers,
//       forms constant operands, computes the load/store address, starts the
//       data-memory read (register address or read pointer S), the
//       program-memory constant read (code pointer C) and the input-queue
//       read; auto-increments pointers S and C.
//   EX  selects each source among the ID value, the queue word, the data
//       memory word and the constant, runs the ALU and the condition, writes
//       general and special registers and the program counter (jumps), uses
//       and auto-increments the write pointer D.
//   ST  accumulates into the 32-bit accumulator, writes the data memory and
//       pushes into an output queue.
// There is no operand forwarding: a register result is readable by the
// instruction two places behind its producer. Jumps take effect from EX, so
// the two instructions after a jump (its delay slots) always execute. The
// whole pipeline stalls while ID reads an empty input queue or ST writes a
// full output queue; nothing changes state during a stall.
//
// Interface: NQ input queues (iq_*, show-ahead: iq_data valid while
// iq_valid, iq_pop removes it) and NQ output queues (oq_push when oq_ready).
// pm_l_* loads the program memory; hold rst while loading. Execution starts
// at address 0 after rst is released.
//
// From the processor description: the 4 stages and the work done in each,
// the stall rules, the two-cycle register latency, the Harvard memories, the
// 16 general and 16 special registers, the three pointers with
// auto-increment and modulo addressing, the accumulator and the
// zero-overhead loops. This design's own choices: the instruction encoding
// and special register numbering (dvsp_pkg), the number of queues, memory
// depths, the two jump delay slots that follow from jumping in EX, and the
// restrictions listed below.
// Restrictions: at most one data-memory source, one code-pointer source and
// one queue source per instruction (if both sources name the same kind, both
// get the same word). Register port A serves source 1, except that a
// destination in register-address memory mode uses port A for its address;
// source 1 then must not read a general register. A CALL's destination must
// be a general register.
module dvsp_core
  import dvsp_pkg::*;
#(
  parameter int unsigned PM_DEPTH = 1024,
  parameter int unsigned DM_WORDS = 1024,
  parameter int unsigned NQ       = 2
) (
  input  logic                        clk,
  input  logic                        rst,
  // program memory load port
  input  logic                        pm_l_we,
  input  logic [$clog2(PM_DEPTH)-1:0] pm_l_addr,
  input  logic [31:0]                 pm_l_data,
  // input queues
  input  logic [NQ-1:0][15:0]         iq_data,
  input  logic [NQ-1:0]               iq_valid,
  output logic [NQ-1:0]               iq_pop,
  // output queues
  output logic [NQ-1:0][15:0]         oq_data,
  input  logic [NQ-1:0]               oq_ready,
  output logic [NQ-1:0]               oq_push,
  // status
  output logic [15:0]                 pc,
  output logic                        stall,
  output logic [31:0]                 acc
);
  localparam int unsigned QW = $clog2(NQ);

  typedef enum logic [1:0] {SRC_ID, SRC_Q, SRC_DM, SRC_PM} src_e;

  // ------------------------------------------------------------------ stalls
  logic id_stall_req, st_stall_req;
  assign stall = id_stall_req | st_stall_req;

  // ---------------------------------------------------------------- FE stage
  logic        ex_jmp_en, ex_spr_we;
  logic [15:0] ex_bus;
  logic [3:0]  ex_spr_idx;
  logic [15:0] loop_count, loop_begin, loop_end;
  logic        cmp_begin, loop_back;
  logic [31:0] id_instr;
  logic [15:0] pm_k_data;
  logic [15:0] ptr_c, ptr_c_lo, ptr_c_hi;
  logic        ptr_c_inc;

  dvsp_pc_zol u_pc (
    .clk, .rst,
    .id_stall  (stall),
    .ex_jmp_en (ex_jmp_en),
    .ex_alu    (ex_bus),
    .ex_spec_en(ex_spr_we),
    .ex_rw     (ex_spr_idx),
    .pc,
    .loop_count, .loop_begin, .loop_end,
    .cmp_begin, .loop_back
  );

  dvsp_pmem #(.DEPTH(PM_DEPTH)) u_pmem (
    .clk,
    .f_en  (!stall),
    .f_addr(pc),
    .f_data(id_instr),
    .k_en  (!stall),
    .k_addr(ptr_c),
    .k_data(pm_k_data),
    .l_we  (pm_l_we),
    .l_addr(pm_l_addr),
    .l_data(pm_l_data)
  );

  logic        id_valid;
  logic [15:0] id_pc;
  always_ff @(posedge clk) begin
    if (rst) begin
      id_valid <= 1'b0;
      id_pc    <= '0;
    end else if (!stall) begin
      id_valid <= 1'b1;
      id_pc    <= pc;
    end
  end

  // ---------------------------------------------------------------- ID stage
  op_e      id_op;
  logic     id_acc;
  operand_t id_dst, id_s1, id_s2;
  ctrl_t    id_ctrl;

  dvsp_decoder u_dec (
    .instr(id_instr), .op(id_op), .acc(id_acc),
    .dst(id_dst), .src1(id_s1), .src2(id_s2), .ctrl(id_ctrl)
  );

  logic [3:0]  ra_idx, rb_idx;
  logic [15:0] ra_data, rb_data;
  logic        rf_we;
  logic [3:0]  rf_widx;
  logic [15:0] rf_wdata;

  assign ra_idx = (id_ctrl.dst_op && id_dst.mode == M_MEMR) ? id_dst.idx : id_s1.idx;
  assign rb_idx = id_s2.idx;

  dvsp_regfile u_rf (
    .clk, .rst,
    .ra_idx, .ra_data, .rb_idx, .rb_data,
    .we(rf_we), .w_idx(rf_widx), .w_data(rf_wdata)
  );

  // special registers held in this module (the others live in their units)
  logic        carry;
  logic [15:0] acch, accl;
  logic [15:0] ptr_s, ptr_s_lo, ptr_s_hi, ptr_d, ptr_d_lo, ptr_d_hi;

  function automatic logic [15:0] spr_rd(logic [3:0] idx);
    case (idx)
      SR_ACCL:  return accl;
      SR_ACCH:  return acch;
      SR_CNT:   return loop_count;
      SR_BEG:   return loop_begin;
      SR_END:   return loop_end;
      SR_PS:    return ptr_s;
      SR_PS_LO: return ptr_s_lo;
      SR_PS_HI: return ptr_s_hi;
      SR_PD:    return ptr_d;
      SR_PD_LO: return ptr_d_lo;
      SR_PD_HI: return ptr_d_hi;
      SR_PC:    return ptr_c;
      SR_PC_LO: return ptr_c_lo;
      SR_PC_HI: return ptr_c_hi;
      SR_FLAGS: return {15'd0, carry};
      default:  return 16'd0;
    endcase
  endfunction

  function automatic logic [15:0] opval(operand_t o, logic [15:0] port);
    case (o.mode)
      M_GPR:   return port;
      M_SPR:   return spr_rd(o.idx);
      M_CPOS:  return {12'd0, o.idx};
      M_CNEG:  return ~{12'd0, o.idx};   // -(idx+1)
      default: return 16'd0;
    endcase
  endfunction

  function automatic src_e srckind(operand_t o);
    case (o.mode)
      M_QUE:   return SRC_Q;
      M_MEMR:  return SRC_DM;
      M_PTR:   return o.idx[1] ? SRC_PM : SRC_DM;
      default: return SRC_ID;
    endcase
  endfunction

  logic [15:0] id_v1, id_v2, id_ldaddr, id_wa, dm_raddr;
  src_e        id_k1, id_k2;
  logic        id_q_rd;
  logic [QW-1:0] id_q_sel;
  logic        ptr_s_inc;

  always_comb begin
    id_k1 = id_ctrl.use_s1 ? srckind(id_s1) : SRC_ID;
    id_k2 = id_ctrl.use_s2 ? srckind(id_s2) : SRC_ID;
    id_v1 = id_ctrl.use_s1 ? opval(id_s1, ra_data) : 16'd0;
    id_v2 = id_ctrl.use_s2 ? opval(id_s2, rb_data) : 16'd0;
    if (id_ctrl.is_movi) id_v1 = {id_s1, id_s2};
    // address calculation for load and store
    id_ldaddr = id_v1 + id_v2;
    if (id_ctrl.is_st)   id_wa = id_v1 + {{8{id_dst[7]}}, id_dst};
    else                 id_wa = ra_data;     // destination at address R[dst.idx]
    // data memory read address
    if (id_ctrl.is_ld)                              dm_raddr = id_ldaddr;
    else if (id_k1 == SRC_DM && id_s1.mode == M_MEMR) dm_raddr = ra_data;
    else if (id_k2 == SRC_DM && id_s2.mode == M_MEMR) dm_raddr = rb_data;
    else                                             dm_raddr = ptr_s;
    // input queue access
    id_q_rd  = id_valid && (id_k1 == SRC_Q || id_k2 == SRC_Q);
    id_q_sel = (id_k1 == SRC_Q) ? id_s1.idx[QW-1:0] : id_s2.idx[QW-1:0];
    // pointer auto-increment
    ptr_s_inc = id_valid && !stall &&
                ((id_k1 == SRC_DM && id_s1.mode == M_PTR && id_s1.idx[0]) ||
                 (id_k2 == SRC_DM && id_s2.mode == M_PTR && id_s2.idx[0]));
    ptr_c_inc = id_valid && !stall &&
                ((id_k1 == SRC_PM && id_s1.idx[0]) || (id_k2 == SRC_PM && id_s2.idx[0]));
  end

  assign id_stall_req = id_q_rd && !iq_valid[id_q_sel];

  always_comb begin
    iq_pop = '0;
    if (id_q_rd && !stall) iq_pop[id_q_sel] = 1'b1;
  end

  logic [15:0] dm_rdata;
  logic        dm_we;
  logic [15:0] dm_waddr, dm_wdata;

  dvsp_dmem #(.WORDS(DM_WORDS)) u_dmem (
    .clk,
    .r_en  (!stall),
    .r_addr(dm_raddr),
    .r_data(dm_rdata),
    .w_en  (dm_we),
    .w_addr(dm_waddr),
    .w_data(dm_wdata)
  );

  // ------------------------------------------------------------ ID/EX register
  logic        ex_valid, ex_acc;
  op_e         ex_op;
  ctrl_t       ex_ctrl;
  operand_t    ex_dst;
  src_e        ex_k1, ex_k2;
  logic [15:0] ex_v1, ex_v2, ex_q, ex_wa, ex_pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      ex_valid <= 1'b0;
      ex_ctrl  <= '0;
      ex_acc   <= 1'b0;
    end else if (!stall) begin
      ex_valid <= id_valid;
      ex_ctrl  <= id_valid ? id_ctrl : '0;
      ex_acc   <= id_valid && id_acc;
    end
  end

  always_ff @(posedge clk) begin
    if (!stall) begin
      ex_op  <= id_op;
      ex_dst <= id_dst;
      ex_k1  <= id_k1;
      ex_k2  <= id_k2;
      ex_v1  <= id_v1;
      ex_v2  <= id_v2;
      ex_q   <= iq_data[id_q_sel];
      ex_wa  <= id_wa;
      ex_pc  <= id_pc;
    end
  end

  // ---------------------------------------------------------------- EX stage
  function automatic logic [15:0] srcsel(src_e k, logic [15:0] v);
    case (k)
      SRC_Q:   return ex_q;
      SRC_DM:  return dm_rdata;
      SRC_PM:  return pm_k_data;
      default: return v;
    endcase
  endfunction

  logic [15:0] ex_a, ex_b, alu_l, alu_h, ex_res;
  logic        alu_cout, cond_ok, ex_do, ex_wr;

  assign ex_a = srcsel(ex_k1, ex_v1);
  assign ex_b = srcsel(ex_k2, ex_v2);

  dvsp_alu u_alu (
    .op(ex_op), .a(ex_a), .b(ex_b), .carry_in(carry),
    .w_l(alu_l), .w_h(alu_h), .carry_out(alu_cout), .cond_ok
  );

  always_comb begin
    if (ex_ctrl.is_ld)        ex_res = dm_rdata;
    else if (ex_ctrl.is_call) ex_res = ex_pc + 16'd3;   // past the two delay slots
    else                      ex_res = alu_l;
  end

  assign ex_do      = ex_valid && cond_ok;           // instruction takes effect
  assign ex_wr      = ex_do && ex_ctrl.dst_op;
  assign ex_jmp_en  = ex_do && ex_ctrl.is_jmp;
  assign ex_bus     = ex_ctrl.is_jmp ? ex_a : ex_res;
  assign ex_spr_we  = ex_wr && ex_dst.mode == M_SPR && !stall;
  assign ex_spr_idx = ex_dst.idx;

  assign rf_we    = ex_wr && ex_dst.mode == M_GPR && !stall;
  assign rf_widx  = ex_dst.idx;
  assign rf_wdata = ex_res;

  // carry flag
  always_ff @(posedge clk) begin
    if (rst)                                   carry <= 1'b0;
    else if (ex_spr_we && ex_spr_idx == SR_FLAGS) carry <= ex_res[0];
    else if (ex_do && ex_ctrl.wr_carry && !stall) carry <= alu_cout;
  end

  // pointers: S and C are used in ID, D in EX
  logic ptr_d_inc, ex_dst_ptr;
  assign ex_dst_ptr = ex_wr && ex_dst.mode == M_PTR;
  assign ptr_d_inc  = ex_dst_ptr && ex_dst.idx[0] && !stall;

  dvsp_pointer #(.STEP(2)) u_ptr_s (
    .clk, .rst,
    .we_ptr(ex_spr_we && ex_spr_idx == SR_PS),
    .we_lo (ex_spr_we && ex_spr_idx == SR_PS_LO),
    .we_hi (ex_spr_we && ex_spr_idx == SR_PS_HI),
    .wdata (ex_res), .inc(ptr_s_inc),
    .ptr(ptr_s), .lo(ptr_s_lo), .hi(ptr_s_hi)
  );

  dvsp_pointer #(.STEP(2)) u_ptr_d (
    .clk, .rst,
    .we_ptr(ex_spr_we && ex_spr_idx == SR_PD),
    .we_lo (ex_spr_we && ex_spr_idx == SR_PD_LO),
    .we_hi (ex_spr_we && ex_spr_idx == SR_PD_HI),
    .wdata (ex_res), .inc(ptr_d_inc),
    .ptr(ptr_d), .lo(ptr_d_lo), .hi(ptr_d_hi)
  );

  dvsp_pointer #(.STEP(1)) u_ptr_c (
    .clk, .rst,
    .we_ptr(ex_spr_we && ex_spr_idx == SR_PC),
    .we_lo (ex_spr_we && ex_spr_idx == SR_PC_LO),
    .we_hi (ex_spr_we && ex_spr_idx == SR_PC_HI),
    .wdata (ex_res), .inc(ptr_c_inc),
    .ptr(ptr_c), .lo(ptr_c_lo), .hi(ptr_c_hi)
  );

  // ------------------------------------------------------------ EX/ST register
  logic          st_spec_en, st_acc, st_mult, st_dm_we, st_q_we;
  logic [3:0]    st_rw;
  logic [15:0]   st_h, st_l, st_addr, st_wdata;
  logic [QW-1:0] st_q_sel;

  always_ff @(posedge clk) begin
    if (rst) begin
      st_spec_en <= 1'b0;
      st_acc     <= 1'b0;
      st_mult    <= 1'b0;
      st_dm_we   <= 1'b0;
      st_q_we    <= 1'b0;
    end else if (!stall) begin
      st_spec_en <= ex_wr && ex_dst.mode == M_SPR;
      st_acc     <= ex_do && ex_acc;
      st_mult    <= ex_ctrl.is_mult;
      st_dm_we   <= (ex_wr && (ex_dst.mode == M_MEMR || ex_dst.mode == M_PTR)) ||
                    (ex_do && ex_ctrl.is_st);
      st_q_we    <= ex_wr && ex_dst.mode == M_QUE;
    end
  end

  always_ff @(posedge clk) begin
    if (!stall) begin
      st_rw    <= ex_dst.idx;
      st_h     <= alu_h;
      st_l     <= ex_res;
      st_addr  <= ex_dst_ptr ? ptr_d : ex_wa;
      st_wdata <= ex_ctrl.is_st ? ex_b : ex_res;
      st_q_sel <= ex_dst.idx[QW-1:0];
    end
  end

  // ---------------------------------------------------------------- ST stage
  dvsp_acc u_acc (
    .clk, .rst,
    .en         (!stall),
    .st_spec_en (st_spec_en),
    .st_rw      (st_rw),
    .st_acc     (st_acc),
    .st_alu_mult(st_mult),
    .st_alu_h   (st_h),
    .st_alu_l   (st_l),
    .acch, .accl
  );
  assign acc = {acch, accl};

  assign dm_we    = st_dm_we && !stall;
  assign dm_waddr = st_addr;
  assign dm_wdata = st_wdata;

  assign st_stall_req = st_q_we && !oq_ready[st_q_sel];

  always_comb begin
    oq_push = '0;
    for (int i = 0; i < int'(NQ); i++) oq_data[i] = st_l;
    if (st_q_we && !stall) oq_push[st_q_sel] = 1'b1;
  end

  // Queue handshakes: pop only a queue that holds data, push only a queue
  // that has room.
  a_pop_valid:  assert property (@(posedge clk) disable iff (rst) (iq_pop & ~iq_valid) == '0);
  a_push_ready: assert property (@(posedge clk) disable iff (rst) (oq_push & ~oq_ready) == '0);
endmodule
