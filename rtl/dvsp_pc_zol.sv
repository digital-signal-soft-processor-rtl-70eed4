// dvsp_pc_zol: program counter of the DVSP fetch stage with zero-overhead loop
// support.
//
// Three loop registers, loop_count, loop_begin and loop_end, are special
// registers written from the EX stage (ex_spec_en with ex_rw naming SR_CNT,
// SR_BEG or SR_END, value on ex_alu). Each cycle the fetch address pc is
// compared with loop_begin and loop_end. When pc equals loop_end and the
// count is not zero, the count decrements; if it was above one the next
// fetch address is loop_begin, otherwise the loop is left and fetching falls
// through to pc+1. A loop loaded with count N therefore runs its body N times
// with no instruction spent on loop control. A taken jump from EX (ex_jmp_en,
// target on ex_alu) has priority over the loop; a pipeline stall (id_stall)
// holds pc and the loop count.
//
// The register set, the comparators against loop_begin/loop_end, the
// decrementer, the pc+1 incrementer and the priority jump > loop > pc+1 with
// the stall hold follow the processor's program counter diagram. That the
// count counts iterations and that a count of zero disables the loop are this
// design's reading. cmp_begin is brought out for observation only.
module dvsp_pc_zol
  import dvsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        id_stall,
  input  logic        ex_jmp_en,
  input  logic [15:0] ex_alu,
  input  logic        ex_spec_en,
  input  logic [3:0]  ex_rw,
  output logic [15:0] pc,
  output logic [15:0] loop_count,
  output logic [15:0] loop_begin,
  output logic [15:0] loop_end,
  output logic        cmp_begin,
  output logic        loop_back     // a zero-overhead jump back is taken this cycle
);
  logic        cmp_end, cnt_nz, cnt_last;
  logic        wr_cnt, wr_beg, wr_end;
  logic [15:0] pc_inc_int, pc_next;

  assign wr_cnt     = ex_spec_en && (ex_rw == SR_CNT);
  assign wr_beg     = ex_spec_en && (ex_rw == SR_BEG);
  assign wr_end     = ex_spec_en && (ex_rw == SR_END);
  assign cmp_begin  = (pc == loop_begin);
  assign cmp_end    = (pc == loop_end);
  assign cnt_nz     = (loop_count != 16'd0);
  assign cnt_last   = (loop_count == 16'd1);
  assign pc_inc_int = pc + 16'd1;
  assign loop_back  = cmp_end && cnt_nz && !cnt_last && !ex_jmp_en && !id_stall;

  always_comb begin
    if (id_stall)                              pc_next = pc;
    else if (ex_jmp_en)                        pc_next = ex_alu;
    else if (cmp_end && cnt_nz && !cnt_last)   pc_next = loop_begin;
    else                                       pc_next = pc_inc_int;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc         <= '0;
      loop_count <= '0;
      loop_begin <= '0;
      loop_end   <= '0;
    end else begin
      pc <= pc_next;
      if (wr_beg) loop_begin <= ex_alu;
      if (wr_end) loop_end   <= ex_alu;
      if (wr_cnt)
        loop_count <= ex_alu;
      else if (cmp_end && cnt_nz && !id_stall && !ex_jmp_en)
        loop_count <= loop_count - 16'd1;
    end
  end
endmodule
