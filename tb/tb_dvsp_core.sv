// tb_dvsp_core: end-to-end test of one DVSP processor.
//
// Loads a program that exercises every instruction group and mechanism:
// constants (MOVI, +/- short constants), ALU operations with 32-bit product,
// carry chain (ADD/ADDC), input and output queues, the 32-bit accumulator in
// a multiply-accumulate loop run by the zero-overhead loop hardware,
// load/store with register+offset, register-address memory mode, read
// pointer S with modulo wrap, write pointer D with auto-increment, code
// pointer C reading constants from program memory, conditional move,
// conditional jump with its two delay slots, call and return.
// The expected output stream is worked out by hand from the program below.
// Run 1 has the queues always ready and checks the exact cycle count
// (every instruction one cycle, no cycles spent on loop control). Run 2
// starves the input queues and blocks the output queue at random and checks
// that the same results come out and that both kinds of stall happened.
module tb_dvsp_core;
  import dvsp_pkg::*;
  int checks = 0, failures = 0;
  localparam int PMD = 128;

  logic clk = 0, rst = 1;
  logic pm_l_we; logic [6:0] pm_l_addr; logic [31:0] pm_l_data;
  logic [1:0][15:0] iq_data, oq_data; logic [1:0] iq_valid, iq_pop, oq_ready, oq_push;
  logic [15:0] pc; logic stall; logic [31:0] acc;

  always #5 clk = ~clk;

  dvsp_core #(.PM_DEPTH(PMD), .DM_WORDS(256), .NQ(2)) dut (
    .clk, .rst, .pm_l_we, .pm_l_addr, .pm_l_data,
    .iq_data, .iq_valid, .iq_pop, .oq_data, .oq_ready, .oq_push, .pc, .stall, .acc);

  // operand shorthands
  function automatic operand_t R(int i);  return opnd(M_GPR, i); endfunction
  function automatic operand_t S(logic [3:0] i); return opnd(M_SPR, i); endfunction
  function automatic operand_t K(int v);  return v >= 0 ? opnd(M_CPOS, v) : opnd(M_CNEG, -v - 1); endfunction
  function automatic operand_t Q(int i);  return opnd(M_QUE, i); endfunction
  function automatic operand_t MR(int i); return opnd(M_MEMR, i); endfunction
  function automatic operand_t PD(int inc); return opnd(M_PTR, inc); endfunction
  function automatic operand_t PCP(int inc); return opnd(M_PTR, 2 + inc); endfunction

  logic [31:0] prog [PMD];
  logic [15:0] in0 [$], in1 [$], exp0 [$], exp1 [$], got0 [$], got1 [$];
  int          in_stalls, out_stalls, loop_backs, pushes;

  function automatic logic [31:0] nop();
    return enc(OP_MOV, 1'b0, K(0), K(0), K(0));
  endfunction

  task automatic build();
    foreach (prog[i]) prog[i] = nop();
    prog[0]  = enc_movi(R(1), 16'd1000);
    prog[1]  = enc_movi(R(2), 16'hFFFD);                 // -3
    prog[3]  = enc(OP_ADD,  0, Q(0), R(1), R(2));        // 997
    prog[4]  = enc(OP_SUB,  0, Q(0), R(2), R(1));        // -1003
    prog[5]  = enc(OP_MUL,  0, Q(0), R(1), R(2));        // low(-3000)
    prog[6]  = enc(OP_MULH, 0, Q(0), R(1), R(2));        // high(-3000)
    prog[7]  = enc(OP_ADD,  0, R(3), Q(0), K(5));        // in0 + 5
    prog[9]  = enc(OP_MOV,  0, Q(0), R(3));
    prog[10] = enc(OP_MOV,  0, S(SR_ACCL), K(0), K(0));
    prog[11] = enc(OP_MOV,  0, S(SR_ACCH), K(0), K(0));
    prog[12] = enc_movi(S(SR_CNT), 16'd4);
    prog[13] = enc_movi(S(SR_BEG), 16'd17);
    prog[14] = enc_movi(S(SR_END), 16'd17);              // written 3 fetches ahead of the loop end
    prog[15] = enc_movi(R(5), 16'hFFFF);
    prog[17] = enc(OP_MUL,  1, K(0), Q(0), R(2));        // acc += in0 * -3, 4 times
    prog[18] = enc(OP_MOV,  0, Q(0), Q(1));              // echo in1
    prog[20] = enc(OP_MOV,  0, Q(0), S(SR_ACCL));
    prog[21] = enc(OP_MOV,  0, Q(0), S(SR_ACCH));
    prog[22] = enc_movi(R(6), 16'h0001);
    prog[24] = enc(OP_ADD,  0, R(7), R(5), R(6));        // 0, carry 1
    prog[25] = enc(OP_ADDC, 0, R(8), K(0), K(0));        // 1
    prog[27] = enc(OP_MOV,  0, Q(0), R(7));
    prog[28] = enc(OP_MOV,  0, Q(0), R(8));
    prog[29] = enc_movi(R(9), 16'h0040);
    prog[30] = enc_movi(R(10), 16'h1234);
    prog[32] = enc_st(R(9), 8'd2, R(10));                // DM[0x42] = 0x1234
    prog[33] = enc(OP_MOV,  0, MR(9), K(7));             // DM[0x40] = 7
    prog[36] = enc(OP_LD,   0, R(11), R(9), K(2));       // R11 = DM[0x42]
    prog[37] = enc(OP_MOV,  0, Q(0), MR(9));             // 7
    prog[39] = enc(OP_MOV,  0, Q(0), R(11));             // 0x1234
    prog[40] = enc_movi(S(SR_PS_LO), 16'h0040);
    prog[41] = enc_movi(S(SR_PS_HI), 16'h0042);
    prog[42] = enc_movi(S(SR_PS), 16'h0040);
    prog[44] = enc(OP_MOV,  0, Q(0), PD(1));             // 7
    prog[45] = enc(OP_MOV,  0, Q(0), PD(1));             // 0x1234
    prog[46] = enc(OP_MOV,  0, Q(0), PD(1));             // 7 (wrapped)
    prog[47] = enc_movi(S(SR_PD), 16'h0080);
    prog[48] = enc(OP_MOV,  0, PD(1), K(9));             // DM[0x80] = 9
    prog[49] = enc(OP_MOV,  0, PD(1), K(10));            // DM[0x82] = 10
    prog[50] = enc_movi(R(12), 16'h0080);
    prog[53] = enc(OP_MOV,  0, Q(0), MR(12));            // 9
    prog[54] = enc(OP_LD,   0, R(13), R(12), K(2));      // 10
    prog[56] = enc(OP_MOV,  0, Q(0), R(13));
    prog[57] = enc_movi(S(SR_PC), 16'd240);              // halfword address of word 120
    prog[59] = enc(OP_MOV,  0, Q(0), PCP(1));            // low half of word 120
    prog[60] = enc(OP_MOV,  0, Q(0), PCP(1));            // high half
    prog[61] = enc_movi(R(14), 16'd0);
    prog[63] = enc(OP_MOVLT, 0, R(14), K(5), R(2));      // taken: -3 < 0
    prog[64] = enc(OP_MOVGT, 0, R(14), K(6), R(2));      // not taken
    prog[65] = enc(OP_MOV,  0, Q(1), K(3));
    prog[66] = enc(OP_MOV,  0, Q(0), R(14));             // 5
    prog[67] = enc_movi(R(15), 16'd80);
    prog[69] = enc(OP_JGE,  0, K(0), R(15), R(1));       // taken
    prog[70] = enc(OP_MOV,  0, Q(0), K(1));              // delay slot 1
    prog[71] = enc(OP_MOV,  0, Q(0), K(2));              // delay slot 2
    prog[72] = enc(OP_MOV,  0, Q(0), K(15));             // skipped
    prog[80] = enc_movi(R(15), 16'd100);
    prog[82] = enc(OP_CALL, 0, R(0), R(15), K(0));       // R0 = 85
    prog[85] = enc(OP_MOV,  0, Q(0), R(0));
    prog[86] = enc_movi(R(15), 16'd88);
    prog[88] = enc(OP_JMP,  0, K(0), R(15), K(0));       // stay here
    prog[100] = enc(OP_MOV, 0, Q(0), K(12));
    prog[101] = enc(OP_RET, 0, K(0), R(0), K(0));
    prog[120] = 32'hBEEF_CAFE;
  endtask

  task automatic expected();
    logic [31:0] a;
    exp0.delete(); exp1.delete(); in0.delete(); in1.delete();
    in0 = '{16'd100, 16'd3, 16'hFFF0, 16'd1234, 16'd7};
    in1 = '{16'd77};
    a = 32'($signed(in0[1]) * -3) + 32'($signed(in0[2]) * -3) +
        32'($signed(in0[3]) * -3) + 32'($signed(in0[4]) * -3);
    exp0 = '{16'd997, 16'(-1003), 16'(-3000), 16'hFFFF, 16'd105, 16'd77, a[15:0], a[31:16],
             16'd0, 16'd1, 16'd7, 16'h1234, 16'd7, 16'h1234, 16'd7, 16'd9, 16'd10,
             16'hCAFE, 16'hBEEF, 16'd5, 16'd1, 16'd2, 16'd12, 16'd85};
    exp1 = '{16'd3};
  endtask

  bit random_flow;
  int cyc, last_push_cyc;

  // pops taken at a rising edge are applied at the next falling edge, so the
  // queue head never changes at the edge where the processor samples it
  logic [1:0] popped;

  always_ff @(posedge clk) begin
    popped <= '0;
    if (!rst) begin
      cyc <= cyc + 1;
      popped <= iq_pop;
      if (oq_push[0]) begin got0.push_back(oq_data[0]); last_push_cyc <= cyc; end
      if (oq_push[1]) got1.push_back(oq_data[1]);
      if (dut.id_stall_req) in_stalls <= in_stalls + 1;
      if (dut.st_stall_req) out_stalls <= out_stalls + 1;
      if (dut.u_pc.loop_back) loop_backs <= loop_backs + 1;
    end else begin
      cyc <= 0;
    end
  end

  always_comb begin
    iq_data[0]  = in0.size() > 0 ? in0[0] : 16'd0;
    iq_data[1]  = in1.size() > 0 ? in1[0] : 16'd0;
  end

  always @(negedge clk) begin
    if (popped[0]) void'(in0.pop_front());
    if (popped[1]) void'(in1.pop_front());
    iq_valid[0] <= in0.size() > 0 && (!random_flow || $urandom_range(0, 2) == 0);
    iq_valid[1] <= in1.size() > 0 && (!random_flow || $urandom_range(0, 2) == 0);
    oq_ready    <= random_flow ? 2'($urandom) : 2'b11;
  end

  task automatic run(bit rnd);
    random_flow = rnd;
    rst = 1;
    got0.delete(); got1.delete();
    in_stalls = 0; out_stalls = 0; loop_backs = 0;
    expected();
    build();
    pm_l_we = 0;
    @(posedge clk);
    for (int i = 0; i < PMD; i++) begin
      pm_l_we = 1; pm_l_addr = 7'(i); pm_l_data = prog[i];
      @(posedge clk); #1;
    end
    pm_l_we = 0;
    @(posedge clk); #1 rst = 0;
    wait (got0.size() >= exp0.size() || cyc > 3000);
    repeat (20) @(posedge clk);
    checks++;
    if (got0.size() != exp0.size()) begin
      failures++; $display("FAIL run %0d: %0d words on queue 0, expected %0d", rnd, got0.size(), exp0.size());
    end
    for (int i = 0; i < exp0.size() && i < got0.size(); i++) begin
      checks++;
      if (got0[i] !== exp0[i]) begin failures++; $display("FAIL run %0d out0[%0d] = %h expected %h", rnd, i, got0[i], exp0[i]); end
    end
    checks++;
    if (got1.size() != 1 || got1[0] !== exp1[0]) begin failures++; $display("FAIL queue 1 output"); end
    checks++;
    if (in0.size() != 0 || in1.size() != 0) begin failures++; $display("FAIL inputs not consumed"); end
    checks++;
    if (loop_backs != 3) begin failures++; $display("FAIL loop jumped back %0d times, expected 3", loop_backs); end
    if (!rnd) begin
      // 85 instructions fetched before the last output instruction, 3 more
      // cycles to reach ST, counted from the first cycle after reset
      checks++;
      if (last_push_cyc != 87) begin failures++; $display("FAIL last output in cycle %0d, expected 87", last_push_cyc); end
      checks++;
      if (in_stalls != 0 || out_stalls != 0) begin failures++; $display("FAIL unexpected stalls"); end
    end else begin
      checks++;
      if (in_stalls == 0) begin failures++; $display("FAIL no input-queue stall happened"); end
      checks++;
      if (out_stalls == 0) begin failures++; $display("FAIL no output-queue stall happened"); end
      $display("run with random flow: %0d input stalls, %0d output stalls", in_stalls, out_stalls);
    end
  endtask

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    iq_valid = 0; oq_ready = 0; pm_l_addr = 0; pm_l_data = 0; pm_l_we = 0;
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
