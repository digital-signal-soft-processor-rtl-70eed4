// tb_dvsp_conv4: the 4-sample convolution benchmark on one DVSP processor,
// using all the DSP extensions: the 4 samples arrive on input queue 0 and
// are stored into a data-memory buffer through write pointer D (a
// zero-overhead loop of one instruction); then a second one-instruction
// loop multiplies each sample, read through pointer S, with a coefficient
// read from program memory through code pointer C, summing into the 32-bit
// accumulator. Both accumulator halves are sent to output queue 0.
// Checks the 32-bit result for several random sample sets, that the
// multiply-accumulate part takes exactly 4 cycles, and the cycle in which
// the last output leaves (every instruction one cycle, no loop overhead).
module tb_dvsp_conv4;
  import dvsp_pkg::*;
  localparam int PMD = 64, COEF_WORD = 40, SETS = 5;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  logic pm_l_we; logic [5:0] pm_l_addr; logic [31:0] pm_l_data;
  logic [1:0][15:0] iq_data, oq_data; logic [1:0] iq_valid, iq_pop, oq_ready, oq_push;
  logic [15:0] pc; logic stall; logic [31:0] acc;

  always #5 clk = ~clk;

  dvsp_core #(.PM_DEPTH(PMD), .DM_WORDS(64), .NQ(2)) dut (
    .clk, .rst, .pm_l_we, .pm_l_addr, .pm_l_data,
    .iq_data, .iq_valid, .iq_pop, .oq_data, .oq_ready, .oq_push, .pc, .stall, .acc);

  function automatic operand_t S(logic [3:0] i); return opnd(M_SPR, i); endfunction
  function automatic operand_t K(int v);  return opnd(M_CPOS, v); endfunction
  function automatic operand_t Q(int i);  return opnd(M_QUE, i); endfunction
  function automatic operand_t PD(int inc); return opnd(M_PTR, inc); endfunction
  function automatic operand_t PCP(int inc); return opnd(M_PTR, 2 + inc); endfunction

  logic [31:0] prog [PMD];
  logic [15:0] coef [4], x [$], got [$];
  int cyc, last_push, mac_cycles;

  task automatic build();
    foreach (prog[i]) prog[i] = enc(OP_MOV, 1'b0, K(0), K(0), K(0));
    prog[0]  = enc_movi(S(SR_PD), 16'h0010);
    prog[1]  = enc_movi(S(SR_CNT), 16'd4);
    prog[2]  = enc_movi(S(SR_BEG), 16'd6);
    prog[3]  = enc_movi(S(SR_END), 16'd6);              // 3 fetches ahead of the loop
    prog[4]  = enc_movi(S(SR_PS), 16'h0010);
    prog[5]  = enc_movi(S(SR_PC), 16'(2 * COEF_WORD));
    prog[6]  = enc(OP_MOV, 0, PD(1), Q(0));              // loop 1: store 4 samples
    prog[7]  = enc_movi(S(SR_CNT), 16'd4);
    prog[8]  = enc_movi(S(SR_BEG), 16'd12);
    prog[9]  = enc_movi(S(SR_END), 16'd12);
    prog[12] = enc(OP_MUL, 1, K(0), PD(1), PCP(1));      // loop 2: acc += x * c
    prog[15] = enc(OP_MOV, 0, Q(0), S(SR_ACCL));
    prog[16] = enc(OP_MOV, 0, Q(0), S(SR_ACCH));
    prog[17] = enc_movi(opnd(M_GPR, 1), 16'd19);
    prog[19] = enc(OP_JMP, 0, K(0), opnd(M_GPR, 1));     // park at 19..21
    prog[COEF_WORD]     = {coef[1], coef[0]};
    prog[COEF_WORD + 1] = {coef[3], coef[2]};
  endtask

  // a pop taken at a rising edge is applied at the next falling edge, so the
  // queue head never changes at the edge where the processor samples it
  logic popped;
  always @(negedge clk) if (popped) void'(x.pop_front());

  always_ff @(posedge clk) begin
    popped <= 1'b0;
    if (rst) cyc <= 0;
    else begin
      cyc <= cyc + 1;
      popped <= iq_pop[0];
      if (oq_push[0]) begin got.push_back(oq_data[0]); last_push <= cyc; end
      if (dut.ex_valid && dut.ex_acc && !stall) mac_cycles <= mac_cycles + 1;
    end
  end
  assign iq_data  = {16'd0, x.size() > 0 ? x[0] : 16'd0};
  assign iq_valid = {1'b0, x.size() > 0};
  assign oq_ready = 2'b11;

  initial begin
    #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pm_l_we = 0; pm_l_addr = 0; pm_l_data = 0;
    for (int s = 0; s < SETS; s++) begin
      logic [31:0] y;
      rst = 1; got.delete(); x.delete(); mac_cycles = 0;
      for (int i = 0; i < 4; i++) begin coef[i] = 16'($urandom); x.push_back(16'($urandom)); end
      y = 0;
      for (int i = 0; i < 4; i++) y += 32'($signed(x[i]) * $signed(coef[i]));
      build();
      @(posedge clk);
      for (int i = 0; i < PMD; i++) begin
        pm_l_we = 1; pm_l_addr = 6'(i); pm_l_data = prog[i]; @(posedge clk); #1;
      end
      pm_l_we = 0;
      @(posedge clk); #1 rst = 0;
      wait (got.size() >= 2 || cyc > 500);
      repeat (5) @(posedge clk);
      checks++;
      if (got.size() != 2 || {got[1], got[0]} !== y) begin
        failures++; $display("FAIL set %0d: result %h expected %h", s, got.size() == 2 ? {got[1], got[0]} : 32'hx, y);
      end
      checks++;
      if (mac_cycles != 4) begin failures++; $display("FAIL multiply-accumulate took %0d cycles, expected 4", mac_cycles); end
      // fetches: 0..6, 3 loop repeats, 7..12, 3 loop repeats, 13..16: the
      // last output instruction is the 23rd fetched (cycle 22), and pushes
      // from ST 3 cycles later
      checks++;
      if (last_push != 25) begin failures++; $display("FAIL last output in cycle %0d, expected 25", last_push); end
      if (s == 0) $display("convolution of 4 samples: result out in cycle %0d, multiply-accumulate %0d cycles", last_push, mac_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
