// tb_dvsp_platform: end-to-end test of the three-processor platform at its
// default sizes.
//
// Programs:
//   core 0  fan-out: every input sample is copied to output queues 0 and 1.
//   core 1  TAPS-tap FIR filter (convolution). The delay line is a cyclic
//           buffer in data memory written through pointer D and read through
//           pointer S; the coefficients are halfwords in program memory read
//           through the code pointer C, also as a cyclic buffer. The
//           multiply-accumulate runs as a zero-overhead loop of one
//           instruction into the 32-bit accumulator; the low half of the sum
//           is sent out.
//   core 2  signal energy: running sum of x*x in the accumulator, low half
//           sent out after each sample.
// The expected streams are computed here from the samples. Phase 1 feeds
// the input and drains the outputs without pause and checks the FIR rate
// (one result every 16 cycles, from the program's instruction count).
// Phase 2 feeds and drains at random so that processors stall on empty and
// on full queues. Every mechanism is counted and must have occurred.
module tb_dvsp_platform;
  import dvsp_pkg::*;
  localparam int TAPS = 4;
  localparam int NS1 = 40, NS2 = 200;    // samples in phase 1 and phase 2
  localparam int FLUSH = 2;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  logic [2:0] pm_l_we; logic [9:0] pm_l_addr; logic [31:0] pm_l_data;
  logic in_push, in_ready; logic [15:0] in_data;
  logic [1:0] out_pop, out_valid; logic [1:0][15:0] out_data;
  logic [2:0][15:0] pc; logic [2:0] stall; logic [2:0][31:0] acc;

  always #5 clk = ~clk;

  dvsp_platform dut (.clk, .rst, .pm_l_we, .pm_l_addr, .pm_l_data, .in_push, .in_data, .in_ready,
                     .out_pop, .out_data, .out_valid, .pc, .stall, .acc);

  function automatic operand_t R(int i);  return opnd(M_GPR, i); endfunction
  function automatic operand_t S(logic [3:0] i); return opnd(M_SPR, i); endfunction
  function automatic operand_t K(int v);  return v >= 0 ? opnd(M_CPOS, v) : opnd(M_CNEG, -v - 1); endfunction
  function automatic operand_t Q(int i);  return opnd(M_QUE, i); endfunction
  function automatic operand_t PD(int inc); return opnd(M_PTR, inc); endfunction
  function automatic operand_t PCP(int inc); return opnd(M_PTR, 2 + inc); endfunction

  logic [31:0] prog [3][$];
  logic [15:0] coef [TAPS];
  localparam int COEF_WORD = 100;

  function automatic logic [31:0] nop();
    return enc(OP_MOV, 1'b0, K(0), K(0), K(0));
  endfunction

  task automatic build();
    int top, l;
    // core 0: fan-out
    prog[0] = '{enc_movi(R(15), 16'd2), nop(),
                enc(OP_MOV, 0, R(1), Q(0)),
                enc(OP_JMP, 0, K(0), R(15)),
                enc(OP_MOV, 0, Q(0), R(1)),      // delay slot
                enc(OP_MOV, 0, Q(1), R(1))};     // delay slot
    // core 1: FIR
    prog[1].delete();
    prog[1].push_back(enc_movi(S(SR_PD_LO), 16'h0020));
    prog[1].push_back(enc_movi(S(SR_PD_HI), 16'(32 + 2 * (TAPS - 1))));
    prog[1].push_back(enc_movi(S(SR_PD), 16'h0020));
    prog[1].push_back(enc_movi(S(SR_PS_LO), 16'h0020));
    prog[1].push_back(enc_movi(S(SR_PS_HI), 16'(32 + 2 * (TAPS - 1))));
    prog[1].push_back(enc_movi(S(SR_PC_LO), 16'(2 * COEF_WORD)));
    prog[1].push_back(enc_movi(S(SR_PC_HI), 16'(2 * COEF_WORD + TAPS - 1)));
    prog[1].push_back(enc_movi(S(SR_PC), 16'(2 * COEF_WORD)));
    for (int i = 0; i < TAPS; i++) prog[1].push_back(enc(OP_MOV, 0, PD(1), K(0)));  // clear delay line
    top = prog[1].size() + 4;
    l   = top + 6;
    prog[1].push_back(enc_movi(S(SR_BEG), 16'(l)));
    prog[1].push_back(enc_movi(S(SR_END), 16'(l)));
    prog[1].push_back(enc_movi(R(15), 16'(top)));
    prog[1].push_back(nop());
    prog[1].push_back(enc(OP_MOV, 0, PD(1), Q(0)));                // top: x -> delay line
    prog[1].push_back(enc_movi(S(SR_CNT), 16'(TAPS)));
    prog[1].push_back(enc(OP_MOV, 0, S(SR_ACCL), K(0)));
    prog[1].push_back(enc(OP_MOV, 0, S(SR_ACCH), K(0)));
    prog[1].push_back(enc(OP_MOV, 0, S(SR_PS), S(SR_PD)));          // oldest sample
    prog[1].push_back(nop());
    prog[1].push_back(enc(OP_MUL, 1, K(0), PD(1), PCP(1)));         // l: acc += x * c
    prog[1].push_back(nop());
    prog[1].push_back(nop());
    prog[1].push_back(enc(OP_MOV, 0, Q(0), S(SR_ACCL)));
    prog[1].push_back(enc(OP_JMP, 0, K(0), R(15)));
    prog[1].push_back(nop());
    prog[1].push_back(nop());
    // core 2: energy
    prog[2] = '{enc_movi(R(15), 16'd2), nop(),
                enc(OP_MOV, 0, R(1), Q(0)),
                nop(),
                enc(OP_MUL, 1, K(0), R(1), R(1)),
                enc(OP_JMP, 0, K(0), R(15)),
                nop(),
                enc(OP_MOV, 0, Q(0), S(SR_ACCL))};              // delay slot
    coef = '{16'd3, 16'hFFFE, 16'd7, 16'd5};
  endtask

  // ------------------------------------------------------------ stimulus
  logic [15:0] samples [$], exp0 [$], exp1 [$];
  int nin = 0, n0 = 0, n1 = 0, cyc = 0;
  bit random_flow = 0;
  int last0 = -1, gap_err = 0, gaps = 0;
  // mechanism counters
  int in_stalls, out_stalls, loop_backs, wrap_s, wrap_d, wrap_c, macs, jumps, fifo_full;

  task automatic reference(int n);
    logic [15:0] x [$];
    logic [31:0] e = 0;
    samples.delete(); exp0.delete(); exp1.delete();
    // FLUSH trailing samples push the last results out: a processor waiting
    // on an empty input queue stalls its whole pipeline, including ST
    for (int i = 0; i < n + FLUSH; i++) samples.push_back(i < 5 ? 16'(i * 1000 - 2000) : 16'($urandom));
    for (int i = 0; i < n + FLUSH; i++) begin
      logic [31:0] y = 0;
      for (int j = 0; j < TAPS; j++) begin
        int k = i - TAPS + 1 + j;
        if (k >= 0) y += 32'($signed(samples[k]) * $signed(coef[j]));
      end
      exp0.push_back(y[15:0]);
      e += 32'($signed(samples[i]) * $signed(samples[i]));
      exp1.push_back(e[15:0]);
    end
  endtask

  always @(negedge clk) begin
    if (!rst) begin
      in_push <= (nin < samples.size()) && in_ready && (!random_flow || $urandom_range(0, 3) == 0);
      in_data <= nin < samples.size() ? samples[nin] : 16'd0;
      out_pop[0] <= out_valid[0] && (!random_flow || $urandom_range(0, 4) == 0);
      out_pop[1] <= out_valid[1] && (!random_flow || $urandom_range(0, 4) == 0);
    end else begin
      in_push <= 0; out_pop <= 0; in_data <= 0;
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (in_push && in_ready) nin <= nin + 1;
      if (out_pop[0]) begin
        checks++;
        if (n0 >= exp0.size() || out_data[0] !== exp0[n0]) begin
          failures++; $display("FAIL FIR output %0d = %h expected %h", n0, out_data[0], exp0[n0]);
        end
        n0 <= n0 + 1;
      end
      if (out_pop[1]) begin
        checks++;
        if (n1 >= exp1.size() || out_data[1] !== exp1[n1]) begin
          failures++; $display("FAIL energy output %0d = %h expected %h", n1, out_data[1], exp1[n1]);
        end
        n1 <= n1 + 1;
      end
      // FIR rate in phase 1: results leave core 1 every 16 cycles once running
      if (dut.oq_push[1][0]) begin
        if (!random_flow && last0 >= 0 && n0 > 4) begin
          gaps++;
          if (cyc - last0 != 16) gap_err++;
        end
        last0 <= cyc;
      end
      for (int c = 0; c < 3; c++) begin
        if (stall[c] && !dvsp_fifo_nonempty_in(c)) in_stalls++;
      end
      if (dut.g_core[0].u_core.st_stall_req || dut.g_core[1].u_core.st_stall_req ||
          dut.g_core[2].u_core.st_stall_req) out_stalls++;
      if (dut.g_core[1].u_core.u_pc.loop_back) loop_backs++;
      if (dut.g_core[1].u_core.u_ptr_s.inc && dut.g_core[1].u_core.ptr_s == dut.g_core[1].u_core.ptr_s_hi) wrap_s++;
      if (dut.g_core[1].u_core.u_ptr_d.inc && dut.g_core[1].u_core.ptr_d == dut.g_core[1].u_core.ptr_d_hi) wrap_d++;
      if (dut.g_core[1].u_core.u_ptr_c.inc && dut.g_core[1].u_core.ptr_c == dut.g_core[1].u_core.ptr_c_hi) wrap_c++;
      if (dut.g_core[1].u_core.u_acc.en && dut.g_core[1].u_core.u_acc.st_acc) macs++;
      if (dut.g_core[2].u_core.ex_jmp_en && !stall[2]) jumps++;
      if (!dut.f_nf[1] || !dut.f_nf[2] || !dut.f_nf[3] || !dut.f_nf[4]) fifo_full++;
    end
  end

  function automatic bit dvsp_fifo_nonempty_in(int c);
    case (c)
      0: return dut.f_ne[0];
      1: return dut.f_ne[1];
      default: return dut.f_ne[2];
    endcase
  endfunction

  task automatic load_and_run(int n, bit rnd);
    rst = 1; random_flow = rnd;
    reference(n);
    nin = 0; n0 = 0; n1 = 0; last0 = -1;
    @(posedge clk);
    for (int c = 0; c < 3; c++) begin
      for (int i = 0; i < 1024; i++) begin
        pm_l_we = 3'(1 << c); pm_l_addr = 10'(i);
        pm_l_data = i < prog[c].size() ? prog[c][i] : nop();
        if (c == 1 && i >= COEF_WORD && i < COEF_WORD + (TAPS + 1) / 2)
          pm_l_data = {coef[2 * (i - COEF_WORD) + 1], coef[2 * (i - COEF_WORD)]};
        @(posedge clk); #1;
      end
    end
    pm_l_we = 0;
    @(posedge clk); #1 rst = 0;
    wait ((n0 >= n && n1 >= n) || cyc > 100 * n + 2000);
    repeat (10) @(posedge clk);
    checks++;
    if (n0 < n || n1 < n) begin failures++; $display("FAIL got %0d FIR and %0d energy results of %0d", n0, n1, n); end
  endtask

  initial begin
    #50ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pm_l_we = 0; pm_l_addr = 0; pm_l_data = 0;
    {in_stalls, out_stalls, loop_backs, wrap_s, wrap_d, wrap_c, macs, jumps, fifo_full} = '0;
    build();
    load_and_run(NS1, 0);
    checks++;
    if (gaps < NS1 / 2 || gap_err != 0) begin
      failures++; $display("FAIL FIR rate: %0d of %0d result intervals were not 16 cycles", gap_err, gaps);
    end
    load_and_run(NS2, 1);
    $display("input stalls %0d, output stalls %0d, loop jump-backs %0d, wraps S/D/C %0d/%0d/%0d, MACs %0d, jumps %0d, full-FIFO cycles %0d",
             in_stalls, out_stalls, loop_backs, wrap_s, wrap_d, wrap_c, macs, jumps, fifo_full);
    checks++; if (in_stalls == 0)  begin failures++; $display("FAIL no empty-queue stall"); end
    checks++; if (out_stalls == 0) begin failures++; $display("FAIL no full-queue stall"); end
    checks++; if (loop_backs == 0) begin failures++; $display("FAIL no zero-overhead loop"); end
    checks++; if (wrap_s == 0 || wrap_d == 0 || wrap_c == 0) begin failures++; $display("FAIL a pointer never wrapped"); end
    checks++; if (macs == 0)       begin failures++; $display("FAIL no accumulation"); end
    checks++; if (jumps == 0)      begin failures++; $display("FAIL no jump"); end
    checks++; if (fifo_full == 0)  begin failures++; $display("FAIL no FIFO became full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
