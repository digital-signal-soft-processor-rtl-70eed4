// tb_dvsp_fft_power: spectral power of one 256-sample window on one DVSP
// processor at its default sizes, using a radix-2 decimation-in-time FFT.
//
// The program (generated below) has three phases:
//   load   a zero-overhead loop takes 256 samples from input queue 0 and
//          stores them in bit-reversed order as complex values (imaginary
//          part 0); the bit-reversed addresses are a table of halfwords in
//          program memory read through the code pointer C.
//   FFT    8 stages. Within a stage an outer loop (a jump) walks the
//          twiddle factors, read through C, and an inner zero-overhead loop
//          of 22 instructions computes the butterflies that share the
//          twiddle. Fixed point: samples 16 bit, twiddles Q15; the product
//          high half (MULH) gives b*w/2, the other input is halved with SRA,
//          so each stage scales by 1/2 and the transform by 1/256.
//   power  a zero-overhead loop reads re and im through pointer S, adds
//          re*re + im*im in the 32-bit accumulator and sends both halves out.
// Checks: all 256 powers bit-exact against a model of the same fixed-point
// arithmetic written here; for a cosine at bin 10 the largest powers are at
// bins 10 and 246; the cycle count equals the number of instructions the
// program executes plus the pipeline fill (every instruction one cycle).
module tb_dvsp_fft_power;
  import dvsp_pkg::*;
  localparam int N = 256, LOGN = 8;
  localparam int PMD = 1024;
  localparam int BITREV_WORD = 512, TWID_WORD = 640;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  logic pm_l_we; logic [9:0] pm_l_addr; logic [31:0] pm_l_data;
  logic [1:0][15:0] iq_data, oq_data; logic [1:0] iq_valid, iq_pop, oq_ready, oq_push;
  logic [15:0] pc; logic stall; logic [31:0] acc;

  always #5 clk = ~clk;

  dvsp_core dut (
    .clk, .rst, .pm_l_we, .pm_l_addr, .pm_l_data,
    .iq_data, .iq_valid, .iq_pop, .oq_data, .oq_ready, .oq_push, .pc, .stall, .acc);

  function automatic operand_t R(int i);  return opnd(M_GPR, i); endfunction
  function automatic operand_t S(logic [3:0] i); return opnd(M_SPR, i); endfunction
  function automatic operand_t K(int v);  return opnd(M_CPOS, v); endfunction
  function automatic operand_t Q(int i);  return opnd(M_QUE, i); endfunction
  function automatic operand_t MR(int i); return opnd(M_MEMR, i); endfunction
  function automatic operand_t PD(int inc); return opnd(M_PTR, inc); endfunction
  function automatic operand_t PCP(int inc); return opnd(M_PTR, 2 + inc); endfunction

  logic [31:0] prog [PMD];
  int          np;                 // next program address
  longint      dyn;                // instructions the program executes
  logic [15:0] wr_t [$], wi_t [$]; // twiddles in the order the program reads them

  function automatic int bitrev(int v);
    int r = 0;
    for (int i = 0; i < LOGN; i++) if (v & (1 << i)) r |= 1 << (LOGN - 1 - i);
    return r;
  endfunction

  task automatic emit(logic [31:0] w, int times = 1);
    prog[np] = w; np++; dyn += times;
  endtask
  function automatic logic [31:0] nop(); return enc(OP_MOV, 1'b0, K(0), K(0), K(0)); endfunction

  task automatic build();
    int l1, body, jtop;
    foreach (prog[i]) prog[i] = nop();
    np = 0; dyn = 0;
    wr_t.delete(); wi_t.delete();
    // ---------------------------------------------------------------- load
    emit(enc_movi(S(SR_PC), 16'(2 * BITREV_WORD)));
    emit(enc_movi(S(SR_CNT), 16'(N)));
    l1 = np + 4;
    emit(enc_movi(S(SR_BEG), 16'(l1)));
    emit(enc_movi(S(SR_END), 16'(l1 + 3)));
    emit(nop());
    emit(nop());
    emit(enc(OP_MOV, 0, R(1), PCP(1)), N);          // l1: R1 = 4 * bitrev(n)
    emit(nop(), N);
    emit(enc(OP_MOV, 0, MR(1), Q(0)), N);           // re = sample
    emit(enc_st(R(1), 8'd2, K(0)), N);              // im = 0
    // ----------------------------------------------------------------- FFT
    for (int s = 0; s < LOGN; s++) begin
      int h = 1 << s, g = N / (2 * h);
      for (int j = 0; j < h; j++) begin
        real ang = 3.14159265358979323846 * j / h;
        wr_t.push_back(16'($rtoi($floor(32767.0 * $cos(ang) + 0.5))));
        wi_t.push_back(16'($rtoi($floor(-32767.0 * $sin(ang) + 0.5))));
      end
      jtop = np + 8;
      body = jtop + 6;
      emit(enc_movi(R(3), 16'(4 * h)));
      emit(enc_movi(R(4), 16'(8 * h)));
      emit(enc_movi(R(13), 16'd0));
      emit(enc_movi(R(0), 16'(h)));
      emit(enc_movi(S(SR_BEG), 16'(body)));
      emit(enc_movi(S(SR_END), 16'(body + 21)));
      emit(enc_movi(R(15), 16'(jtop)));
      emit(nop());
      // jtop: one twiddle
      emit(enc(OP_MOV, 0, R(5), PCP(1)), h);         // wr
      emit(enc(OP_MOV, 0, R(6), PCP(1)), h);         // wi
      emit(enc(OP_MOV, 0, R(1), R(13)), h);          // a = 4 j
      emit(enc_movi(S(SR_CNT), 16'(g)), h);
      emit(enc(OP_ADD, 0, R(13), R(13), K(4)), h);
      emit(enc(OP_SUB, 0, R(0), R(0), K(1)), h);
      // body: one butterfly, a at R1, b at R2 = R1 + 4h
      emit(enc(OP_LD,   0, R(7),  R(1), K(0)), h * g);   // ar
      emit(enc(OP_ADD,  0, R(2),  R(1), R(3)), h * g);
      emit(enc(OP_LD,   0, R(8),  R(1), K(2)), h * g);   // ai
      emit(enc(OP_LD,   0, R(9),  R(2), K(0)), h * g);   // br
      emit(enc(OP_LD,   0, R(10), R(2), K(2)), h * g);   // bi
      emit(enc(OP_MULH, 0, R(11), R(9),  R(5)), h * g);  // br*wr
      emit(enc(OP_MULH, 0, R(12), R(10), R(6)), h * g);  // bi*wi
      emit(enc(OP_MULH, 0, R(14), R(9),  R(6)), h * g);  // br*wi
      emit(enc(OP_MULH, 0, R(10), R(10), R(5)), h * g);  // bi*wr
      emit(enc(OP_SUB,  0, R(11), R(11), R(12)), h * g); // tr
      emit(enc(OP_ADD,  0, R(14), R(14), R(10)), h * g); // ti
      emit(enc(OP_SRA,  0, R(7),  R(7),  K(1)), h * g);
      emit(enc(OP_SRA,  0, R(8),  R(8),  K(1)), h * g);
      emit(enc(OP_ADD,  0, R(9),  R(7),  R(11)), h * g); // a' re
      emit(enc(OP_SUB,  0, R(12), R(7),  R(11)), h * g); // b' re
      emit(enc(OP_ADD,  0, R(10), R(8),  R(14)), h * g); // a' im
      emit(enc(OP_SUB,  0, R(11), R(8),  R(14)), h * g); // b' im
      emit(enc_st(R(1), 8'd0, R(9)), h * g);
      emit(enc_st(R(1), 8'd2, R(10)), h * g);
      emit(enc(OP_ADD,  0, R(1),  R(1),  R(4)), h * g);  // next group
      emit(enc_st(R(2), 8'd0, R(12)), h * g);
      emit(enc_st(R(2), 8'd2, R(11)), h * g);
      emit(enc(OP_JNE, 0, K(0), R(15), R(0)), h);        // next twiddle
      emit(nop(), h);                                     // delay slots
      emit(nop(), h);
    end
    // --------------------------------------------------------------- power
    emit(enc_movi(S(SR_PS), 16'd0));
    emit(enc_movi(S(SR_CNT), 16'(N)));
    l1 = np + 5;
    emit(enc_movi(S(SR_BEG), 16'(l1)));
    emit(enc_movi(S(SR_END), 16'(l1 + 7)));
    emit(nop());
    emit(nop());
    emit(nop());
    emit(enc(OP_MOV, 0, S(SR_ACCL), K(0)), N);
    emit(enc(OP_MOV, 0, S(SR_ACCH), K(0)), N);
    emit(enc(OP_MUL, 1, K(0), PD(1), PD(1)), N);    // re*re
    emit(enc(OP_MUL, 1, K(0), PD(1), PD(1)), N);    // im*im
    emit(nop(), N);
    emit(nop(), N);
    emit(enc(OP_MOV, 0, Q(0), S(SR_ACCL)), N);
    emit(enc(OP_MOV, 0, Q(0), S(SR_ACCH)), N);     // last output: fetched as instruction dyn-1
    emit(enc_movi(R(15), 16'(np + 2)));
    emit(nop());
    emit(enc(OP_JMP, 0, K(0), R(15)));              // park
    dyn -= 3;                                       // not counted: after the last output
    // tables
    for (int n = 0; n < N; n += 2)
      prog[BITREV_WORD + n / 2] = {16'(4 * bitrev(n + 1)), 16'(4 * bitrev(n))};
    for (int k = 0; k < wr_t.size(); k++)
      prog[TWID_WORD + k] = {wi_t[k], wr_t[k]};
    if (np > BITREV_WORD) $fatal(1, "program too long");
  endtask

  // fixed-point model of the same computation
  function automatic logic [15:0] mulh(logic [15:0] a, logic [15:0] b);
    logic [31:0] p = 32'($signed(a) * $signed(b));
    return p[31:16];
  endfunction

  logic [15:0] xin [N];
  logic [31:0] pw [N];

  task automatic model();
    logic [15:0] re [N], im [N];
    int t = 0;
    for (int n = 0; n < N; n++) begin re[bitrev(n)] = xin[n]; im[bitrev(n)] = 0; end
    for (int s = 0; s < LOGN; s++) begin
      int h = 1 << s;
      for (int j = 0; j < h; j++) begin
        logic [15:0] wr = wr_t[t], wi = wi_t[t];
        t++;
        for (int a = j; a < N; a += 2 * h) begin
          int b = a + h;
          logic [15:0] tr, ti, ar, ai;
          tr = mulh(re[b], wr) - mulh(im[b], wi);
          ti = mulh(re[b], wi) + mulh(im[b], wr);
          ar = 16'($signed(re[a]) >>> 1);
          ai = 16'($signed(im[a]) >>> 1);
          re[a] = ar + tr; re[b] = ar - tr;
          im[a] = ai + ti; im[b] = ai - ti;
        end
      end
    end
    for (int k = 0; k < N; k++)
      pw[k] = 32'($signed(re[k]) * $signed(re[k])) + 32'($signed(im[k]) * $signed(im[k]));
  endtask

  // ------------------------------------------------------------- stimulus
  logic [15:0] got [$];
  int cyc, last_push, rd_i;

  always_ff @(posedge clk) begin
    if (rst) begin cyc <= 0; rd_i <= 0; end
    else begin
      cyc <= cyc + 1;
      if (iq_pop[0]) rd_i <= rd_i + 1;
      if (oq_push[0]) begin got.push_back(oq_data[0]); last_push <= cyc; end
    end
  end
  // the input queue holds the window in xin; rd_i counts the words taken
  assign iq_data  = {16'd0, rd_i < N ? xin[rd_i[7:0]] : 16'd0};
  assign iq_valid = {1'b0, rd_i < N};
  assign oq_ready = 2'b11;

  task automatic run(bit sine);
    int kmax1, kmax2;
    logic [31:0] p [N];
    rst = 1;
    got.delete();
    build();
    for (int n = 0; n < N; n++) begin
      xin[n] = sine ? 16'($rtoi($floor(8000.0 * $cos(2.0 * 3.14159265358979323846 * 10 * n / N) + 0.5)))
                    : 16'($urandom_range(0, 16383) - 8192);
    end
    model();
    @(posedge clk);
    for (int i = 0; i < PMD; i++) begin
      pm_l_we = 1; pm_l_addr = 10'(i); pm_l_data = prog[i]; @(posedge clk); #1;
    end
    pm_l_we = 0;
    @(posedge clk); #1 rst = 0;
    wait (got.size() >= 2 * N || cyc > 200000);
    repeat (5) @(posedge clk);
    checks++;
    if (got.size() != 2 * N) begin failures++; $display("FAIL %0d output words, expected %0d", got.size(), 2 * N); end
    kmax1 = 0; kmax2 = 1;
    for (int k = 0; k < N && 2 * k + 1 < got.size(); k++) begin
      p[k] = {got[2 * k + 1], got[2 * k]};
      checks++;
      if (p[k] !== pw[k]) begin failures++; if (failures < 10) $display("FAIL bin %0d power %h expected %h", k, p[k], pw[k]); end
    end
    for (int k = 1; k < N; k++)
      if (p[k] > p[kmax1]) begin kmax2 = kmax1; kmax1 = k; end
      else if (k == 1 || p[k] > p[kmax2]) kmax2 = k;
    if (sine) begin
      checks++;
      if (!((kmax1 == 10 && kmax2 == 246) || (kmax1 == 246 && kmax2 == 10))) begin
        failures++; $display("FAIL spectral peaks at bins %0d and %0d, expected 10 and 246", kmax1, kmax2);
      end
      $display("cosine at bin 10: peak power %0d at bins %0d and %0d", p[kmax1], kmax1, kmax2);
    end
    // the last output instruction is fetched in cycle dyn-1 and pushes from ST
    // three cycles later
    checks++;
    if (last_push != dyn - 1 + 3) begin
      failures++; $display("FAIL last output in cycle %0d, expected %0d", last_push, dyn + 2);
    end
    $display("spectral power of a %0d-sample window: %0d cycles (program of %0d instructions)", N, last_push + 1, np);
  endtask

  initial begin
    #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pm_l_we = 0; pm_l_addr = 0; pm_l_data = 0;
    run(1);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
