// tb_dvsp_crc: table-driven CRC-16 and CRC-32 on one DVSP processor at its
// default sizes, checking the cycles spent per input byte.
//
// Both are the reflected (LSB-first) byte-wise form
//   crc = (crc >> 8) ^ T[(crc ^ byte) & 0xFF]
// with T the CRC of each byte value, worked out here bit by bit. The
// program first copies T from input queue 0 into data memory through the
// write pointer D (a one-instruction zero-overhead loop), then runs one loop
// iteration per input byte and finally sends the CRC to output queue 0.
//   CRC-16 (poly 0xA001, init 0, no final xor): the loop body is 8
//     instructions. The loop-carried chain xor -> and -> load -> xor has four
//     steps of two cycles each (no forwarding); the load uses
//     address = index + index, so no shift is needed.
//   CRC-32 (poly 0xEDB88320, init and final xor 0xFFFFFFFF): the CRC is two
//     16-bit registers and each table entry two words; the body is 11
//     instructions with no empty slot.
// Checks: the standard check values of "123456789" (0xBB3D and 0xCBF43926),
// random messages against a bit-by-bit model, and the exact number of cycles
// between successive bytes taken from the queue (8 and 11).
module tb_dvsp_crc;
  import dvsp_pkg::*;
  localparam int PMD = 1024, MAXQ = 1024;
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
  function automatic operand_t PD(int inc); return opnd(M_PTR, inc); endfunction
  localparam operand_t ALL1 = '{mode: M_CNEG, idx: 4'd0};   // constant 0xFFFF

  logic [31:0] prog [PMD];
  function automatic logic [31:0] nop(); return enc(OP_MOV, 1'b0, K(0), K(0), K(0)); endfunction

  // bit-by-bit reflected CRC of one byte
  function automatic logic [31:0] crc_byte(logic [31:0] c, logic [7:0] b, bit wide);
    logic [31:0] poly = wide ? 32'hEDB88320 : 32'h0000A001;
    c ^= {24'd0, b};
    for (int i = 0; i < 8; i++) c = c[0] ? (c >> 1) ^ poly : c >> 1;
    return c;
  endfunction

  task automatic build(bit wide, int nbytes);
    int body, body_end, p;
    foreach (prog[i]) prog[i] = nop();
    prog[0] = enc_movi(S(SR_PD), 16'd0);
    prog[1] = enc_movi(S(SR_CNT), wide ? 16'd512 : 16'd256);
    prog[2] = enc_movi(S(SR_BEG), 16'd6);
    prog[3] = enc_movi(S(SR_END), 16'd6);
    prog[4] = enc_movi(R(2), 16'h00FF);
    prog[5] = enc_movi(R(1), wide ? 16'hFFFF : 16'h0000);
    prog[6] = enc(OP_MOV, 0, PD(1), Q(0));                 // table copy loop
    body     = 12;
    body_end = wide ? body + 10 : body + 7;
    prog[7]  = enc_movi(S(SR_CNT), 16'(nbytes));
    prog[8]  = enc_movi(S(SR_BEG), 16'(body));
    prog[9]  = enc_movi(S(SR_END), 16'(body_end));
    prog[10] = enc_movi(R(3), 16'hFFFF);
    p = body;
    if (!wide) begin
      prog[p++] = enc(OP_XOR, 0, R(4), R(1), Q(0));        // crc ^ byte
      prog[p++] = enc(OP_SHR, 0, R(5), R(1), K(8));        // crc >> 8
      prog[p++] = enc(OP_AND, 0, R(4), R(4), R(2));        // index
      p++;
      prog[p++] = enc(OP_LD,  0, R(6), R(4), R(4));        // T[index]
      p++;
      prog[p++] = enc(OP_XOR, 0, R(1), R(5), R(6));
      p++;
      p++;
      prog[p++] = enc(OP_MOV, 0, Q(0), R(1));
    end else begin
      // R1: low half, R3: high half
      prog[p++] = enc(OP_XOR, 0, R(4), R(1), Q(0));
      prog[p++] = enc(OP_SHR, 0, R(5), R(1), K(8));        // low >> 8
      prog[p++] = enc(OP_AND, 0, R(4), R(4), R(2));
      prog[p++] = enc(OP_SHL, 0, R(7), R(3), K(8));        // high << 8
      prog[p++] = enc(OP_SHL, 0, R(4), R(4), K(2));        // 4 bytes per entry
      prog[p++] = enc(OP_SHR, 0, R(9), R(3), K(8));        // high >> 8
      prog[p++] = enc(OP_LD,  0, R(6), R(4), K(0));        // entry, low word
      prog[p++] = enc(OP_OR,  0, R(5), R(5), R(7));
      prog[p++] = enc(OP_LD,  0, R(8), R(4), K(2));        // entry, high word
      prog[p++] = enc(OP_XOR, 0, R(1), R(5), R(6));
      prog[p++] = enc(OP_XOR, 0, R(3), R(9), R(8));
      prog[p++] = enc(OP_XOR, 0, R(1), R(1), ALL1);        // final xor
      prog[p++] = enc(OP_XOR, 0, R(3), R(3), ALL1);
      p++;
      prog[p++] = enc(OP_MOV, 0, Q(0), R(1));
      prog[p++] = enc(OP_MOV, 0, Q(0), R(3));
    end
    prog[p] = enc_movi(R(15), 16'(p + 2));
    prog[p + 2] = enc(OP_JMP, 0, K(0), R(15));             // park
  endtask

  // input queue: the table words, then the message bytes
  logic [15:0] qw [MAXQ];
  int qn, rd_i, cyc, last_pop, first_gap, gap_err, ngaps;
  logic [15:0] got [$];
  int ntab;

  always_ff @(posedge clk) begin
    if (rst) begin cyc <= 0; rd_i <= 0; end
    else begin
      cyc <= cyc + 1;
      if (iq_pop[0]) begin
        rd_i <= rd_i + 1;
        if (rd_i >= ntab) begin
          if (rd_i > ntab) begin
            ngaps++;
            if (ngaps == 1) first_gap = cyc - last_pop;
            else if (cyc - last_pop != first_gap) gap_err++;
          end
          last_pop <= cyc;
        end
      end
      if (oq_push[0]) got.push_back(oq_data[0]);
    end
  end
  assign iq_data  = {16'd0, rd_i < qn ? qw[rd_i[9:0]] : 16'd0};
  assign iq_valid = {1'b0, rd_i < qn};
  assign oq_ready = 2'b11;

  task automatic run(bit wide, int nbytes, logic [7:0] msg [], logic [31:0] known, bit use_known);
    logic [31:0] c, res, want;
    int per_byte = wide ? 11 : 8;
    rst = 1;
    got.delete();
    ngaps = 0; gap_err = 0; first_gap = 0;
    build(wide, nbytes);
    ntab = wide ? 512 : 256;
    for (int v = 0; v < 256; v++) begin
      c = crc_byte(32'd0, 8'(v), wide);
      if (wide) begin qw[2 * v] = c[15:0]; qw[2 * v + 1] = c[31:16]; end
      else qw[v] = c[15:0];
    end
    c = wide ? 32'hFFFFFFFF : 32'd0;
    for (int i = 0; i < nbytes; i++) begin
      qw[ntab + i] = {8'd0, msg[i]};
      c = crc_byte(c, msg[i], wide);
    end
    want = wide ? ~c : c;
    qn = ntab + nbytes;
    @(posedge clk);
    for (int i = 0; i < PMD; i++) begin
      pm_l_we = 1; pm_l_addr = 10'(i); pm_l_data = prog[i]; @(posedge clk); #1;
    end
    pm_l_we = 0;
    @(posedge clk); #1 rst = 0;
    wait (got.size() >= (wide ? 2 : 1) || cyc > 20000);
    repeat (5) @(posedge clk);
    res = wide ? {got.size() > 1 ? got[1] : 16'd0, got.size() > 0 ? got[0] : 16'd0}
               : {16'd0, got.size() > 0 ? got[0] : 16'd0};
    checks++;
    if (res !== want) begin failures++; $display("FAIL CRC%0d of %0d bytes: %h, model %h", wide ? 32 : 16, nbytes, res, want); end
    if (use_known) begin
      checks++;
      if (res !== known) begin failures++; $display("FAIL CRC%0d check value %h, expected %h", wide ? 32 : 16, res, known); end
    end
    checks++;
    if (ngaps != nbytes - 1 || gap_err != 0 || first_gap != per_byte) begin
      failures++;
      $display("FAIL CRC%0d: %0d byte gaps, first %0d cycles, %0d uneven; expected %0d cycles per byte",
               wide ? 32 : 16, ngaps, first_gap, gap_err, per_byte);
    end
    $display("CRC%0d of %0d bytes = %h, %0d cycles per byte", wide ? 32 : 16, nbytes, res, first_gap);
  endtask

  initial begin
    #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] msg [];
    string s = "123456789";
    pm_l_we = 0; pm_l_addr = 0; pm_l_data = 0;
    msg = new[9];
    for (int i = 0; i < 9; i++) msg[i] = s[i];
    run(0, 9, msg, 32'h0000BB3D, 1);
    run(1, 9, msg, 32'hCBF43926, 1);
    for (int t = 0; t < 4; t++) begin
      int n;
      n = 1 + $urandom_range(0, 200);
      msg = new[n];
      foreach (msg[i]) msg[i] = 8'($urandom);
      run(t[0], n, msg, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
