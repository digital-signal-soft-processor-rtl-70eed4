// tb_dvsp_decoder: self-checking test of the DVSP instruction decoder.
// Encodes instructions with random operands and checks the extracted fields
// and the group flags of every operation against a table written here.
module tb_dvsp_decoder;
  import dvsp_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] instr; op_e op; logic acc; operand_t d, s1, s2; ctrl_t c;

  dvsp_decoder dut (.instr, .op, .acc, .dst(d), .src1(s1), .src2(s2), .ctrl(c));

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s op=%0d got %0h exp %0h", what, op, got, exp); end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      // expected: {use_s1, use_s2, dst_op, group, cond, mult, carry}
      bit es1, es2, edst, alu, mov, jmp, ld, st, movi, call, cen, mul, wc; int cnd;
      operand_t rd, r1, r2; logic ra;
      rd = 8'($urandom); r1 = 8'($urandom); r2 = 8'($urandom); ra = 1'($urandom);
      instr = {6'(n), ra, 1'b0, rd, r1, r2};
      #1;
      {es1, es2, edst, alu, mov, jmp, ld, st, movi, call, cen, mul, wc} = '0; cnd = 0;
      if (n <= 13) begin es1 = 1; es2 = 1; edst = 1; alu = 1; wc = (n <= 3); mul = (n == 4 || n == 5); end
      else if (n == 16) begin es1 = 1; edst = 1; mov = 1; end
      else if (n >= 17 && n <= 22) begin es1 = 1; es2 = 1; edst = 1; mov = 1; cen = 1; cnd = n - 16; end
      else if (n == 24 || n == 36) begin es1 = 1; jmp = 1; end
      else if (n >= 25 && n <= 30) begin es1 = 1; es2 = 1; jmp = 1; cen = 1; cnd = n - 24; end
      else if (n == 32) begin es1 = 1; es2 = 1; edst = 1; ld = 1; end
      else if (n == 33) begin es1 = 1; es2 = 1; st = 1; end
      else if (n == 34) begin edst = 1; movi = 1; end
      else if (n == 35) begin es1 = 1; edst = 1; jmp = 1; call = 1; end
      chk(op, n, "op"); chk(acc, ra, "acc"); chk(d, rd, "dst"); chk(s1, r1, "src1"); chk(s2, r2, "src2");
      chk({c.use_s1, c.use_s2, c.dst_op}, {es1, es2, edst}, "operand use");
      chk({c.is_alu, c.is_mov, c.is_jmp, c.is_ld, c.is_st, c.is_movi, c.is_call}, {alu, mov, jmp, ld, st, movi, call}, "group");
      chk(c.cond_en, cen, "cond_en");
      if (cen) chk(c.cond, cnd, "cond");
      chk(c.is_mult, mul, "mult"); chk(c.wr_carry, wc, "carry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
