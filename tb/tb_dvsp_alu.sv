// tb_dvsp_alu: self-checking test of the DVSP ALU. Applies directed and
// random operands to every operation and compares result, high product
// half, carry and condition with a reference computed here from integer
// arithmetic.
module tb_dvsp_alu;
  import dvsp_pkg::*;
  int checks = 0, failures = 0;
  op_e op; logic [15:0] a, b, wl, wh; logic cin, cout, cok;

  dvsp_alu dut (.op, .a, .b, .carry_in(cin), .w_l(wl), .w_h(wh), .carry_out(cout), .cond_ok(cok));

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s op=%0d a=%h b=%h cin=%0d: got %h exp %h", what, op, a, b, cin, got, exp);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    op_e ops[$] = '{OP_ADD, OP_ADDC, OP_SUB, OP_SUBC, OP_MUL, OP_MULU, OP_MULH, OP_MULHU,
                    OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_SRA, OP_MOV, OP_MOVEQ,
                    OP_MOVNE, OP_MOVLT, OP_MOVGE, OP_MOVGT, OP_MOVLE, OP_JLT, OP_JGE};
    for (int n = 0; n < 400; n++) begin
      longint sa, sb, ua, ub, r, p;
      logic expc; logic [15:0] el, eh; logic eok;
      op  = ops[n % ops.size()];
      a   = (n < 40) ? 16'(n * 4093) : 16'($urandom);
      b   = (n % 7 == 0) ? 16'h0000 : (n % 11 == 0) ? 16'hFFFF : 16'($urandom);
      cin = 1'($urandom);
      #1;
      sa = longint'($signed(a)); sb = longint'($signed(b)); ua = longint'(a); ub = longint'(b);
      el = a; eh = 0; expc = cin; eok = 1;
      case (op)
        OP_ADD:   begin r = ua + ub;           el = 16'(r); expc = r > 65535; end
        OP_ADDC:  begin r = ua + ub + cin;     el = 16'(r); expc = r > 65535; end
        OP_SUB:   begin r = ua - ub;           el = 16'(r); expc = ua >= ub; end
        OP_SUBC:  begin r = ua - ub - 1 + cin; el = 16'(r); expc = (ua + cin) >= (ub + 1); end
        OP_MUL:   begin p = sa * sb; el = 16'(p); eh = 16'(p >>> 16); end
        OP_MULU:  begin p = ua * ub; el = 16'(p); eh = 16'(p >> 16); end
        OP_MULH:  begin p = sa * sb; el = 16'(p >>> 16); end
        OP_MULHU: begin p = ua * ub; el = 16'(p >> 16); end
        OP_AND:   el = a & b;
        OP_OR:    el = a | b;
        OP_XOR:   el = a ^ b;
        OP_SHL:   el = 16'(ua * (1 << (ub % 16)));
        OP_SHR:   el = 16'(ua / (1 << (ub % 16)));
        OP_SRA:   el = 16'(sa >>> (ub % 16));
        OP_MOVEQ: eok = (sb == 0);
        OP_MOVNE: eok = (sb != 0);
        OP_MOVLT, OP_JLT: eok = (sb < 0);
        OP_MOVGE, OP_JGE: eok = (sb >= 0);
        OP_MOVGT: eok = (sb > 0);
        OP_MOVLE: eok = (sb <= 0);
        default: ;
      endcase
      chk("w_l", wl, el);
      chk("w_h", wh, eh);
      chk("carry", cout, expc);
      chk("cond", cok, eok);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
