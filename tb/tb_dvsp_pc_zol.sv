// tb_dvsp_pc_zol: self-checking test of the program counter with
// zero-overhead loops. Programs a 3-iteration loop over addresses 5..7 and
// checks the exact fetch sequence (no cycle lost at the loop end), then
// checks a jump, a stall (pc and count frozen), a stall at the loop end and
// a jump taking priority over the loop jump-back.
module tb_dvsp_pc_zol;
  import dvsp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, stall_i, jmp, spec;
  logic [15:0] alu, pc, cnt, lbeg, lend;
  logic [3:0] rw;
  logic cmpb, lback;

  always #5 clk = ~clk;
  dvsp_pc_zol dut (.clk, .rst, .id_stall(stall_i), .ex_jmp_en(jmp), .ex_alu(alu),
                   .ex_spec_en(spec), .ex_rw(rw), .pc, .loop_count(cnt),
                   .loop_begin(lbeg), .loop_end(lend), .cmp_begin(cmpb), .loop_back(lback));

  task automatic chk(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  task automatic step(logic s, logic j, logic sp, logic [3:0] r, logic [15:0] v);
    stall_i = s; jmp = j; spec = sp; rw = r; alu = v;
    @(posedge clk); #1;
    stall_i = 0; jmp = 0; spec = 0;
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_seq[$];
    stall_i = 0; jmp = 0; spec = 0; rw = 0; alu = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk(pc, 0, "reset pc");
    step(0, 0, 1, SR_CNT, 3);
    step(0, 0, 1, SR_BEG, 5);
    step(0, 0, 1, SR_END, 7);
    chk(pc, 3, "pc after 3 cycles");
    chk(cnt, 3, "count"); chk(lbeg, 5, "begin"); chk(lend, 7, "end");
    exp_seq = '{4, 5, 6, 7, 5, 6, 7, 5, 6, 7, 8, 9};
    foreach (exp_seq[i]) begin
      step(0, 0, 0, 0, 0);
      chk(pc, 16'(exp_seq[i]), "loop sequence");
    end
    chk(cnt, 0, "count exhausted");
    // loop does not restart with count 0
    step(0, 1, 0, 0, 7); chk(pc, 7, "jump to 7");
    step(0, 0, 0, 0, 0); chk(pc, 8, "no loop with count 0");
    // stall holds pc and count
    step(0, 0, 1, SR_CNT, 2); chk(pc, 9, "pc");
    step(0, 1, 0, 0, 7);      chk(pc, 7, "jump to loop end");
    step(1, 0, 0, 0, 0);      chk(pc, 7, "stall holds pc");
    chk(cnt, 2, "stall holds count");
    step(1, 1, 0, 0, 30);     chk(pc, 7, "stall beats jump");
    step(0, 0, 0, 0, 0);      chk(pc, 5, "loop back after stall");
    chk(cnt, 1, "count after loop back");
    step(0, 0, 0, 0, 0); step(0, 0, 0, 0, 0); chk(pc, 7, "pc at end");
    step(0, 1, 0, 0, 40);     chk(pc, 40, "jump beats loop");
    chk(cnt, 1, "jump leaves count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
