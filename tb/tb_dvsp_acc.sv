// tb_dvsp_acc: self-checking test of the DVSP 32-bit accumulator. Drives
// random accumulate (plain and product), special-register writes of either
// half and disabled cycles, and compares with a 64-bit integer model.
module tb_dvsp_acc;
  import dvsp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en, spec_en, sacc, mult;
  logic [3:0] rw; logic [15:0] h, l, acch, accl;
  logic [31:0] model;

  always #5 clk = ~clk;

  dvsp_acc dut (.clk, .rst, .en, .st_spec_en(spec_en), .st_rw(rw), .st_acc(sacc),
                .st_alu_mult(mult), .st_alu_h(h), .st_alu_l(l), .acch, .accl);

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; spec_en = 0; sacc = 0; mult = 0; rw = 0; h = 0; l = 0; model = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      int k;
      k = $urandom_range(0, 9);
      en = (k != 0); spec_en = 0; sacc = 0; mult = 0;
      h = 16'($urandom); l = 16'($urandom);
      rw = 4'($urandom_range(0, 3));
      if (k <= 4)      begin sacc = 1; mult = 0; end
      else if (k <= 7) begin sacc = 1; mult = 1; end
      else             begin spec_en = 1; sacc = 1'($urandom); end
      @(posedge clk);
      if (en) begin
        logic [31:0] addv, nm;
        addv = mult ? {h, l} : {{16{l[15]}}, l};
        nm = sacc ? model + addv : model;
        if (spec_en && rw == SR_ACCH) nm[31:16] = l;
        if (spec_en && rw == SR_ACCL) nm[15:0]  = l;
        model = nm;
      end
      #1;
      checks++;
      if ({acch, accl} !== model) begin
        failures++;
        $display("FAIL n=%0d got %h exp %h", n, {acch, accl}, model);
        model = {acch, accl};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
