// tb_dvsp_regfile: self-checking test of the 16 x 16-bit register field.
// Random writes and reads on both ports against an array model; checks that
// a write is visible only after its clock edge and that reset clears all.
module tb_dvsp_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, we;
  logic [3:0] ra, rb, wi; logic [15:0] da, db, wd;
  logic [15:0] model [16];

  always #5 clk = ~clk;
  dvsp_regfile dut (.clk, .rst, .ra_idx(ra), .ra_data(da), .rb_idx(rb), .rb_data(db),
                    .we, .w_idx(wi), .w_data(wd));

  task automatic chk(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; ra = 0; rb = 0; wi = 0; wd = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 16; i++) begin ra = 4'(i); rb = 4'(15 - i); #1; chk(da, 0, "reset A"); chk(db, 0, "reset B"); end
    for (int n = 0; n < 1000; n++) begin
      we = 1'($urandom); wi = 4'($urandom); wd = 16'($urandom);
      ra = wi; rb = 4'($urandom);
      #1;
      chk(da, model[ra], "port A before edge");
      chk(db, model[rb], "port B");
      @(posedge clk);
      if (we) model[wi] = wd;
      #1;
      chk(da, model[ra], "port A after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
