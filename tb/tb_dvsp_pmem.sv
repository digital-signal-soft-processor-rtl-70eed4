// tb_dvsp_pmem: self-checking test of the program memory. Loads words
// through the load port, then checks the fetch port (one-cycle read
// latency, hold while disabled) and the halfword constant port.
module tb_dvsp_pmem;
  int checks = 0, failures = 0;
  localparam int D = 64;
  logic clk = 0, f_en, k_en, l_we;
  logic [15:0] f_addr, k_addr, k_data; logic [31:0] f_data, l_data; logic [5:0] l_addr;
  logic [31:0] model [D];

  always #5 clk = ~clk;
  dvsp_pmem #(.DEPTH(D)) dut (.clk, .f_en, .f_addr, .f_data, .k_en, .k_addr, .k_data, .l_we, .l_addr, .l_data);

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    f_en = 0; k_en = 0; l_we = 0; f_addr = 0; k_addr = 0; l_addr = 0; l_data = 0;
    for (int i = 0; i < D; i++) begin
      model[i] = $urandom;
      l_we = 1; l_addr = 6'(i); l_data = model[i];
      @(posedge clk); #1;
    end
    l_we = 0;
    for (int n = 0; n < 200; n++) begin
      logic [31:0] pf; logic [15:0] pk;
      pf = f_data; pk = k_data;
      f_en = 1'($urandom); k_en = 1'($urandom);
      f_addr = 16'($urandom_range(0, D - 1)); k_addr = 16'($urandom_range(0, 2 * D - 1));
      @(posedge clk); #1;
      chk(f_data, f_en ? model[f_addr] : pf, "fetch");
      chk(k_data, k_en ? (k_addr[0] ? model[k_addr[6:1]][31:16] : model[k_addr[6:1]][15:0]) : pk, "constant");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
