// tb_dvsp_dmem: self-checking test of the data memory. Random writes and
// reads by byte address (bit 0 ignored) against an array model; checks the
// one-cycle read latency, read hold while disabled and read-before-write.
module tb_dvsp_dmem;
  int checks = 0, failures = 0;
  localparam int WDS = 64;
  logic clk = 0, r_en, w_en;
  logic [15:0] r_addr, r_data, w_addr, w_data;
  logic [15:0] model [WDS];

  always #5 clk = ~clk;
  dvsp_dmem #(.WORDS(WDS)) dut (.clk, .r_en, .r_addr, .r_data, .w_en, .w_addr, .w_data);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    r_en = 0; w_en = 0; r_addr = 0; w_addr = 0; w_data = 0;
    for (int i = 0; i < WDS; i++) begin
      model[i] = 16'($urandom); w_en = 1; w_addr = 16'(2 * i); w_data = model[i];
      @(posedge clk); #1;
    end
    for (int n = 0; n < 500; n++) begin
      logic [15:0] prev, expv;
      prev = r_data;
      r_en = 1'($urandom); w_en = 1'($urandom);
      r_addr = 16'($urandom_range(0, 2 * WDS - 1));
      w_addr = (n % 5 == 0) ? r_addr ^ 16'd1 : 16'($urandom_range(0, 2 * WDS - 1));
      w_data = 16'($urandom);
      expv = r_en ? model[r_addr[6:1]] : prev;
      @(posedge clk); #1;
      if (w_en) model[w_addr[6:1]] = w_data;
      checks++;
      if (r_data !== expv) begin failures++; $display("FAIL read %h got %h exp %h", r_addr, r_data, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
