// tb_dvsp_pointer: self-checking test of a DVSP memory pointer. Sets a
// cyclic buffer, auto-increments through several wraps, and checks write
// priority over increment, against a model kept here.
module tb_dvsp_pointer;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, we_ptr, we_lo, we_hi, inc;
  logic [15:0] wdata, ptr, lo, hi;
  int wraps = 0;

  always #5 clk = ~clk;
  dvsp_pointer #(.STEP(2)) dut (.clk, .rst, .we_ptr, .we_lo, .we_hi, .wdata, .inc, .ptr, .lo, .hi);

  task automatic chk(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic wr(int which, logic [15:0] v);
    we_ptr = (which == 0); we_lo = (which == 1); we_hi = (which == 2); wdata = v;
    @(posedge clk); #1;
    we_ptr = 0; we_lo = 0; we_hi = 0;
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] m;
    we_ptr = 0; we_lo = 0; we_hi = 0; inc = 0; wdata = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk(ptr, 0, "reset ptr"); chk(lo, 0, "reset lo"); chk(hi, 16'hFFFF, "reset hi");
    // free-running increment wraps at the end of the address space
    wr(0, 16'hFFFC);
    inc = 1; @(posedge clk); #1; chk(ptr, 16'hFFFE, "inc");
    @(posedge clk); #1; chk(ptr, 16'h0000, "wrap at 2^16");
    inc = 0;
    // cyclic buffer 0x100 .. 0x10E (8 words)
    wr(1, 16'h0100); wr(2, 16'h010E); wr(0, 16'h0100);
    chk(lo, 16'h0100, "lo"); chk(hi, 16'h010E, "hi");
    m = 16'h0100;
    for (int n = 0; n < 40; n++) begin
      inc = 1'($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (inc) begin
        if (m == 16'h010E) begin m = 16'h0100; wraps++; end
        else m = m + 2;
      end
      chk(ptr, m, "modulo increment");
    end
    inc = 0;
    // a write wins over an increment
    inc = 1; we_ptr = 1; wdata = 16'h0042; @(posedge clk); #1; we_ptr = 0; inc = 0;
    chk(ptr, 16'h0042, "write priority");
    checks++; if (wraps < 2) begin failures++; $display("FAIL too few wraps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
