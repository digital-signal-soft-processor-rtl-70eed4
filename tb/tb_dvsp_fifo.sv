// tb_dvsp_fifo: self-checking test of the queue. Random pushes and pops that
// respect the flags, with phases that fill it to full and drain it to empty,
// against a SystemVerilog queue model; checks data order, flags and count.
module tb_dvsp_fifo;
  int checks = 0, failures = 0, fulls = 0, empties = 0;
  localparam int D = 8;
  logic clk = 0, rst = 1, wr_en, rd_en, nf, ne;
  logic [15:0] wd, rd; logic [3:0] cnt;
  logic [15:0] q[$];

  always #5 clk = ~clk;
  dvsp_fifo #(.W(16), .DEPTH(D)) dut (.clk, .rst, .wr_en, .wr_data(wd), .not_full(nf),
                                      .rd_en, .rd_data(rd), .not_empty(ne), .count(cnt));

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wd = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 1500; n++) begin
      int bias;
      bias = (n / 100) % 2;       // alternate fill-biased and drain-biased phases
      chk(cnt, q.size(), "count"); chk(nf, q.size() < D, "not_full"); chk(ne, q.size() > 0, "not_empty");
      if (q.size() == D) fulls++;
      if (q.size() == 0) empties++;
      if (ne) chk(rd, q[0], "head data");
      wr_en = nf && ($urandom_range(0, 9) < (bias ? 8 : 3));
      rd_en = ne && ($urandom_range(0, 9) < (bias ? 3 : 8));
      wd = 16'($urandom);
      @(posedge clk); #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wd);
    end
    checks++; if (fulls == 0 || empties == 0) begin failures++; $display("FAIL full/empty not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
