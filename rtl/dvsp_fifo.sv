// dvsp_fifo: synchronous first-in first-out queue that links DVSP processors
// to each other and to the outside world.
//
// DEPTH words of W bits. The head word is always presented on rd_data while
// not_empty is high (show-ahead); rd_en removes it on the clock edge. wr_en
// with not_full stores wr_data. A write to a full or a read from an empty
// queue is ignored. Reading and writing in the same cycle is allowed; a full
// queue refuses a write even when it is read in the same cycle. The
// processor description places these queues outside the processor, sized by
// the user; the show-ahead interface, the default depth and the reset are
// this design's choices.
module dvsp_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         not_full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         not_empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign not_full  = (count != ($clog2(DEPTH+1))'(DEPTH));
  assign not_empty = (count != '0);
  assign do_wr     = wr_en && not_full;
  assign do_rd     = rd_en && not_empty;
  assign rd_data   = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  // A producer must not write into a full queue, a consumer must not read an
  // empty one: both handshakes are checked here.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) wr_en |-> not_full);
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) rd_en |-> not_empty);
endmodule
