// dvsp_regfile: general purpose register field of the DVSP, 16 registers of
// 16 bits (the register count and width follow the processor description).
//
// Two asynchronous read ports, A and B, serve the ID stage; one synchronous
// write port is driven from the EX stage. A write becomes visible to reads in
// the cycle after the clock edge that performs it, with no bypass: an
// instruction's result can be read by the instruction two places behind it,
// which is the two-cycle register latency of the pipeline (no operand
// forwarding). Meant to map onto FPGA LUT RAM. Registers are cleared by reset
// (this design's choice; the processor description does not say).
module dvsp_regfile #(
  parameter int unsigned NREGS = 16,
  parameter int unsigned W     = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] ra_idx,
  output logic [W-1:0]             ra_data,
  input  logic [$clog2(NREGS)-1:0] rb_idx,
  output logic [W-1:0]             rb_data,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] w_idx,
  input  logic [W-1:0]             w_data
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we) begin
      regs[w_idx] <= w_data;
    end
  end

  assign ra_data = regs[ra_idx];
  assign rb_data = regs[rb_idx];
endmodule
