// dvsp_acc: 32-bit accumulator of the DVSP store (ST) stage.
//
// Holds acch:accl. When the instruction in ST is in accumulator mode
// (st_acc), the ALU result is added: the low half st_alu_l goes into a
// 17-bit adder with accl, and the high adder sums acch, the carry out of the
// low adder and either the high product half st_alu_h (for a
// multiplication, st_alu_mult) or the sign extension of st_alu_l (0xFFFF or
// 0x0000 chosen by st_alu_l[15]). A special register write to SR_ACCH or
// SR_ACCL (st_spec_en with st_rw) loads that half from st_alu_l instead and
// takes priority over accumulation for that half. 'en' is low while the
// pipeline stalls and freezes the register.
//
// The two adders, the sign-extension multiplexer, the product multiplexer and
// the write-select comparators follow the processor's accumulator diagram;
// the enable input and the reset to zero are this design's additions.
module dvsp_acc
  import dvsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        st_spec_en,
  input  logic [3:0]  st_rw,
  input  logic        st_acc,
  input  logic        st_alu_mult,
  input  logic [15:0] st_alu_h,
  input  logic [15:0] st_alu_l,
  output logic [15:0] acch,
  output logic [15:0] accl
);
  logic [16:0] accl_int;
  logic [15:0] sext, hi_addend, acch_sum;
  logic        wr_h, wr_l;

  assign wr_h      = st_spec_en && (st_rw == SR_ACCH);
  assign wr_l      = st_spec_en && (st_rw == SR_ACCL);
  assign sext      = st_alu_l[15] ? 16'hFFFF : 16'h0000;
  assign hi_addend = st_alu_mult ? st_alu_h : sext;
  assign accl_int  = {1'b0, accl} + {1'b0, st_alu_l};
  assign acch_sum  = acch + hi_addend + {15'd0, accl_int[16]};

  always_ff @(posedge clk) begin
    if (rst) begin
      acch <= '0;
      accl <= '0;
    end else if (en) begin
      if (wr_h)        acch <= st_alu_l;
      else if (st_acc) acch <= acch_sum;
      if (wr_l)        accl <= st_alu_l;
      else if (st_acc) accl <= accl_int[15:0];
    end
  end
endmodule
