// dvsp_pointer: one memory pointer of the DVSP (code pointer C, data read
// pointer S or data write pointer D).
//
// A pointer is a special register holding a memory address. When the
// instruction that uses it asks for auto-increment ('inc'), the pointer
// advances by STEP; when it is at the last address of its cyclic buffer
// ('hi') it wraps to the first ('lo') instead, giving modulo addressing.
// Pointer, lo and hi are each writable as special registers; a write has
// priority over an increment in the same cycle. After reset lo = 0 and
// hi = all ones, so a pointer wraps only at the end of the address space.
// Auto-increment and modulo addressing follow the processor description; the
// lo/hi bound registers, the step and the reset values are this design's
// choices. All updates happen on the rising clock edge.
module dvsp_pointer #(
  parameter int unsigned W    = 16,
  parameter int unsigned STEP = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we_ptr,
  input  logic         we_lo,
  input  logic         we_hi,
  input  logic [W-1:0] wdata,
  input  logic         inc,
  output logic [W-1:0] ptr,
  output logic [W-1:0] lo,
  output logic [W-1:0] hi
);
  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
      lo  <= '0;
      hi  <= '1;
    end else begin
      if (we_lo) lo <= wdata;
      if (we_hi) hi <= wdata;
      if (we_ptr)          ptr <= wdata;
      else if (inc) begin
        if (ptr == hi)     ptr <= lo;
        else               ptr <= ptr + W'(STEP);
      end
    end
  end
endmodule
