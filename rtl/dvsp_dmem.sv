// dvsp_dmem: data memory of the DVSP, synchronous block RAM 16 bits wide,
// addressed in 8-bit bytes.
//
// The read port is started in the ID stage (r_en, byte address r_addr) and
// its data is available in the EX stage, one clock later; it holds while
// r_en is low. The write port is used by the ST stage (w_en, w_addr, w_data)
// and writes on the clock edge. Accesses are whole 16-bit words: address
// bit 0 is ignored. The 16-bit width and byte addressing follow the
// processor description; the depth, word-only access and the separate
// read/write ports (one per pipeline stage that uses the memory) are this
// design's choices. Reading and writing the same word in one cycle returns
// the old contents. The memory is not cleared.
module dvsp_dmem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        r_en,
  input  logic [15:0] r_addr,
  output logic [15:0] r_data,
  input  logic        w_en,
  input  logic [15:0] w_addr,
  input  logic [15:0] w_data
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [15:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (w_en) mem[w_addr[AW:1]] <= w_data;
  end

  always_ff @(posedge clk) begin
    if (r_en) r_data <= mem[r_addr[AW:1]];
  end
endmodule
