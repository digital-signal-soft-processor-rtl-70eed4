// dvsp_pmem: program memory of the DVSP, a synchronous 32-bit wide block RAM
// used as read/write memory.
//
// Port F (fetch) is read by the FE stage at the program counter; port K
// (constants) is read by the ID stage through the code pointer C with a
// 16-bit halfword address: k_addr[0] selects the low (0) or high (1) half of
// the 32-bit word k_addr[AW:1]. Both read ports register their output on the
// clock edge when their enable is high and hold it otherwise, so a stalled
// pipeline keeps its instruction and constant. Port L loads the program (one
// 32-bit word per cycle); the processor is meant to be held in reset while it
// is loaded. The memory is not cleared.
//
// That program memory is synchronous block RAM, ROM or read/write memory, and
// is read both in FE and in ID follows the processor description; the depth,
// the halfword addressing of constants and the parallel load port are this
// design's choices (the description names a serial interface as one way to
// load it).
module dvsp_pmem #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     f_en,
  input  logic [15:0]              f_addr,
  output logic [31:0]              f_data,
  input  logic                     k_en,
  input  logic [15:0]              k_addr,
  output logic [15:0]              k_data,
  input  logic                     l_we,
  input  logic [$clog2(DEPTH)-1:0] l_addr,
  input  logic [31:0]              l_data
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [31:0] mem [DEPTH];
  logic [31:0] k_word;
  logic        k_half;

  always_ff @(posedge clk) begin
    if (l_we) mem[l_addr] <= l_data;
  end

  always_ff @(posedge clk) begin
    if (f_en) f_data <= mem[f_addr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (k_en) begin
      k_word <= mem[k_addr[AW:1]];
      k_half <= k_addr[0];
    end
  end

  assign k_data = k_half ? k_word[31:16] : k_word[15:0];
endmodule
