// dvsp_platform: three DVSP processors linked by hardware FIFO queues, the
// typical multi-core stream-processing arrangement of the processor.
//
//   in --> FIFO --> core 0 --out queue 0--> FIFO --> core 1 --> FIFO --> out0
//                          \-out queue 1--> FIFO --> core 2 --> FIFO --> out1
//
// Core 0 reads input queue 0 and feeds cores 1 and 2 through its output
// queues 0 and 1; cores 1 and 2 each read their input queue 0 and write
// their output queue 0. Data transfer and synchronisation need no software
// protocol: a core stalls on an empty input queue or a full output queue.
// Queues that the arrangement leaves unconnected read as always empty
// (input) or always ready, with the data dropped (output).
//
// External interface: in_* writes the input FIFO (in_ready is its not-full
// flag); out_*[k] reads output FIFO k (show-ahead: out_data valid while
// out_valid, out_pop removes it). pm_l_we[c] writes word pm_l_data at
// pm_l_addr of core c's program memory; keep rst high while loading and
// release it to start all cores at address 0.
//
// The three cores and five FIFOs and their connections follow the
// processor's multi-core usage diagram; the FIFO depth is left to the user
// there, the default of 16 words is this design's choice.
module dvsp_platform
  import dvsp_pkg::*;
#(
  parameter int unsigned PM_DEPTH   = 1024,
  parameter int unsigned DM_WORDS   = 1024,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [2:0]                  pm_l_we,
  input  logic [$clog2(PM_DEPTH)-1:0] pm_l_addr,
  input  logic [31:0]                 pm_l_data,
  input  logic                        in_push,
  input  logic [15:0]                 in_data,
  output logic                        in_ready,
  input  logic [1:0]                  out_pop,
  output logic [1:0][15:0]            out_data,
  output logic [1:0]                  out_valid,
  output logic [2:0][15:0]            pc,
  output logic [2:0]                  stall,
  output logic [2:0][31:0]            acc
);
  localparam int unsigned NQ = 2;
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic [2:0][NQ-1:0][15:0] iq_data, oq_data;
  logic [2:0][NQ-1:0]       iq_valid, iq_pop, oq_ready, oq_push;

  // FIFO 0: input -> core 0
  // FIFO 1: core 0 queue 0 -> core 1;  FIFO 2: core 0 queue 1 -> core 2
  // FIFO 3: core 1 -> out0;             FIFO 4: core 2 -> out1
  logic [4:0]        f_wr, f_rd, f_nf, f_ne;
  logic [4:0][15:0]  f_wd, f_rdata;
  logic [4:0][CW-1:0] f_cnt;

  assign f_wr[0] = in_push;        assign f_wd[0] = in_data;       assign in_ready = f_nf[0];
  assign f_wr[1] = oq_push[0][0];  assign f_wd[1] = oq_data[0][0];
  assign f_wr[2] = oq_push[0][1];  assign f_wd[2] = oq_data[0][1];
  assign f_wr[3] = oq_push[1][0];  assign f_wd[3] = oq_data[1][0];
  assign f_wr[4] = oq_push[2][0];  assign f_wd[4] = oq_data[2][0];

  assign f_rd[0] = iq_pop[0][0];
  assign f_rd[1] = iq_pop[1][0];
  assign f_rd[2] = iq_pop[2][0];
  assign f_rd[3] = out_pop[0];
  assign f_rd[4] = out_pop[1];

  always_comb begin
    iq_data  = '0;
    iq_valid = '0;
    oq_ready = '1;
    iq_data[0][0] = f_rdata[0];  iq_valid[0][0] = f_ne[0];
    iq_data[1][0] = f_rdata[1];  iq_valid[1][0] = f_ne[1];
    iq_data[2][0] = f_rdata[2];  iq_valid[2][0] = f_ne[2];
    oq_ready[0][0] = f_nf[1];
    oq_ready[0][1] = f_nf[2];
    oq_ready[1][0] = f_nf[3];
    oq_ready[2][0] = f_nf[4];
  end

  assign out_data  = {f_rdata[4], f_rdata[3]};
  assign out_valid = {f_ne[4], f_ne[3]};

  for (genvar f = 0; f < 5; f++) begin : g_fifo
    dvsp_fifo #(.W(16), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst,
      .wr_en(f_wr[f]), .wr_data(f_wd[f]), .not_full(f_nf[f]),
      .rd_en(f_rd[f]), .rd_data(f_rdata[f]), .not_empty(f_ne[f]),
      .count(f_cnt[f])
    );
  end

  for (genvar c = 0; c < 3; c++) begin : g_core
    dvsp_core #(.PM_DEPTH(PM_DEPTH), .DM_WORDS(DM_WORDS), .NQ(NQ)) u_core (
      .clk, .rst,
      .pm_l_we  (pm_l_we[c]),
      .pm_l_addr(pm_l_addr),
      .pm_l_data(pm_l_data),
      .iq_data  (iq_data[c]),
      .iq_valid (iq_valid[c]),
      .iq_pop   (iq_pop[c]),
      .oq_data  (oq_data[c]),
      .oq_ready (oq_ready[c]),
      .oq_push  (oq_push[c]),
      .pc       (pc[c]),
      .stall    (stall[c]),
      .acc      (acc[c])
    );
  end
endmodule
