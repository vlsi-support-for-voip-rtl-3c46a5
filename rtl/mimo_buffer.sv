// MIMO_BUFFER: order-preserving multi-input multi-output cell buffer.
//
// A buffer for fixed-size cells (ATM cells) that must run faster than one memory can. It
// is built from N ordinary FIFOs working in parallel, and it still behaves as one FIFO:
// cells leave in the order they arrived, and cells that arrive in the same time slot
// leave in input-link order. Three stages:
//   1. BDN (balanced distribution network): a systolic, adder-free pack-and-shift network
//      that writes the valid cells of each slot round robin into the FIFOs;
//   2. FIFO bank: N single-input single-output cell FIFOs;
//   3. RMUX (rotating multiplexer): reads the FIFOs round robin onto M output links, so
//      the output rate can differ from the input rate.
//
// Ports (plain signals): in_sop/in_valid/in_data as for the BDN (N links, W-bit words,
// CELL_WORDS words per cell, slot starts at least CELL_WORDS clocks apart);
// out_ready/out_sop/out_valid/out_data as for the RMUX (M links); drop[j] pulses when
// a cell routed to FIFO j is lost because that FIFO is full; level[j] is FIFO j's
// occupancy in cells; wr_ptr is the BDN's one-hot round-robin pointer.
// Timing: a cell can leave at the earliest 3N-2+CELL_WORDS+1 clocks after its header
// arrived (BDN pipeline, full write into the FIFO, start of an output slot).
//
// The document gives N = 8 (its 8x8 BDN). Word width, cell length, FIFO depth and
// output count are this design's defaults: 8-bit words, 53-word (53-byte ATM) cells,
// 16 cells per FIFO, M = N outputs.
module mimo_buffer
  import mimo_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned M          = 8,
  parameter int unsigned W          = 8,
  parameter int unsigned CELL_WORDS = 53,
  parameter int unsigned DEPTH      = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_sop,
  input  logic [N-1:0] in_valid,
  input  logic [W-1:0] in_data [N],
  input  logic         out_ready,
  output logic         out_sop,
  output logic [M-1:0] out_valid,
  output logic [W-1:0] out_data[M],
  output logic [N-1:0] drop,
  output logic [$clog2(DEPTH+1)-1:0] level[N],
  output logic [N-1:0] wr_ptr
);
  ctl_t         bdn_ctl [N];
  logic [W-1:0] bdn_data[N];
  logic         acc_sop;
  logic [N-1:0] acc, rd_en, cell_ready;
  logic [W-1:0] rd_data[N];

  bdn #(.N(N), .W(W), .CELL_WORDS(CELL_WORDS)) u_bdn (
    .clk, .rst_n, .in_sop, .in_valid, .in_data,
    .out_ctl(bdn_ctl), .out_data(bdn_data), .acc_sop, .acc, .ptr(wr_ptr)
  );

  fifo_bank #(.N(N), .W(W), .CELL_WORDS(CELL_WORDS), .DEPTH(DEPTH)) u_bank (
    .clk, .rst_n, .wr_ctl(bdn_ctl), .wr_data(bdn_data), .acc_sop, .acc, .ovf(drop),
    .rd_en, .rd_data, .cell_ready, .level
  );

  rmux #(.N(N), .M(M), .W(W), .CELL_WORDS(CELL_WORDS)) u_rmux (
    .clk, .rst_n, .cell_ready, .rd_data, .rd_en, .out_ready, .out_sop, .out_valid, .out_data
  );
endmodule
