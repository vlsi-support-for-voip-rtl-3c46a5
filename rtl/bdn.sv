// BDN: balanced distribution network, the routing stage of the MIMO buffer.
//
// Per time slot the BDN takes up to N cells, one per input link, all starting on the
// same clock. It packs the valid ones (in input order a, b, c, ...) onto adjacent
// outputs, beginning at the output after the last one used in the previous slot, and
// wraps around past output N-1. The FIFOs behind it are thus filled round robin: the
// arrival order is kept, and no two FIFOs ever differ by more than one cell. No adders
// and no ranking are involved. The HOC staggers the inputs, the VEC feeds free slots
// into the columns and keeps the round-robin pointer, and the folded crossbar of SWTs
// does the steering.
//
// Interface: in_sop marks the first word of a slot on all links and in_valid[i] (read
// with in_sop) is link i's cell-valid header bit. in_data[i] carries one word per clock.
// A slot lasts CELL_WORDS clocks and slots may follow each other back to back.
// out_ctl/out_data[j] go to FIFO j; acc_sop/acc come back from the FIFO bank and tell
// which FIFOs took a cell, which moves the pointer (ptr, one-hot).
// Timing: outputs are aligned and lag the inputs by 3N-2 clocks. The pointer is updated
// one clock later, so a slot must last at least 3N-1 clocks (checked at start of
// simulation).
module bdn
  import mimo_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned W          = 8,
  parameter int unsigned CELL_WORDS = 53
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_sop,
  input  logic [N-1:0] in_valid,
  input  logic [W-1:0] in_data [N],
  output ctl_t         out_ctl [N],
  output logic [W-1:0] out_data[N],
  input  logic         acc_sop,
  input  logic [N-1:0] acc,
  output logic [N-1:0] ptr
);
  localparam int unsigned LATENCY = 3 * N - 2;

  ctl_t         row_ctl [N];
  logic [W-1:0] row_data[N];
  ctl_t         col_ctl [N];
  logic [W-1:0] col_data[N];

  hoc #(.N(N), .W(W)) u_hoc (
    .clk, .rst_n, .in_sop, .in_valid, .in_data, .row_ctl, .row_data
  );

  vec #(.N(N), .W(W)) u_vec (
    .clk, .rst_n, .slot_sop(in_sop), .acc_sop, .acc, .col_ctl, .col_data, .ptr
  );

  bdn_xbar #(.N(N), .W(W)) u_xbar (
    .clk, .rst_n, .row_ctl, .row_data, .col_ctl, .col_data, .out_ctl, .out_data
  );

  initial assert (N >= 2 && CELL_WORDS >= LATENCY + 1)
    else $error("bdn: need N >= 2 and CELL_WORDS >= 3N-1 so the pointer is ready for the next slot");

  // Slots do not overlap: a new in_sop comes at least CELL_WORDS clocks after the last.
  logic [$clog2(CELL_WORDS+1)-1:0] since_sop;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  since_sop <= '1;
    else if (in_sop)                             since_sop <= 1;
    else if (32'(since_sop) < CELL_WORDS)        since_sop <= since_sop + 1'b1;
  end
  assert property (@(posedge clk) disable iff (!rst_n) in_sop |-> 32'(since_sop) >= CELL_WORDS)
    else $error("bdn: time slots overlap");
endmodule
