// FIFO_BANK: N single-input single-output cell FIFOs working in parallel.
//
// FIFO j takes column j of the BDN. The BDN's aligned outputs reach all FIFOs on the
// same clock, so the space checks of one time slot see one consistent state of the bank.
// Because the BDN spreads the cells round robin and the reader takes them back in the
// same order, the fill levels of any two FIFOs differ by at most one cell. So when the
// bank runs short of space, the cells accepted in a slot are still a cyclic run that
// starts at the round-robin pointer, and the ones dropped are the last ones of the slot.
//
// Interface: wr_ctl/wr_data[j] from BDN column j; acc_sop/acc[j]/ovf[j] report each
// slot's outcome combinationally on its header clock (acc_sop also marks slots with no
// valid cell); rd_en[j]/rd_data[j]/cell_ready[j] are the read ports for the rotating
// multiplexer. level[j] is the number of cells held by FIFO j.
module fifo_bank
  import mimo_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned W          = 8,
  parameter int unsigned CELL_WORDS = 53,
  parameter int unsigned DEPTH      = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ctl_t         wr_ctl [N],
  input  logic [W-1:0] wr_data[N],
  output logic         acc_sop,
  output logic [N-1:0] acc,
  output logic [N-1:0] ovf,
  input  logic [N-1:0] rd_en,
  output logic [W-1:0] rd_data[N],
  output logic [N-1:0] cell_ready,
  output logic [$clog2(DEPTH+1)-1:0] level[N]
);
  for (genvar j = 0; j < N; j++) begin : g_fifo
    cell_fifo #(.W(W), .CELL_WORDS(CELL_WORDS), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_ctl    (wr_ctl[j]),
      .wr_data   (wr_data[j]),
      .acc       (acc[j]),
      .ovf       (ovf[j]),
      .rd_en     (rd_en[j]),
      .rd_data   (rd_data[j]),
      .cell_ready(cell_ready[j]),
      .level     (level[j])
    );
  end

  assign acc_sop = wr_ctl[0].sop;

  // All columns leave the BDN aligned.
  for (genvar j = 1; j < N; j++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) wr_ctl[j].sop == wr_ctl[0].sop)
      else $error("fifo_bank: column headers not aligned");
  end
endmodule
