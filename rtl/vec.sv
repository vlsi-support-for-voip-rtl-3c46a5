// VEC: vertical controller of the BDN.
//
// The VEC feeds the north end of every crossbar column with an empty cell (its "empty
// cell generator") once per time slot, staggered by a chain of delay elements so that
// column j starts its slot j clocks after column 0, in step with the HOC's rows. It also
// holds the state of the last shift: a one-hot pointer ptr to the column that follows the
// last FIFO written. Columns before the pointer get a RESV slot instead of an empty one,
// so the main rows skip them and only cells that wrap around past the last column fill
// them. Columns from the pointer on get an EMPTY slot.
//
// Updating the pointer needs no arithmetic. When the aligned slot leaves the crossbar,
// acc[j] says that FIFO j took a cell. Within a slot the columns that took a cell form
// one cyclic run starting at the pointer, so the new pointer is the column j where
// acc[j-1] = 1 and acc[j] = 0. If every column or no column took a cell, the pointer
// stays. Reset puts the pointer on column 0.
//
// Interface: slot_sop starts a slot (the same strobe as the HOC's in_sop); acc_sop/acc
// come from the FIFO bank on the clock the slot's aligned headers reach it.
// Timing: column j's header is j clocks after slot_sop. The pointer changes on the clock
// after acc_sop, which must come before the next slot starts (the BDN checks this).
module vec
  import mimo_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         slot_sop,
  input  logic         acc_sop,
  input  logic [N-1:0] acc,
  output ctl_t         col_ctl [N],
  output logic [W-1:0] col_data[N],
  output logic [N-1:0] ptr
);
  logic [N-1:0] ptr_q, ptr_nxt, pre_ptr;
  logic [N-1:0] sop_chain;

  // Column j lies before the pointer when the pointer bit is set in a higher column.
  always_comb begin
    pre_ptr[N-1] = 1'b0;
    for (int j = N - 2; j >= 0; j--) pre_ptr[j] = pre_ptr[j+1] | ptr_q[j+1];
  end

  // Header strobe staggered across the columns (the VEC's delay chain).
  assign sop_chain[0] = slot_sop;
  if (N > 1) begin : g_chain
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sop_chain[N-1:1] <= '0;
      else        sop_chain[N-1:1] <= sop_chain[N-2:0];
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_col
    assign col_ctl[j].sop  = sop_chain[j];
    assign col_ctl[j].kind = (sop_chain[j] && pre_ptr[j]) ? TK_RESV : TK_EMPTY;
    assign col_data[j]     = '0;
  end

  always_comb begin
    for (int j = 0; j < N; j++) ptr_nxt[j] = acc[(j + N - 1) % N] & ~acc[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   ptr_q <= N'(1);
    else if (acc_sop && |ptr_nxt) ptr_q <= ptr_nxt;
  end

  assign ptr = ptr_q;

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(ptr_q))
    else $error("vec: pointer is not one-hot");
endmodule
