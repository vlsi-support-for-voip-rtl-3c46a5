// SWT: the 2-input 2-output switching element of the folded systolic crossbar.
//
// A cell enters from the north (DN) and/or the west (DW). The switch is normally in
// cross mode (north -> south, west -> east). It goes to toggle mode (west -> south,
// north -> east) when a valid cell arrives from the west while the north slot is free,
// so the column captures the cell and the empty slot travels east to be discarded.
// The four cases of the document's switch figure follow from this rule:
// (W empty, N valid), (W valid, N valid) and (W empty, N empty) cross; (W valid, N empty)
// toggles. The mode is decided on the header word (sop) of the aligned cells and held for
// the rest of the cell, so every word of the cell takes the same path.
//
// FOLDED selects the behaviour of the wrap-around rows, which are this design's way of
// realising the cyclic shift: there a RESV slot counts as free, in a main row it counts
// as occupied.
//
// Timing: both outputs are registered, one clock from input to output (one systolic step).
// The north and west headers must arrive on the same clock.
module swt
  import mimo_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter bit          FOLDED = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ctl_t         n_ctl,
  input  logic [W-1:0] n_data,
  input  ctl_t         w_ctl,
  input  logic [W-1:0] w_data,
  output ctl_t         s_ctl,
  output logic [W-1:0] s_data,
  output ctl_t         e_ctl,
  output logic [W-1:0] e_data
);
  logic toggle_q, toggle_now, n_free;

  always_comb begin
    n_free     = (n_ctl.kind == TK_EMPTY) || (FOLDED && n_ctl.kind == TK_RESV);
    toggle_now = w_ctl.sop ? (w_ctl.kind == TK_CELL && n_free) : toggle_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      toggle_q <= 1'b0;
      s_ctl    <= CTL_IDLE;
      e_ctl    <= CTL_IDLE;
    end else begin
      toggle_q <= toggle_now;
      s_ctl    <= toggle_now ? w_ctl : n_ctl;
      e_ctl    <= toggle_now ? n_ctl : w_ctl;
    end
  end

  always_ff @(posedge clk) begin
    s_data <= toggle_now ? w_data : n_data;
    e_data <= toggle_now ? n_data : w_data;
  end

  // Systolic alignment: the two headers of a switch must meet on the same clock.
  assert property (@(posedge clk) disable iff (!rst_n) w_ctl.sop == n_ctl.sop)
    else $error("swt: north and west headers not aligned");
endmodule
