// HOC: horizontal controller of the BDN.
//
// The N input links deliver their cells aligned: every link starts a cell on the same
// clock, flagged by in_sop, and in_valid[i] (sampled with in_sop) is the header bit that
// tells a valid cell from an empty one. The HOC staggers the links before they enter the
// folded crossbar: row i goes through a chain of i delay elements (row a none, row b one,
// ... row h seven for N = 8), so that a cell on row i meets column j of the crossbar at
// clock i + j, in step with the column streams.
//
// Interface: row_ctl[i]/row_data[i] feed the west side of crossbar row i.
// Timing: row i lags the inputs by exactly i clocks; row 0 is combinational.
module hoc
  import mimo_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_sop,
  input  logic [N-1:0] in_valid,
  input  logic [W-1:0] in_data [N],
  output ctl_t         row_ctl [N],
  output logic [W-1:0] row_data[N]
);
  for (genvar i = 0; i < N; i++) begin : g_row
    ctl_t ctl_in;
    assign ctl_in.sop  = in_sop;
    assign ctl_in.kind = (in_sop && in_valid[i]) ? TK_CELL : TK_EMPTY;

    delay_line #(.DEPTH(i), .WIDTH($bits(ctl_t)), .RST_VAL(CTL_IDLE)) u_ctl_dly (
      .clk, .rst_n, .d(ctl_in), .q(row_ctl[i])
    );
    delay_line #(.DEPTH(i), .WIDTH(W)) u_data_dly (
      .clk, .rst_n, .d(in_data[i]), .q(row_data[i])
    );
  end
endmodule
