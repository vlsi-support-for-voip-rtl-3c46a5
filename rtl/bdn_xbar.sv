// BDN_XBAR: the folded systolic crossbar of the balanced distribution network.
//
// Structure (N rows a.., N columns A..):
//  * Main rows. Row i enters from the west and crosses columns 0..N-1 through N SWTs.
//    Each column enters from the north carrying one free slot per time slot (EMPTY or
//    RESV, from the VEC). A valid cell on a row drops into the first column whose slot is
//    still free (EMPTY), so the valid cells of a slot are packed, in row order, into
//    consecutive columns starting at the round-robin pointer.
//  * Wrap rows (the fold). A cell that passes column N-1 without finding a free slot
//    leaves row i on the east side and comes back on the west side of wrap row i, which
//    holds SWTs for columns 0..i-1 only. There the RESV slots, which sit before the
//    pointer, count as free, so the cell lands in the first column after the last wrapped
//    one. That is the cyclic shift. A cell of row i can need at most column i-1 after
//    wrapping, so wrap row i ends there and its east output is the discard port. Row 0
//    needs no wrap row: its east output is discarded. Empty slots are discarded the
//    same way, always to the east.
//  * Column delays. Column j passes all main rows, then a chain of j+1 delays, then the
//    wrap rows j+1..N-1. This keeps a wrapped cell in step with the column it crosses.
//  * Output alignment. Column j < N-1 leaves the last wrap row at clock 2N+j and gets
//    N-2-j more delays: 6D, 5D, ... 1D, 0D for N = 8, as in the document's drawing.
//    Column N-1 has no wrap row and gets N-1 delays. All columns leave on the same clock.
//
// Timing: with the row-0 header at the west of column 0 on clock t (rows staggered by
// the HOC, columns by the VEC), every output header appears on clock t + 3N - 2.
// The crossbar holds no cell memory; it is a pipeline of 2-by-2 switches, so a new slot
// may enter every clock. In this design a slot lasts CELL_WORDS clocks.
//
// The main rows, the SWT rule and the output delays come from the document. The wrap-row
// placement, the RESV slot and the column delays are this design's own way to build
// the folded crossbar, because the document does not spell out its timing.
module bdn_xbar
  import mimo_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ctl_t         row_ctl [N],   // west inputs, row i staggered by i clocks
  input  logic [W-1:0] row_data[N],
  input  ctl_t         col_ctl [N],   // north inputs, column j staggered by j clocks
  input  logic [W-1:0] col_data[N],
  output ctl_t         out_ctl [N],   // aligned column outputs (to the FIFO bank)
  output logic [W-1:0] out_data[N]
);
  localparam int unsigned CW = $bits(ctl_t);

  // Main array: mh = west input of main(i,j) ([i][N] is the row's east exit);
  //             mv = north input of main(i,j) ([N][j] is the column's south exit).
  ctl_t         mh_ctl [N][N+1];
  logic [W-1:0] mh_dat [N][N+1];
  ctl_t         mv_ctl [N+1][N];
  logic [W-1:0] mv_dat [N+1][N];
  // Wrap array: wh = west input of wrap(i,j), j <= i ([i][i] is the discard);
  //             wv = north input of wrap(i,j), rows j+1..N ([N][j] is the exit).
  ctl_t         wh_ctl [N][N+1];
  logic [W-1:0] wh_dat [N][N+1];
  ctl_t         wv_ctl [N+1][N];
  logic [W-1:0] wv_dat [N+1][N];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign mh_ctl[i][0] = row_ctl[i];
    assign mh_dat[i][0] = row_data[i];
    assign mv_ctl[0][i] = col_ctl[i];
    assign mv_dat[0][i] = col_data[i];
  end

  // ---------------- main rows ----------------
  for (genvar i = 0; i < N; i++) begin : g_mrow
    for (genvar j = 0; j < N; j++) begin : g_mcol
      swt #(.W(W), .FOLDED(1'b0)) u_swt (
        .clk, .rst_n,
        .n_ctl (mv_ctl[i][j]),   .n_data(mv_dat[i][j]),
        .w_ctl (mh_ctl[i][j]),   .w_data(mh_dat[i][j]),
        .s_ctl (mv_ctl[i+1][j]), .s_data(mv_dat[i+1][j]),
        .e_ctl (mh_ctl[i][j+1]), .e_data(mh_dat[i][j+1])
      );
    end
  end

  // ---------------- wrap rows ----------------
  for (genvar i = 0; i < N; i++) begin : g_wrow
    for (genvar j = 0; j <= N; j++) begin : g_wcol
      if (i >= 1 && j == 0) begin : g_entry
        assign wh_ctl[i][0] = mh_ctl[i][N];
        assign wh_dat[i][0] = mh_dat[i][N];
      end else if (i == 0 || j > i) begin : g_unused
        assign wh_ctl[i][j] = CTL_IDLE;
        assign wh_dat[i][j] = '0;
      end
      if (i >= 1 && j < i) begin : g_sw
          swt #(.W(W), .FOLDED(1'b1)) u_swt (
          .clk, .rst_n,
          .n_ctl (wv_ctl[i][j]),   .n_data(wv_dat[i][j]),
          .w_ctl (wh_ctl[i][j]),   .w_data(wh_dat[i][j]),
          .s_ctl (wv_ctl[i+1][j]), .s_data(wv_dat[i+1][j]),
          .e_ctl (wh_ctl[i][j+1]), .e_data(wh_dat[i][j+1])
        );
      end
    end
  end

  // ---------------- column delays, unused wrap slots, output alignment ----------------
  for (genvar j = 0; j < N; j++) begin : g_col
    // Rows of wv that no switch drives.
    for (genvar i = 0; i <= N; i++) begin : g_wv
      if (j == N - 1 ? (i <= N) : (i <= j)) begin : g_unused
        assign wv_ctl[i][j] = CTL_IDLE;
        assign wv_dat[i][j] = '0;
      end
    end

    ctl_t         exit_ctl;
    logic [W-1:0] exit_dat;

    if (j < N - 1) begin : g_wrapped
      delay_line #(.DEPTH(j + 1), .WIDTH(CW), .RST_VAL(CTL_IDLE)) u_cdly_c (
        .clk, .rst_n, .d(mv_ctl[N][j]), .q(wv_ctl[j+1][j])
      );
      delay_line #(.DEPTH(j + 1), .WIDTH(W)) u_cdly_d (
        .clk, .rst_n, .d(mv_dat[N][j]), .q(wv_dat[j+1][j])
      );
      assign exit_ctl = wv_ctl[N][j];
      assign exit_dat = wv_dat[N][j];
    end else begin : g_last
      assign exit_ctl = mv_ctl[N][j];
      assign exit_dat = mv_dat[N][j];
    end

    localparam int unsigned ALIGN = (j < N - 1) ? (N - 2 - j) : (N - 1);
    delay_line #(.DEPTH(ALIGN), .WIDTH(CW), .RST_VAL(CTL_IDLE)) u_odly_c (
      .clk, .rst_n, .d(exit_ctl), .q(out_ctl[j])
    );
    delay_line #(.DEPTH(ALIGN), .WIDTH(W)) u_odly_d (
      .clk, .rst_n, .d(exit_dat), .q(out_data[j])
    );
  end
endmodule
