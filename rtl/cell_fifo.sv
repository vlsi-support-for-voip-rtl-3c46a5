// CELL_FIFO: single-input single-output FIFO that stores whole fixed-size cells.
//
// One FIFO of the buffer bank. A cell is CELL_WORDS words of W bits that arrive on
// consecutive clocks, the first flagged by wr_ctl.sop with wr_ctl.kind on it. Only
// TK_CELL headers are stored; empty and reserved slots are dropped here, which is
// where the BDN's empty cells leave the stream. Space is checked once, on the header:
// a cell is accepted (acc = 1) when fewer than DEPTH cells are held, otherwise it is
// lost (ovf = 1). Buffer overflow is the only cause of cell loss in the buffer.
//
// Reading: when cell_ready = 1 the reader raises rd_en for CELL_WORDS consecutive
// clocks. rd_data shows the word at the read pointer in the same clock (read without
// latency), and the pointer advances on each rd_en clock. A cell becomes readable only
// once its last word is written, and its space is freed once its last word is read.
// Writing and reading may overlap.
//
// The document gives the FIFO's role only; the depth, the word organisation and the
// cell-granular flags are this design's choices.
module cell_fifo
  import mimo_pkg::*;
#(
  parameter int unsigned W          = 8,
  parameter int unsigned CELL_WORDS = 53,
  parameter int unsigned DEPTH      = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ctl_t         wr_ctl,
  input  logic [W-1:0] wr_data,
  output logic         acc,         // header of a valid cell accepted (combinational)
  output logic         ovf,         // header of a valid cell dropped, FIFO full
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         cell_ready,  // at least one complete cell can be read
  output logic [$clog2(DEPTH+1)-1:0] level  // cells held or being written
);
  localparam int unsigned WORDS = DEPTH * CELL_WORDS;
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned CWW   = (CELL_WORDS > 1) ? $clog2(CELL_WORDS) : 1;
  localparam int unsigned LW    = $clog2(DEPTH + 1);

  logic [W-1:0]   mem [WORDS];
  logic [AW-1:0]  wptr, rptr;
  logic [CWW-1:0] wcnt, rcnt;
  logic           wbusy;
  logic [LW-1:0]  used, ready;
  logic           hdr, wr_now, wr_last, rd_first, rd_last;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (32'(p) == WORDS - 1) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    hdr      = wr_ctl.sop && (wr_ctl.kind == TK_CELL);
    acc      = hdr && (32'(used) < DEPTH);
    ovf      = hdr && !acc;
    wr_now   = acc || wbusy;
    wr_last  = wr_now && (acc ? (CELL_WORDS == 1) : (32'(wcnt) == CELL_WORDS - 1));
    rd_first = rd_en && (rcnt == '0);
    rd_last  = rd_en && (32'(rcnt) == CELL_WORDS - 1);
  end

  always_ff @(posedge clk) begin
    if (wr_now) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      wcnt  <= '0;
      rcnt  <= '0;
      wbusy <= 1'b0;
      used  <= '0;
      ready <= '0;
    end else begin
      if (wr_now) begin
        wptr  <= inc(wptr);
        wcnt  <= wr_last ? '0 : (acc ? CWW'(1) : wcnt + 1'b1);
        wbusy <= !wr_last;
      end
      if (rd_en) begin
        rptr <= inc(rptr);
        rcnt <= rd_last ? '0 : rcnt + 1'b1;
      end
      used  <= used  + LW'(acc)     - LW'(rd_last);
      ready <= ready + LW'(wr_last) - LW'(rd_first);
    end
  end

  assign rd_data    = mem[rptr];
  assign cell_ready = (ready != '0);
  assign level      = used;

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_ctl.sop && wbusy))
    else $error("cell_fifo: new header while a cell is still being written");
  assert property (@(posedge clk) disable iff (!rst_n) rd_first |-> cell_ready)
    else $error("cell_fifo: read started with no complete cell");
endmodule
