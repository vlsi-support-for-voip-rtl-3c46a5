// RMUX: rotating multiplexer between the FIFO bank and the M output links.
//
// The RMUX takes cells out of the N FIFOs in the same cyclic order in which the BDN
// wrote them, so the cell order of the input is kept on the output. A read pointer q
// names the FIFO that holds the oldest cell. At the start of an output slot, output link
// k (k = 0..M-1) is given the head cell of FIFO (q + k) mod N, as long as that FIFO and
// all FIFOs before it in the run have a complete cell. Then q moves past the FIFOs read.
// With M = N the buffer has as many outputs as inputs (parallel buffer). With M = 1 it
// serialises onto one link (buffer with RMUX, e.g. an access point). With 1 < M < N it is
// a buffer concentrator. The output link rate is set by how often out_ready allows a
// slot.
//
// Interface: when out_ready = 1 and the FIFO at q has a complete cell, a slot starts on
// the next clock. out_sop flags its first word, and out_valid[k] stays high for its
// CELL_WORDS words on each link that carries a cell. Words come straight from the FIFO
// read ports (rd_en[j] high while FIFO j is read). A new slot can follow right after the
// last word of the previous one, so with out_ready held high the links carry cells back
// to back.
//
// The document names the RMUX and its job. The pointer, the contiguous-run rule and the
// slot handshake are this design's choices.
module rmux #(
  parameter int unsigned N          = 8,
  parameter int unsigned M          = 8,
  parameter int unsigned W          = 8,
  parameter int unsigned CELL_WORDS = 53
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] cell_ready,
  input  logic [W-1:0] rd_data[N],
  output logic [N-1:0] rd_en,
  input  logic         out_ready,
  output logic         out_sop,
  output logic [M-1:0] out_valid,
  output logic [W-1:0] out_data[M]
);
  localparam int unsigned QW  = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned CWW = (CELL_WORDS > 1) ? $clog2(CELL_WORDS) : 1;

  logic [QW-1:0]  q, q_nxt;
  logic           busy, last, start;
  logic [CWW-1:0] cnt;
  logic [QW-1:0]  sel  [M];
  logic [M-1:0]   sel_v;
  logic [QW-1:0]  cand [M];
  logic [M-1:0]   run;

  function automatic logic [QW-1:0] wrap_add(input logic [QW-1:0] a, input int unsigned b);
    return QW'((32'(a) + b) % N);
  endfunction

  // Candidate FIFO for each output link and the run of FIFOs that can be read.
  always_comb begin
    logic ok;
    ok    = 1'b1;
    q_nxt = q;
    for (int k = 0; k < M; k++) begin
      cand[k] = wrap_add(q, k);
      ok      = ok && cell_ready[cand[k]];
      run[k]  = ok;
      if (ok) q_nxt = wrap_add(q, k + 1);
    end
  end

  assign last  = busy && (32'(cnt) == CELL_WORDS - 1);
  assign start = (!busy || last) && out_ready && run[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      busy  <= 1'b0;
      cnt   <= '0;
      sel_v <= '0;
      for (int k = 0; k < M; k++) sel[k] <= '0;
    end else begin
      if (start) begin
        q     <= q_nxt;
        busy  <= 1'b1;
        cnt   <= '0;
        sel_v <= run;
        sel   <= cand;
      end else if (busy) begin
        busy  <= !last;
        cnt   <= cnt + 1'b1;
        if (last) sel_v <= '0;
      end
    end
  end

  always_comb begin
    rd_en = '0;
    for (int k = 0; k < M; k++) begin
      out_valid[k] = busy && sel_v[k];
      out_data[k]  = rd_data[sel[k]];
      if (out_valid[k]) rd_en[sel[k]] = 1'b1;
    end
  end

  assign out_sop = busy && (cnt == '0);

  initial assert (M >= 1 && M <= N) else $error("rmux: M must be between 1 and N");
endmodule
