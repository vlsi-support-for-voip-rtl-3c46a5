// Self-checking testbench of the rotating multiplexer (N = 5 FIFOs, M = 2 outputs,
// 4-word cells, 3 cells per FIFO), the buffer-concentrator configuration.
//
// The testbench writes numbered cells into a FIFO bank round robin, as the BDN does,
// with bursts that make the bank overflow. The rotating multiplexer reads them out
// while out_ready is driven at random. Every output slot is checked: its cells, taken
// from link 0 up to link M-1, must be the next cells in write order, each with all its
// words, and valid links must come first. The test counts slots that carried fewer
// than M cells and slots that followed the previous one without a gap.
module tb_rmux;
  import mimo_pkg::*;
  localparam int N = 5, M = 2, W = 8, L = 4, DEPTH = 3, SLOTS = 1500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctl_t         wr_ctl[N];
  logic [W-1:0] wr_data[N], rd_data[N], out_data[M];
  logic         acc_sop, out_ready, out_sop;
  logic [N-1:0] acc, ovf, rd_en, cell_ready;
  logic [M-1:0] out_valid;
  logic [$clog2(DEPTH+1)-1:0] level[N];

  fifo_bank #(.N(N), .W(W), .CELL_WORDS(L), .DEPTH(DEPTH)) u_bank (.*);
  rmux #(.N(N), .M(M), .W(W), .CELL_WORDS(L)) dut (.*);

  int checks = 0, failures = 0, partial = 0, b2b = 0, n_out = 0, n_ovf = 0;

  function automatic logic [W-1:0] word(int id, int k);
    return W'(id * 13 + k * 59 + 1);
  endfunction

  int exp_q[$];

  // Writer: round robin over the FIFOs, pointer moved by the accepted cells.
  initial begin
    int p, c, id, ids[N];
    p = 0; id = 0;
    for (int j = 0; j < N; j++) begin wr_ctl[j] = CTL_IDLE; wr_data[j] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < SLOTS; s++) begin
      c = ((s / 100) % 2 == 0) ? $urandom_range(0, 2) : $urandom_range(0, N);
      for (int j = 0; j < N; j++) ids[j] = -1;
      for (int r = 0; r < c; r++) begin ids[(p + r) % N] = id; id++; end
      for (int k = 0; k < L; k++) begin
        #1;
        for (int j = 0; j < N; j++) begin
          wr_ctl[j].sop  = (k == 0);
          wr_ctl[j].kind = (k == 0 && ids[j] >= 0) ? TK_CELL : TK_EMPTY;
          wr_data[j]     = word(ids[j], k);
        end
        if (k == 0) begin
          #1;
          for (int r = 0; r < c; r++)
            if (acc[(p + r) % N]) exp_q.push_back(ids[(p + r) % N]);
            else n_ovf++;
          p = (p + $countones(acc)) % N;
        end
        @(posedge clk);
      end
    end
    #1;
    for (int j = 0; j < N; j++) wr_ctl[j] = CTL_IDLE;
  end

  // Output link pacing.
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  // Output checker.
  int cur[M], ok_k = -1, last_end = -10, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_sop) begin
      int nv;
      nv = 0;
      if (cyc == last_end + 1) b2b++;
      for (int k = 0; k < M; k++) begin
        checks++;
        if (out_valid[k] && (k == 0 || out_valid[k-1]) && exp_q.size() > 0) begin
          cur[k] = exp_q.pop_front();
          nv++;
        end else if (out_valid[k]) begin
          failures++;
          $display("unexpected cell on link %0d", k);
          cur[k] = -1;
        end else cur[k] = -1;
      end
      if (nv < M) partial++;
      n_out += nv;
      ok_k = 0;
    end
    if (ok_k >= 0) begin
      for (int k = 0; k < M; k++) if (cur[k] >= 0) begin
        checks++;
        if (out_data[k] != word(cur[k], ok_k) || !out_valid[k]) begin
          failures++;
          if (failures < 10) $display("cell %0d word %0d on link %0d: %h", cur[k], ok_k, k, out_data[k]);
        end
      end
      ok_k++;
      if (ok_k == L) begin ok_k = -1; last_end = cyc; end
    end
  end

  initial begin
    repeat (SLOTS * L + 400) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || partial == 0 || b2b == 0 || n_ovf == 0) begin
      failures++;
      $display("left=%0d partial=%0d back-to-back=%0d overflow=%0d", exp_q.size(), partial, b2b, n_ovf);
    end
    $display("cells out=%0d partial slots=%0d back-to-back=%0d lost=%0d", n_out, partial, b2b, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SLOTS * L + 1000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
