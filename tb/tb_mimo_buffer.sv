// End-to-end testbench of the MIMO buffer with every parameter at its default
// (8 inputs, 8 outputs, 8-bit words, 53-word cells, 16 cells per FIFO).
//
// Every valid input cell gets a serial number, carried in its first two words; the
// other words are a function of the serial and the word index. Phases:
//   1. one cell with the output open: checks the latency from input header to output
//      header, 3N-2 + CELL_WORDS + 1 clocks;
//   2. the two slots of the 8x8 example drawn in the document (cells on a,c,d,e,g,h,
//      then a,d,e,h) with the output closed. The FIFO levels and the pointer must show
//      the pack-and-shift: A..F, then G,H,A,B;
//   3. random traffic with a slow output, so the FIFOs fill up and cells are dropped;
//   4. random traffic with a fast output and back-to-back slots.
// Throughout, output cells must come out in serial order with all their words intact,
// and every cell that never leaves must have been reported dropped. The test counts
// each mechanism: wrap-around of the shift, all-valid slots (pointer holds), empty
// cells removed, overflow drops, output slots with fewer than M cells, idle output
// cycles and back-to-back input and output slots. A mechanism that never happens fails.
module tb_mimo_buffer;
  localparam int N = 8, M = 8, W = 8, L = 53, DEPTH = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_sop, out_ready, out_sop;
  logic [N-1:0] in_valid, drop, wr_ptr;
  logic [W-1:0] in_data[N], out_data[M];
  logic [M-1:0] out_valid;
  logic [$clog2(DEPTH+1)-1:0] level[N];

  mimo_buffer dut (.*);

  int checks = 0, failures = 0;
  int m_wrap = 0, m_full = 0, m_empty = 0, m_drop = 0, m_partial = 0, m_idle = 0,
      m_b2b_in = 0, m_b2b_out = 0;
  int n_in = 0, n_out = 0, last_out = -1;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic logic [W-1:0] word(int id, int k);
    if (k == 0) return W'(id >> 8);
    if (k == 1) return W'(id);
    return W'(id * 7 + k * 31 + (id >> 5));
  endfunction

  function automatic int ptr_index(logic [N-1:0] p);
    for (int j = 0; j < N; j++) if (p[j]) return j;
    return -1;
  endfunction

  // Send one time slot; returns after its last word.
  int last_slot_end = -10;
  task automatic send_slot(input logic [N-1:0] v);
    int ids[N], p0, c;
    c = $countones(v);
    p0 = ptr_index(wr_ptr);
    if (c == N) m_full++;
    if (c < N && c > 0) m_empty++;
    for (int i = 0; i < N; i++) ids[i] = v[i] ? n_in + $countones(v & ((N'(1) << i) - 1)) : -1;
    n_in += c;
    for (int k = 0; k < L; k++) begin
      #1;
      if (k == 0 && cyc == last_slot_end + 1) m_b2b_in++;
      in_sop   = (k == 0);
      in_valid = (k == 0) ? v : N'($urandom);
      for (int i = 0; i < N; i++) in_data[i] = (ids[i] >= 0) ? word(ids[i], k) : W'($urandom);
      @(posedge clk);
    end
    last_slot_end = cyc;
    #1 in_sop = 0;
    if (p0 + c > N) m_wrap++;
  endtask

  // Output monitor.
  int cur[M], wk = -1, out_end = -10, n_drop = 0;
  int t_first_in = -1, t_first_out = -1;
  always @(posedge clk) if (rst_n) begin
    if (in_sop && t_first_in < 0) t_first_in = cyc;
    if (out_sop && t_first_out < 0) t_first_out = cyc;
    for (int j = 0; j < N; j++) if (drop[j]) n_drop++;
    if (out_ready && !out_sop && wk < 0) m_idle++;
    if (out_sop) begin
      if (cyc == out_end + 1) m_b2b_out++;
      if (out_valid != '1) m_partial++;
      for (int k = 0; k < M; k++) begin
        cur[k] = -1;
        if (out_valid[k]) begin
          cur[k] = int'(out_data[k]) << 8;
        end
      end
      wk = 0;
    end
    if (wk >= 0) begin
      for (int k = 0; k < M; k++) if (out_valid[k]) begin
        if (wk == 1) begin
          cur[k] = cur[k] | int'(out_data[k]);
          check(k == 0 || out_valid[k-1], "valid links not packed from link 0");
          check(cur[k] > last_out, $sformatf("order: cell %0d after %0d", cur[k], last_out));
          last_out = cur[k];
          n_out++;
        end else if (wk >= 2) begin
          check(out_data[k] == word(cur[k], wk), $sformatf("cell %0d word %0d", cur[k], wk));
        end
      end
      wk++;
      if (wk == L) begin wk = -1; out_end = cyc; end
    end
  end

  initial begin
    int lat;
    logic [N-1:0] v;
    in_sop = 0; in_valid = '0; out_ready = 0;
    for (int i = 0; i < N; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);

    // 1. latency of a single cell
    #1 out_ready = 1;
    send_slot(8'b0000_0001);
    repeat (3 * N + 2) @(posedge clk);
    lat = t_first_out - t_first_in;
    check(lat == 3 * N - 2 + L + 1, $sformatf("latency %0d, expected %0d", lat, 3 * N - 2 + L + 1));
    repeat (L + 5) @(posedge clk);
    check(last_out == 0 && ptr_index(wr_ptr) == 1, "single cell delivered");

    // 2. the document's 8x8 example, output closed. Lanes a..h are bits 0..7.
    #1 out_ready = 0;
    // restart the pointer at A by filling B..H with a 7-cell slot, then drain
    send_slot(8'b0111_1111);
    check(ptr_index(wr_ptr) == 0, "pointer back at A");
    #1 out_ready = 1;
    repeat (3 * L) @(posedge clk);
    #1 out_ready = 0;
    send_slot(8'b1101_1101);  // 1a 1c 1d 1e 1g 1h -> A..F
    check(ptr_index(wr_ptr) == 6, $sformatf("after slot 1 pointer at %0d, expected G", ptr_index(wr_ptr)));
    send_slot(8'b1001_1001);  // 2a 2d 2e 2h -> G H A B
    repeat (3 * N + 2) @(posedge clk);
    check(ptr_index(wr_ptr) == 2, $sformatf("after slot 2 pointer at %0d, expected C", ptr_index(wr_ptr)));
    for (int j = 0; j < N; j++)
      check(level[j] == ((j < 2) ? 2 : 1), $sformatf("FIFO %0d holds %0d cells", j, level[j]));
    #1 out_ready = 1;
    repeat (4 * L) @(posedge clk);
    check(n_out == n_in, "example drained");

    // 3. heavy load, slow output: the FIFOs overflow
    for (int s = 0; s < 60; s++) begin
      #1 out_ready = ($urandom_range(0, 7) == 0);
      v = N'($urandom) | N'($urandom);
      send_slot(v);
    end
    // 4. random load, fast output
    for (int s = 0; s < 120; s++) begin
      #1 out_ready = ($urandom_range(0, 4) != 0);
      v = ($urandom_range(0, 5) == 0) ? '1 : N'($urandom);
      send_slot(v);
      if ($urandom_range(0, 7) == 0) repeat ($urandom_range(1, 4)) @(posedge clk);
    end
    #1 out_ready = 1;
    repeat ((DEPTH + 2) * L) @(posedge clk);

    check(n_out + n_drop == n_in, $sformatf("in %0d, out %0d, dropped %0d", n_in, n_out, n_drop));
    m_drop = n_drop;
    check(m_wrap > 0, "no wrap-around");
    check(m_full > 0, "no all-valid slot");
    check(m_empty > 0, "no empty cell removed");
    check(m_drop > 0, "no overflow drop");
    check(m_partial > 0, "no partial output slot");
    check(m_idle > 0, "no idle output cycle");
    check(m_b2b_in > 0 && m_b2b_out > 0, "no back-to-back slots");
    $display("cells in=%0d out=%0d dropped=%0d", n_in, n_out, n_drop);
    $display("wrap=%0d all-valid=%0d with-empties=%0d partial-out=%0d idle-out=%0d b2b-in=%0d b2b-out=%0d",
             m_wrap, m_full, m_empty, m_partial, m_idle, m_b2b_in, m_b2b_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
