// Self-checking testbench of the FIFO bank (N = 4 FIFOs, 4-word cells, 2 cells deep).
//
// Aligned slots with a random valid/empty header on every column are written while
// each FIFO is read independently at random. Per-FIFO reference models predict acc and
// ovf on every header, acc_sop, cell_ready, level and every word read.
module tb_fifo_bank;
  import mimo_pkg::*;
  localparam int N = 4, W = 8, L = 4, DEPTH = 2, SLOTS = 1200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctl_t         wr_ctl[N];
  logic [W-1:0] wr_data[N], rd_data[N];
  logic         acc_sop;
  logic [N-1:0] acc, ovf, rd_en, cell_ready;
  logic [$clog2(DEPTH+1)-1:0] level[N];

  fifo_bank #(.N(N), .W(W), .CELL_WORDS(L), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_ovf = 0, n_read = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  function automatic logic [W-1:0] word(int id, int k);
    return W'(id * 11 + k * 71 + 5);
  endfunction

  int q[N][$];
  initial begin
    int used_m[N], ready_m[N], rk[N], rid[N];
    bit wv[N], wa[N];
    for (int j = 0; j < N; j++) begin
      used_m[j] = 0; ready_m[j] = 0; rk[j] = -1; rid[j] = 0;
      wr_ctl[j] = CTL_IDLE; wr_data[j] = '0;
    end
    rd_en = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < SLOTS; s++) begin
      for (int k = 0; k < L; k++) begin
        #1;
        for (int j = 0; j < N; j++) begin
          if (k == 0) wv[j] = ($urandom_range(0, 2) != 0);
          wr_ctl[j].sop  = (k == 0);
          wr_ctl[j].kind = (k == 0 && wv[j]) ? TK_CELL : TK_EMPTY;
          wr_data[j]     = word(s * N + j, k);
          if (rk[j] < 0 && ready_m[j] > 0 && $urandom_range(0, 3) == 0) begin
            rk[j] = 0; rid[j] = q[j][0];
          end
          rd_en[j] = (rk[j] >= 0);
        end
        #2;
        check(acc_sop == (k == 0), "acc_sop");
        for (int j = 0; j < N; j++) begin
          check(cell_ready[j] == (ready_m[j] > 0) && 32'(level[j]) == used_m[j], "flags");
          if (k == 0) begin
            wa[j] = wv[j] && used_m[j] < DEPTH;
            check(acc[j] == wa[j] && ovf[j] == (wv[j] && !wa[j]), $sformatf("acc/ovf fifo %0d", j));
            if (wa[j]) begin q[j].push_back(s * N + j); used_m[j]++; end
            if (ovf[j]) n_ovf++;
          end
          if (rk[j] >= 0) check(rd_data[j] == word(rid[j], rk[j]), $sformatf("read fifo %0d", j));
        end
        @(posedge clk);
        for (int j = 0; j < N; j++) begin
          if (k == L - 1 && wa[j]) ready_m[j]++;
          if (rk[j] >= 0) begin
            if (rk[j] == 0) ready_m[j]--;
            if (rk[j] == L - 1) begin
              void'(q[j].pop_front());
              used_m[j]--; n_read++; rk[j] = -1;
            end else rk[j]++;
          end
        end
      end
    end
    check(n_ovf > 0 && n_read > 0, "overflow and reads exercised");
    $display("overflows=%0d reads=%0d", n_ovf, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SLOTS * L + 50) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
