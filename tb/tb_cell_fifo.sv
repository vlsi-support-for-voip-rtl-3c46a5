// Self-checking testbench of the cell FIFO (W = 8, 4-word cells, 3 cells deep).
//
// Cells with valid or empty headers are written back to back or with gaps while a
// random reader takes whole cells out. A reference model counts the cells held and the
// complete cells. It predicts acc/ovf on every header, cell_ready on every clock, and
// every word read (the cells that were accepted, in order). Overflow, reading while
// writing, and a cell becoming readable only after its last word are all exercised.
module tb_cell_fifo;
  import mimo_pkg::*;
  localparam int W = 8, L = 4, DEPTH = 3, CYCLES = 6000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctl_t         wr_ctl;
  logic [W-1:0] wr_data, rd_data;
  logic         acc, ovf, rd_en, cell_ready;
  logic [$clog2(DEPTH+1)-1:0] level;

  cell_fifo #(.W(W), .CELL_WORDS(L), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_ovf = 0, n_acc = 0, n_read = 0, n_overlap = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  function automatic logic [W-1:0] word(int id, int k);
    return W'(id * 5 + k * 67 + 9);
  endfunction

  int q[$];  // ids of accepted cells, oldest first
  initial begin
    int id, wk, rk, used_m, ready_m, wid, rid;
    bit wvalid, wacc;
    id = 0; wk = -1; rk = -1; used_m = 0; ready_m = 0; wid = 0; rid = 0; wacc = 0;
    wr_ctl = CTL_IDLE; wr_data = '0; rd_en = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < CYCLES; t++) begin
      #1;
      // writer
      if (wk < 0 && $urandom_range(0, 3) != 0) begin
        wk = 0; id++; wid = id;
        wvalid = ($urandom_range(0, 4) != 0);
      end
      wr_ctl.sop  = (wk == 0);
      wr_ctl.kind = (wk == 0) ? (wvalid ? TK_CELL : TK_EMPTY) : tok_e'($urandom_range(0, 2));
      wr_data     = (wk >= 0) ? word(wid, wk) : W'($urandom);
      // reader
      if (rk < 0 && ready_m > 0 && $urandom_range(0, 2) == 0) begin
        rk = 0; rid = q[0];
      end
      rd_en = (rk >= 0);
      #2;
      check(cell_ready == (ready_m > 0), "cell_ready");
      check(32'(level) == used_m, "level");
      if (wk == 0) begin
        wacc = wvalid && used_m < DEPTH;
        check(acc == wacc && ovf == (wvalid && !wacc), $sformatf("acc/ovf on header, used %0d", used_m));
        if (wacc) begin q.push_back(wid); n_acc++; used_m++; end
        if (wvalid && !wacc) n_ovf++;
      end else check(!acc && !ovf, "acc/ovf off header");
      if (rk >= 0) begin
        check(rd_data == word(rid, rk), $sformatf("read cell %0d word %0d", rid, rk));
        if (wk >= 0 && wacc) n_overlap++;
      end
      @(posedge clk);
      if (wk >= 0) begin
        if (wk == L - 1) begin
          if (wacc) ready_m++;
          wk = -1;
          wacc = 0;
        end else wk++;
      end
      if (rk >= 0) begin
        if (rk == 0) ready_m--;
        if (rk == L - 1) begin
          void'(q.pop_front());
          used_m--; n_read++;
          rk = -1;
        end else rk++;
      end
    end
    check(n_ovf > 0 && n_read > 10 && n_overlap > 0, "overflow, reads and overlap exercised");
    $display("accepted=%0d overflowed=%0d read=%0d", n_acc, n_ovf, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 50) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
