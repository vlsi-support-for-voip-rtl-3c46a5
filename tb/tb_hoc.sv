// Self-checking testbench of the HOC (horizontal controller).
//
// Aligned slots with random valid bits and random data are applied; row i must show
// each input word exactly i clocks later, with the header flag on the delayed header
// and kind TK_CELL exactly for the lanes whose valid bit was set on the header.
module tb_hoc;
  import mimo_pkg::*;
  localparam int N = 8, W = 8, L = 6, CYCLES = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_sop;
  logic [N-1:0] in_valid;
  logic [W-1:0] in_data[N];
  ctl_t         row_ctl[N];
  logic [W-1:0] row_data[N];

  hoc #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic         h_sop  [CYCLES];
  logic [N-1:0] h_valid[CYCLES];
  logic [W-1:0] h_data [CYCLES][N];

  initial begin
    in_sop = 0; in_valid = '0;
    for (int i = 0; i < N; i++) in_data[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < CYCLES; t++) begin
      #1;
      in_sop   = (t % L == 0);
      in_valid = N'($urandom);
      for (int i = 0; i < N; i++) in_data[i] = W'($urandom);
      h_sop[t]   = in_sop;
      h_valid[t] = in_valid;
      for (int i = 0; i < N; i++) h_data[t][i] = in_data[i];
      #3;
      for (int i = 0; i < N; i++)
        if (t >= i) begin
          checks++;
          if (row_data[i] != h_data[t-i][i] || row_ctl[i].sop != h_sop[t-i] ||
              (row_ctl[i].kind == TK_CELL) != (h_sop[t-i] && h_valid[t-i][i])) begin
            failures++;
            if (failures < 10) $display("t=%0d row %0d mismatch", t, i);
          end
        end
      @(posedge clk);
    end
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
