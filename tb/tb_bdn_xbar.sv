// Self-checking testbench of the folded systolic crossbar, at N = 5.
//
// The testbench stands in for the HOC and the VEC: it staggers row i by i clocks and
// column j by j clocks, and marks the columns before the round-robin pointer RESV. The
// first three slots are the five-port example of the document's pack-and-shift figure
// (valid cells on b,d,e; then a,c,e; then a,b,c,d). They must land on A,B,C; D,E,A;
// B,C,D,E. Random slots follow. For every slot the k-th valid row must come out on
// column (p + k) mod N with all its words, and every column's header must leave on the
// same clock, 3N-2 clocks after row 0's header went in.
module tb_bdn_xbar;
  import mimo_pkg::*;
  localparam int N = 5, W = 8, L = 3 * N - 1, SLOTS = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctl_t         row_ctl[N], col_ctl[N], out_ctl[N];
  logic [W-1:0] row_data[N], col_data[N], out_data[N];

  bdn_xbar #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0, wraps = 0;
  logic [N-1:0] sv[SLOTS];
  int           sp[SLOTS + 1];

  function automatic logic [W-1:0] word(int lane, int slot, int k);
    return W'(lane * 29 + slot * 13 + k * 7 + (slot >> 4) + 3);
  endfunction

  initial begin
    sv[0] = 5'b11010;  // e d . b .  -> 1b 1d 1e
    sv[1] = 5'b10101;  // e . c . a  -> 2a 2c 2e
    sv[2] = 5'b01111;  // . d c b a  -> 3a 3b 3c 3d
    for (int s = 3; s < SLOTS; s++) sv[s] = N'($urandom);
    sp[0] = 0;
    for (int s = 0; s < SLOTS; s++) sp[s+1] = (sp[s] + $countones(sv[s])) % N;
  end

  int cyc = 0;
  initial begin
    int s, k;
    for (int i = 0; i < N; i++) begin
      row_ctl[i] = CTL_IDLE; col_ctl[i] = CTL_IDLE; row_data[i] = '0; col_data[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < SLOTS * L + 6 * N; cyc++) begin
      #1;
      for (int i = 0; i < N; i++) begin
        s = (cyc - i) / L; k = (cyc - i) % L;
        if (cyc >= i && s < SLOTS) begin
          row_ctl[i].sop  = (k == 0);
          row_ctl[i].kind = (k == 0 && sv[s][i]) ? TK_CELL : TK_EMPTY;
          row_data[i]     = word(i, s, k);
          col_ctl[i].sop  = (k == 0);
          col_ctl[i].kind = (k == 0 && i < sp[s]) ? TK_RESV : TK_EMPTY;
          col_data[i]     = '0;
        end else begin
          row_ctl[i] = CTL_IDLE; col_ctl[i] = CTL_IDLE;
        end
      end
      @(posedge clk);
    end
  end

  // Output check: slot s leaves on cycles s*L + 3N-2 + k.
  int src[N];
  always @(negedge clk) if (rst_n) begin
    int t, s, k, n;
    t = cyc - (3 * N - 2);
    if (t >= 0) begin
      s = t / L; k = t % L;
      if (s < SLOTS) begin
        if (k == 0) begin
          n = 0;
          for (int j = 0; j < N; j++) src[j] = -1;
          for (int i = 0; i < N; i++) if (sv[s][i]) begin
            src[(sp[s] + n) % N] = i;
            n++;
          end
          if (sp[s] + n > N) wraps++;
        end
        for (int j = 0; j < N; j++) begin
          checks++;
          if (out_ctl[j].sop != (k == 0) ||
              (k == 0 && ((out_ctl[j].kind == TK_CELL) != (src[j] >= 0))) ||
              (src[j] >= 0 && out_data[j] != word(src[j], s, k))) begin
            failures++;
            if (failures < 10)
              $display("slot %0d word %0d column %0d: sop %0d kind %s data %h, expected lane %0d",
                       s, k, j, out_ctl[j].sop, out_ctl[j].kind.name(), out_data[j], src[j]);
          end
        end
      end else if (s == SLOTS && k == 0) begin
        checks++;
        if (wraps == 0) failures++;
        $display("slots=%0d wrapped=%0d", SLOTS, wraps);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (SLOTS * L + 20 * N) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
