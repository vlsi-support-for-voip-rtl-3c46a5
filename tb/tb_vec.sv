// Self-checking testbench of the VEC (vertical controller).
//
// Each round starts a slot, checks that column j gets its header j clocks later,
// carrying RESV for the columns before the model's pointer and EMPTY from the pointer
// on, with all-zero data (the empty cell generator). Then it reports a random cyclic
// run of accepted FIFOs starting at the pointer, and checks that the pointer moves to
// the column after the run, or stays when the run is empty or covers all columns.
module tb_vec;
  import mimo_pkg::*;
  localparam int N = 8, W = 8, ROUNDS = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         slot_sop, acc_sop;
  logic [N-1:0] acc, ptr;
  ctl_t         col_ctl[N];
  logic [W-1:0] col_data[N];

  vec #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0, moves = 0, stays = 0, resv = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int p, len;
    slot_sop = 0; acc_sop = 0; acc = '0;
    p = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROUNDS; r++) begin
      #1 slot_sop = 1;
      for (int t = 0; t < N + 2; t++) begin
        #2;
        for (int j = 0; j < N; j++) begin
          check(col_ctl[j].sop == (t == j), $sformatf("round %0d column %0d header at %0d", r, j, t));
          if (t == j) begin
            check(col_ctl[j].kind == ((j < p) ? TK_RESV : TK_EMPTY),
                  $sformatf("round %0d column %0d kind %s, pointer %0d", r, j, col_ctl[j].kind.name(), p));
            if (j < p) resv++;
          end
          check(col_data[j] == '0, "empty cell data");
        end
        @(posedge clk);
        #1 slot_sop = 0;
      end
      len = $urandom_range(0, N);
      acc = '0;
      for (int k = 0; k < len; k++) acc[(p + k) % N] = 1'b1;
      acc_sop = 1;
      @(posedge clk);
      #1 acc_sop = 0; acc = N'($urandom);  // ignored without acc_sop
      if (len != 0 && len != N) begin
        p = (p + len) % N;
        moves++;
      end else stays++;
      @(posedge clk);
      #1;
      check(ptr == N'(1) << p, $sformatf("pointer %b, expected %0d", ptr, p));
    end
    check(moves > 0 && stays > 0 && resv > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (ROUNDS * (N + 6) + 50) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
