// Self-checking testbench of the balanced distribution network.
//
// Random slots of up to N valid cells (including all-empty and all-valid slots) are fed
// back to back. A reference model keeps its own round-robin pointer and predicts for
// every slot which input lane lands on which output column: the k-th valid lane, in lane
// order, goes to column (p + k) mod N. Every word of every routed cell is compared. The
// testbench plays the FIFO bank: sometimes it accepts only the first few cells of the
// cyclic run, as a full bank would, and checks that the pointer follows. It also checks
// the pipeline latency of 3N-2 clocks and counts slots that wrapped around.
module tb_bdn;
  import mimo_pkg::*;
  localparam int N = 8, W = 8, L = 3 * N - 1;
  localparam int SLOTS = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_sop;
  logic [N-1:0] in_valid;
  logic [W-1:0] in_data[N];
  ctl_t         out_ctl[N];
  logic [W-1:0] out_data[N];
  logic         acc_sop;
  logic [N-1:0] acc, ptr;

  bdn #(.N(N), .W(W), .CELL_WORDS(L)) dut (.*);

  int checks = 0, failures = 0, wraps = 0, caps = 0, fulls = 0;

  function automatic logic [W-1:0] word(int lane, int slot, int k);
    return W'(lane * 37 + slot * 11 + k * 5 + (slot >> 3) * 3 + 1);
  endfunction

  // Slot records, written by the driver, read at the output.
  logic [N-1:0] slot_valid[SLOTS];
  int           slot_cap  [SLOTS];
  int           in_time   [SLOTS];
  int           cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Driver: back-to-back slots, a few with gaps.
  initial begin
    in_sop = 0; in_valid = '0;
    for (int i = 0; i < N; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int s = 0; s < SLOTS; s++) begin
      int mode;
      mode = $urandom_range(0, 9);
      slot_valid[s] = (mode == 0) ? '0 : (mode == 1) ? '1 : N'($urandom);
      slot_cap[s]   = ($urandom_range(0, 4) == 0) ? $urandom_range(0, N) : N;
      for (int k = 0; k < L; k++) begin
        #1;
        in_sop   = (k == 0);
        in_valid = (k == 0) ? slot_valid[s] : N'($urandom);  // ignored off the header
        for (int i = 0; i < N; i++) in_data[i] = word(i, s, k);
        if (k == 0) in_time[s] = cyc;
        @(posedge clk);
      end
      if ($urandom_range(0, 9) == 0) begin
        #1; in_sop = 0;
        repeat ($urandom_range(1, 5)) @(posedge clk);
      end
    end
    #1; in_sop = 0;
  end

  // Output side: reference model and FIFO-bank stand-in.
  int p_model = 0;
  int out_slot = 0, word_k = -1;
  int src[N];

  always_comb begin
    acc_sop = out_ctl[0].sop;
    acc     = '0;
    if (out_ctl[0].sop) begin
      int taken, j;
      taken = 0;
      for (int r = 0; r < N; r++) begin
        j = (p_model + r) % N;
        if (out_ctl[j].kind == TK_CELL && taken < slot_cap[out_slot]) begin
          acc[j] = 1'b1;
          taken++;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_ctl[0].sop) begin
      int k, got;
      k = 0;
      checks++;
      if (cyc - in_time[out_slot] != 3 * N - 2) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - in_time[out_slot], 3 * N - 2);
      end
      checks++;
      if (ptr != N'(1) << p_model) begin
        failures++;
        $display("slot %0d: pointer %b, model %0d", out_slot, ptr, p_model);
      end
      for (int j = 0; j < N; j++) src[j] = -1;
      for (int i = 0; i < N; i++)
        if (slot_valid[out_slot][i]) begin
          src[(p_model + k) % N] = i;
          k++;
        end
      if (p_model + k > N) wraps++;
      if (k == N) fulls++;
      for (int j = 0; j < N; j++) begin
        checks++;
        if ((out_ctl[j].kind == TK_CELL) != (src[j] >= 0)) begin
          failures++;
          $display("slot %0d column %0d: kind %s, expected lane %0d", out_slot, j,
                   out_ctl[j].kind.name(), src[j]);
        end
      end
      got = (k < slot_cap[out_slot]) ? k : slot_cap[out_slot];
      if (got < k) caps++;
      p_model <= (p_model + got) % N;
      word_k = 0;
    end
    if (word_k >= 0) begin
      for (int j = 0; j < N; j++)
        if (src[j] >= 0) begin
          checks++;
          if (out_data[j] !== word(src[j], out_slot, word_k)) begin
            failures++;
            if (failures < 10)
              $display("slot %0d column %0d word %0d: %h, expected %h", out_slot, j, word_k,
                       out_data[j], word(src[j], out_slot, word_k));
          end
        end
      word_k++;
      if (word_k == L) begin
        word_k = -1;
        out_slot <= out_slot + 1;
        if (out_slot + 1 == SLOTS) begin
          checks++;
          if (wraps == 0 || caps == 0 || fulls == 0) begin
            failures++;
            $display("mechanism not exercised: wraps=%0d caps=%0d fulls=%0d", wraps, caps, fulls);
          end
          $display("slots=%0d wrapped=%0d tail-dropped=%0d all-valid=%0d", out_slot + 1, wraps, caps, fulls);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (SLOTS * (L + 6) + 500) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
