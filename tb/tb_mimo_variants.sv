// End-to-end test of the two reduced-output variants of the MIMO buffer:
//   variant 0: buffer with a single-output RMUX (N = 8 inputs, M = 1 output);
//   variant 1: buffer concentrator (N = 8 inputs, M = 2 outputs).
// Both use 8-bit words, 53-word cells and 16-cell FIFOs. Random slots arrive back to
// back while the output side is always ready. Every output cell must be intact and in
// arrival order, and inputs = outputs + reported drops. Each variant must also see an
// output slot with fewer than M cells (variant 1) and buffer overflow, because the
// output carries fewer cells per slot than the input.
module tb_mimo_variants;
  localparam int N = 8, W = 8, L = 53, DEPTH = 16, SLOTS = 150;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, done = 0;

  function automatic logic [W-1:0] word(int id, int k);
    if (k == 0) return W'(id >> 8);
    if (k == 1) return W'(id);
    return W'(id * 11 + k * 29 + (id >> 4));
  endfunction

  for (genvar g = 0; g < 2; g++) begin : g_var
    localparam int M = (g == 0) ? 1 : 2;

    logic         in_sop, out_ready, out_sop;
    logic [N-1:0] in_valid, drop, wr_ptr;
    logic [W-1:0] in_data[N], out_data[M];
    logic [M-1:0] out_valid;
    logic [$clog2(DEPTH+1)-1:0] level[N];

    mimo_buffer #(.N(N), .M(M), .W(W), .CELL_WORDS(L), .DEPTH(DEPTH)) dut (.*);

    int n_in = 0, n_out = 0, n_drop = 0, last = -1, partial = 0, wk = -1;
    int cur[M];

    initial begin
      logic [N-1:0] v;
      int ids[N];
      in_sop = 0; in_valid = '0; out_ready = 1;
      for (int i = 0; i < N; i++) in_data[i] = '0;
      wait (rst_n);
      @(posedge clk);
      for (int s = 0; s < SLOTS; s++) begin
        v = (s % 40 < 10) ? N'($urandom) & N'($urandom) & N'($urandom) : N'($urandom) | N'($urandom);
        for (int i = 0; i < N; i++) begin
          ids[i] = v[i] ? n_in : -1;
          if (v[i]) n_in++;
        end
        for (int k = 0; k < L; k++) begin
          #1;
          in_sop   = (k == 0);
          in_valid = (k == 0) ? v : N'($urandom);
          for (int i = 0; i < N; i++) in_data[i] = (ids[i] >= 0) ? word(ids[i], k) : W'($urandom);
          @(posedge clk);
        end
      end
      #1 in_sop = 0;
      repeat ((DEPTH + 4) * L * N / M) @(posedge clk);
      checks++;
      if (n_out + n_drop != n_in || n_drop == 0 || (M > 1 && partial == 0)) begin
        failures++;
        $display("variant M=%0d: in %0d out %0d dropped %0d partial %0d", M, n_in, n_out, n_drop, partial);
      end
      $display("M=%0d: cells in=%0d out=%0d dropped=%0d partial slots=%0d", M, n_in, n_out, n_drop, partial);
      done++;
    end

    always @(posedge clk) if (rst_n) begin
      for (int j = 0; j < N; j++) if (drop[j]) n_drop++;
      if (out_sop) begin
        if (out_valid != '1) partial++;
        for (int k = 0; k < M; k++) cur[k] = int'(out_data[k]) << 8;
        wk = 0;
      end
      if (wk >= 0) begin
        for (int k = 0; k < M; k++) if (out_valid[k]) begin
          checks++;
          if (wk == 1) begin
            cur[k] = cur[k] | int'(out_data[k]);
            if (cur[k] <= last || (k > 0 && !out_valid[k-1])) begin
              failures++;
              $display("M=%0d: cell %0d after %0d", M, cur[k], last);
            end
            last = cur[k];
            n_out++;
          end else if (wk >= 2 && out_data[k] != word(cur[k], wk)) begin
            failures++;
            if (failures < 10) $display("M=%0d: cell %0d word %0d", M, cur[k], wk);
          end
        end
        wk++;
        if (wk == L) wk = -1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SLOTS * L + (DEPTH + 4) * L * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
