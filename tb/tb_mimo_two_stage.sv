// Two MIMO buffers in cascade, as the stages of a multistage switch: stage 1 has
// 8 inputs and 4 outputs, and its 4 output links form the "super link" that feeds
// stage 2 (4 inputs, 2 outputs). Output slots of stage 1 are input slots of stage 2
// (out_sop -> in_sop, out_valid -> in_valid). Random traffic enters stage 1. The
// cells leaving stage 2 must be intact, in arrival order, and all accounted for as
// delivered or dropped in one of the stages. Both stages use 8-bit words, 53-word
// cells and 16-cell FIFOs.
module tb_mimo_two_stage;
  localparam int W = 8, L = 53, DEPTH = 16, N1 = 8, M1 = 4, M2 = 2, SLOTS = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_sop, mid_sop, out_sop, out_ready;
  logic [N1-1:0] in_valid, drop1, ptr1;
  logic [M1-1:0] mid_valid, drop2, ptr2;
  logic [M2-1:0] out_valid;
  logic [W-1:0]  in_data[N1], mid_data[M1], out_data[M2];
  logic [$clog2(DEPTH+1)-1:0] level1[N1], level2[M1];

  mimo_buffer #(.N(N1), .M(M1), .W(W), .CELL_WORDS(L), .DEPTH(DEPTH)) u_stage1 (
    .clk, .rst_n, .in_sop, .in_valid, .in_data, .out_ready(1'b1),
    .out_sop(mid_sop), .out_valid(mid_valid), .out_data(mid_data),
    .drop(drop1), .level(level1), .wr_ptr(ptr1)
  );
  mimo_buffer #(.N(M1), .M(M2), .W(W), .CELL_WORDS(L), .DEPTH(DEPTH)) u_stage2 (
    .clk, .rst_n, .in_sop(mid_sop), .in_valid(mid_valid), .in_data(mid_data), .out_ready,
    .out_sop, .out_valid, .out_data, .drop(drop2), .level(level2), .wr_ptr(ptr2)
  );

  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_drop = 0, last = -1, wk = -1;
  int cur[M2];

  function automatic logic [W-1:0] word(int id, int k);
    if (k == 0) return W'(id >> 8);
    if (k == 1) return W'(id);
    return W'(id * 5 + k * 41 + (id >> 6));
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < N1; j++) if (drop1[j]) n_drop++;
    for (int j = 0; j < M1; j++) if (drop2[j]) n_drop++;
    if (out_sop) begin
      for (int k = 0; k < M2; k++) cur[k] = int'(out_data[k]) << 8;
      wk = 0;
    end
    if (wk >= 0) begin
      for (int k = 0; k < M2; k++) if (out_valid[k]) begin
        checks++;
        if (wk == 1) begin
          cur[k] = cur[k] | int'(out_data[k]);
          if (cur[k] <= last) begin
            failures++;
            $display("cell %0d after %0d", cur[k], last);
          end
          last = cur[k];
          n_out++;
        end else if (wk >= 2 && out_data[k] != word(cur[k], wk)) begin
          failures++;
          if (failures < 10) $display("cell %0d word %0d", cur[k], wk);
        end
      end
      wk++;
      if (wk == L) wk = -1;
    end
  end

  initial begin
    logic [N1-1:0] v;
    int ids[N1];
    in_sop = 0; in_valid = '0; out_ready = 1;
    for (int i = 0; i < N1; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    for (int s = 0; s < SLOTS; s++) begin
      v = (s % 50 < 25) ? N1'($urandom) & N1'($urandom) : N1'($urandom) | N1'($urandom);
      for (int i = 0; i < N1; i++) begin
        ids[i] = v[i] ? n_in : -1;
        if (v[i]) n_in++;
      end
      for (int k = 0; k < L; k++) begin
        #1;
        in_sop    = (k == 0);
        in_valid  = (k == 0) ? v : N1'($urandom);
        out_ready = ($urandom_range(0, 3) != 0);
        for (int i = 0; i < N1; i++) in_data[i] = (ids[i] >= 0) ? word(ids[i], k) : W'($urandom);
        @(posedge clk);
      end
    end
    #1 in_sop = 0; out_ready = 1;
    repeat ((2 * DEPTH + 6) * L * 4) @(posedge clk);
    checks++;
    if (n_out + n_drop != n_in || n_out == 0) begin
      failures++;
      $display("in %0d out %0d dropped %0d", n_in, n_out, n_drop);
    end
    $display("cells in=%0d out=%0d dropped=%0d", n_in, n_out, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SLOTS * L + (2 * DEPTH + 6) * L * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
