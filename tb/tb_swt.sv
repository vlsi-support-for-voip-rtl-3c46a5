// Self-checking testbench of the SWT switching element.
//
// Two instances, one for a main row (FOLDED = 0) and one for a wrap row (FOLDED = 1),
// get every pair of north/west slot kinds, in random order, as 4-word cells. Expected
// routing, worked out from the rule: toggle (west -> south, north -> east) only when
// the west cell is valid and the north slot is free (EMPTY; in a wrap row also RESV),
// cross otherwise. Each output word must appear exactly one clock after its input word,
// and the mode must hold for all words of the cell.
module tb_swt;
  import mimo_pkg::*;
  localparam int W = 8, L = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctl_t         n_ctl, w_ctl;
  logic [W-1:0] n_data, w_data;
  ctl_t         s_ctl[2], e_ctl[2];
  logic [W-1:0] s_data[2], e_data[2];

  swt #(.W(W), .FOLDED(1'b0)) u_main (.clk, .rst_n, .n_ctl, .n_data, .w_ctl, .w_data,
    .s_ctl(s_ctl[0]), .s_data(s_data[0]), .e_ctl(e_ctl[0]), .e_data(e_data[0]));
  swt #(.W(W), .FOLDED(1'b1)) u_fold (.clk, .rst_n, .n_ctl, .n_data, .w_ctl, .w_data,
    .s_ctl(s_ctl[1]), .s_data(s_data[1]), .e_ctl(e_ctl[1]), .e_data(e_data[1]));

  int checks = 0, failures = 0, toggles = 0, crosses = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    tok_e nk, wk;
    bit   tg;
    n_ctl = CTL_IDLE; w_ctl = CTL_IDLE; n_data = '0; w_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 60; rep++) begin
      nk = tok_e'($urandom_range(0, 2));
      wk = tok_e'($urandom_range(0, 2));
      for (int k = 0; k < L; k++) begin
        #1;
        n_ctl.sop  = (k == 0);
        w_ctl.sop  = (k == 0);
        n_ctl.kind = (k == 0) ? nk : tok_e'($urandom_range(0, 2));
        w_ctl.kind = (k == 0) ? wk : tok_e'($urandom_range(0, 2));
        n_data     = W'(8'h40 + rep * 4 + k);
        w_data     = W'(8'h80 + rep * 4 + k);
        @(posedge clk);
        #1;
        for (int f = 0; f < 2; f++) begin
          tg = (wk == TK_CELL) && (nk == TK_EMPTY || (f == 1 && nk == TK_RESV));
          if (k == 0) begin
            if (tg) toggles++; else crosses++;
            check(s_ctl[f].sop && e_ctl[f].sop, "header not forwarded");
            check(s_ctl[f].kind == (tg ? wk : nk) && e_ctl[f].kind == (tg ? nk : wk),
                  $sformatf("kinds, folded=%0d n=%s w=%s", f, nk.name(), wk.name()));
          end
          check(s_data[f] == W'(tg ? 8'h80 + rep * 4 + k : 8'h40 + rep * 4 + k),
                $sformatf("south word %0d folded=%0d n=%s w=%s", k, f, nk.name(), wk.name()));
          check(e_data[f] == W'(tg ? 8'h40 + rep * 4 + k : 8'h80 + rep * 4 + k),
                $sformatf("east word %0d folded=%0d", k, f));
        end
      end
    end
    check(toggles > 0 && crosses > 0, "both modes exercised");
    $display("toggle=%0d cross=%0d", toggles, crosses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
