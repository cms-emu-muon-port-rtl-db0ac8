// tb_mpc_sorter: self-checking test of the best-3-of-18 sorter.
//
// Random LCT sets (qualities drawn from a small range so that ties are
// frequent, plus all-zero and all-equal corner cases) are applied, and the
// outputs are compared with a reference that repeatedly picks the highest
// quality among the unpicked non-zero LCTs, preferring the highest index
// (larger TMB slot, then LCT1) on a tie.
// The ranking and tie rules follow the specification; the stimulus mix is
// this testbench's choice.
module tb_mpc_sorter;
  import mpc_pkg::*;
  localparam int N_IN = 18, N_OUT = 3;

  logic clk = 0;
  always #5 clk = ~clk;

  lct_t lct [N_IN];
  lct_t best [N_OUT];
  logic best_vld [N_OUT];
  logic [4:0] best_idx [N_OUT];
  logic [N_IN-1:0] winner;
  int checks = 0, failures = 0;

  mpc_sorter #(.N_IN(N_IN), .N_OUT(N_OUT)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run_ref();
    bit taken [N_IN];
    lct_t exp_best [N_OUT];
    logic [N_IN-1:0] exp_win;
    exp_win = '0;
    foreach (taken[i]) taken[i] = 0;
    for (int k = 0; k < N_OUT; k++) begin
      int pick = -1;
      for (int i = 0; i < N_IN; i++)
        if (!taken[i] && lct[i].quality != 0 &&
            (pick < 0 || lct[i].quality >= lct[pick].quality)) pick = i;
      if (pick >= 0) begin
        taken[pick] = 1;
        exp_win[pick] = 1;
        exp_best[k] = lct[pick];
        check(best_vld[k] && best_idx[k] == 5'(pick), $sformatf("index of best[%0d]", k));
      end else begin
        exp_best[k] = '0;
        check(!best_vld[k], $sformatf("best_vld[%0d] should be 0", k));
      end
      check(best[k] == exp_best[k], $sformatf("best[%0d] %h exp %h", k, best[k], exp_best[k]));
    end
    check(winner == exp_win, $sformatf("winner %h exp %h", winner, exp_win));
  endtask

  initial begin
    // all zero: nothing selected
    foreach (lct[i]) lct[i] = '0;
    #1 run_ref();
    // all equal quality: the three highest indices win, 17 first
    foreach (lct[i]) begin lct[i] = 32'($urandom); lct[i].quality = 4'd7; end
    #1 run_ref();
    check(best_idx[0] == 17 && best_idx[1] == 16 && best_idx[2] == 15, "tie order");
    for (int n = 0; n < 3000; n++) begin
      foreach (lct[i]) begin
        lct[i] = 32'($urandom);
        lct[i].quality = (n % 3 == 0) ? 4'($urandom) : 4'($urandom_range(0, 3));
      end
      #1 run_ref();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
