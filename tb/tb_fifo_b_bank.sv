// tb_fifo_b_bank: checks recording of selected muons into FIFO_B.
//
// Uses 7-word buffers. Random patterns are offered with sel_stb every second
// cycle and random per-link enables; a model keeps what each buffer should
// hold (frame 1 then frame 2, only while two words of room remain). Once no
// more patterns fit, the buffers are read out over VME and compared word by
// word, and the flags are checked. VME writes when the links are idle must
// also be stored.
// The vpf gating and two-frame records follow the specification; the
// two-word room rule and the 7-word depth are this design's and this
// testbench's choices.
module tb_fifo_b_bank;
  import mpc_pkg::*;
  localparam int NL = 3, D = 7;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  lct_t sel [NL];
  logic [NL-1:0] we = 0, vme_wr = 0, vme_rd = 0, wrote;
  logic sel_stb = 0;
  logic [15:0] vme_wdata = 0, vme_rdata [NL];
  logic any_full, all_empty;
  int checks = 0, failures = 0;
  logic [15:0] model [NL][$];
  int stored_full = 0;

  fifo_b_bank #(.N_LINK(NL), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    foreach (sel[k]) sel[k] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(all_empty && !any_full, "empty after reset");
    // VME write into FIFO_B2
    vme_wdata = 16'h1234; vme_wr = 3'b010; @(negedge clk); vme_wr = 0;
    model[1].push_back(16'h1234);
    for (int n = 0; n < 12; n++) begin
      foreach (sel[k]) sel[k] = 32'($urandom);
      we = 3'($urandom);
      for (int k = 0; k < NL; k++)
        if (we[k] && model[k].size() <= D - 2) begin
          model[k].push_back(sel[k][15:0]);
          model[k].push_back(sel[k][31:16]);
        end
      sel_stb = 1; @(negedge clk);
      sel_stb = 0; @(negedge clk);
    end
    for (int k = 0; k < NL; k++) if (model[k].size() >= D - 1) stored_full++;
    check(stored_full > 0, "at least one buffer filled up");
    check(any_full == (model[0].size() >= D - 1 || model[1].size() >= D - 1 || model[2].size() >= D - 1), "full flag");
    for (int k = 0; k < NL; k++) begin
      int n;
      n = model[k].size();
      for (int i = 0; i < n; i++) begin
        logic [15:0] e;
        e = model[k].pop_front();
        vme_rd = 1 << k; @(negedge clk); vme_rd = 0;
        check(vme_rdata[k] == e, $sformatf("FIFO_B%0d word %0d %h exp %h", k+1, i, vme_rdata[k], e));
      end
    end
    check(all_empty, "empty after read-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
