// tb_tmb_rx: checks the assembly of TMB frames into LCTs.
//
// Each bunch crossing the test drives a random first frame (phase 0) and
// second frame (phase 1) on every TMB bus, then expects, two cycles after the
// second frame, lct_stb and LCT0 = {frame2[15:0], frame1[15:0]} and
// LCT1 = {frame2[31:16], frame1[31:16]} for every TMB. In Test mode the FIFO
// frames must be taken instead, and zeros when fifo_valid is low.
// The frame layout follows the specification; the two-cycle delay is this
// design's choice.
module tb_tmb_rx;
  import mpc_pkg::*;
  localparam int NT = 9;

  logic clk = 0, rst = 1, phase = 0;
  always #5 clk = ~clk;

  logic [31:0] tmb [NT], fifo_frame [NT];
  logic test_sel = 0, fifo_valid = 0;
  lct_t lct [2*NT];
  logic lct_stb;
  int checks = 0, failures = 0;

  tmb_rx #(.N_TMB(NT)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) phase <= rst ? 1'b0 : ~phase;

  task automatic one_bx(input bit tsel, input bit fvld);
    logic [31:0] f1 [NT], f2 [NT], e1 [NT], e2 [NT];
    test_sel = tsel; fifo_valid = fvld;
    foreach (f1[t]) begin f1[t] = $urandom; f2[t] = $urandom; end
    // phase 0 cycle
    foreach (f1[t]) begin
      tmb[t] = f1[t]; fifo_frame[t] = ~f1[t];
      e1[t] = !tsel ? f1[t] : (fvld ? ~f1[t] : 32'h0);
    end
    check(phase == 0, "phase alignment");
    @(negedge clk);
    foreach (f2[t]) begin
      tmb[t] = f2[t]; fifo_frame[t] = ~f2[t];
      e2[t] = !tsel ? f2[t] : (fvld ? ~f2[t] : 32'h0);
    end
    @(negedge clk);
    foreach (f1[t]) begin tmb[t] = $urandom; fifo_frame[t] = $urandom; end
    check(!lct_stb, "no strobe one cycle after frame 2");
    @(negedge clk);
    check(lct_stb, "strobe two cycles after frame 2");
    for (int t = 0; t < NT; t++) begin
      check(lct[2*t]   == {e2[t][15:0],  e1[t][15:0]},  $sformatf("TMB%0d LCT0", t+1));
      check(lct[2*t+1] == {e2[t][31:16], e1[t][31:16]}, $sformatf("TMB%0d LCT1", t+1));
    end
  endtask

  initial begin
    foreach (tmb[t]) begin tmb[t] = '0; fifo_frame[t] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    // phase is 0 in the first cycle after reset
    for (int n = 0; n < 300; n++) begin
      // the task leaves us in a phase-1 cycle: go on to phase 0
      if (phase) @(negedge clk);
      one_bx(n % 3 == 1, n % 2 == 0);
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
