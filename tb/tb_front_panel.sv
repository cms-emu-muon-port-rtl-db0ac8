// tb_front_panel: checks the LED one-shots, level LEDs and the blink.
//
// With ONESHOT=20 every one-shot LED must light the cycle after a one-cycle
// event and stay on for exactly 20 cycles; a second event restarts it. Level
// LEDs must follow their inputs, and CLK40 must toggle every 2^BLINK_BIT
// cycles (BLINK_BIT=3).
// Which LEDs are stretched follows the specification; the lengths are
// shortened by this testbench.
module tb_front_panel;
  import mpc_pkg::*;
  localparam int OS = 20, BB = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [2:0] muon_vpf = 0;
  logic hard_reset = 0, soft_reset = 0, dack = 0, idle = 0, run_test = 0, l1reset = 0;
  logic done = 0, test_mode = 0, tck = 0, fa_empty = 0, fb_empty = 0, fa_full = 0, fb_full = 0;
  logic [N_LED-1:0] led;
  int checks = 0, failures = 0;

  front_panel #(.ONESHOT(OS), .BLINK_BIT(BB)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic trig(input int which);
    case (which)
      0: muon_vpf = 3'b001; 1: muon_vpf = 3'b010; 2: muon_vpf = 3'b100;
      3: hard_reset = 1; 4: soft_reset = 1; 5: dack = 1; 6: idle = 1; 7: run_test = 1;
      default: l1reset = 1;
    endcase
    @(negedge clk);
    muon_vpf = 0; {hard_reset, soft_reset, dack, idle, run_test, l1reset} = '0;
  endtask

  int leds [9] = '{LED_MUON1, LED_MUON2, LED_MUON3, LED_HRES, LED_SRES, LED_DACK, LED_IDLE, LED_RNTS, LED_L1RS};
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 9; i++) begin
      int on;
      check(!led[leds[i]], "LED off before event");
      trig(i);
      on = 0;
      for (int c = 0; c < OS + 10; c++) begin
        on += led[leds[i]];
        @(negedge clk);
      end
      check(on == OS, $sformatf("one-shot %0d on for %0d cycles", i, on));
    end
    // retrigger extends
    trig(3);
    repeat (OS / 2) @(negedge clk);
    trig(3);
    repeat (OS - 2) @(negedge clk);
    check(led[LED_HRES], "retriggered one-shot still on");
    {done, test_mode, tck, fa_empty, fb_empty, fa_full, fb_full} = 7'b1010101;
    #1 check(led[LED_DONE] && !led[LED_TEST] && led[LED_TCK] && !led[LED_FAEM] &&
             led[LED_FBEM] && !led[LED_FAFL] && led[LED_FBFL], "level LEDs");
    {done, test_mode, tck, fa_empty, fb_empty, fa_full, fb_full} = 7'b0101010;
    #1 check(!led[LED_DONE] && led[LED_TEST] && !led[LED_TCK] && led[LED_FAEM] &&
             !led[LED_FBEM] && led[LED_FAFL] && !led[LED_FBFL], "level LEDs 2");
    begin
      int toggles = 0;
      logic prev;
      prev = led[LED_CLK40];
      for (int c = 0; c < 64; c++) begin
        @(negedge clk);
        if (led[LED_CLK40] != prev) toggles++;
        prev = led[LED_CLK40];
      end
      check(toggles == 64 / (1 << BB), $sformatf("CLK40 toggles %0d", toggles));
    end
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
