// tb_ccb_if: checks the CCB command decoder.
//
// Drives each command code of the specification (BC0 01h, L1Reset 03h,
// Start 06h, Stop 07h, inject 30h, bunch counter reset 32h) on the
// active-low ccb_cmd lines with the strobe for one bunch crossing, then the
// dedicated lines, and checks that exactly the matching one-cycle pulse
// appears once. A code without its strobe, and an unused code, must give no
// pulse. The 300 ns hard reset must give a single pulse. phase must toggle
// every cycle with bx_stb in the phase-0 cycles.
// The command codes follow the specification; the strobe qualification and
// the pulse timing checked here are this design's choices.
module tb_ccb_if;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [5:0] ccb_cmd_n = '1;
  logic ccb_cmd_strobe_n = 1, ccb_bc0_n = 1, ccb_bcntres_n = 1, ccb_evcntres_n = 1;
  logic ccb_l1accept_n = 1, ccb_l1reset_n = 1, mpc_hard_reset_n = 1, mpc_soft_reset_n = 1;
  logic phase, bx_stb;
  logic bc0, l1reset, start_trig, stop_trig, inject, bcnt_reset, l1accept, evcnt_reset, hard_reset, soft_reset;
  int checks = 0, failures = 0;
  int cnt [10];

  ccb_if dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    cnt[0] += bc0; cnt[1] += l1reset; cnt[2] += start_trig; cnt[3] += stop_trig;
    cnt[4] += inject; cnt[5] += bcnt_reset; cnt[6] += l1accept; cnt[7] += evcnt_reset;
    cnt[8] += hard_reset; cnt[9] += soft_reset;
  end

  // wait for a phase-0 cycle, hold the lines for one bunch crossing (2 cycles)
  task automatic pulse_bx(input int which, input logic [5:0] code, input bit strobe, input int bxs = 1);
    while (phase != 0) @(negedge clk);
    case (which)
      0: begin ccb_cmd_n = ~code; ccb_cmd_strobe_n = !strobe; end
      1: ccb_bc0_n = 0;
      2: ccb_bcntres_n = 0;
      3: ccb_evcntres_n = 0;
      4: ccb_l1accept_n = 0;
      5: ccb_l1reset_n = 0;
      6: mpc_hard_reset_n = 0;
      7: mpc_soft_reset_n = 0;
      default: ;
    endcase
    repeat (2 * bxs) @(negedge clk);
    ccb_cmd_n = '1; ccb_cmd_strobe_n = 1; ccb_bc0_n = 1; ccb_bcntres_n = 1; ccb_evcntres_n = 1;
    ccb_l1accept_n = 1; ccb_l1reset_n = 1; mpc_hard_reset_n = 1; mpc_soft_reset_n = 1;
    repeat (4) @(negedge clk);
  endtask

  task automatic expect_only(input int idx, input string what);
    for (int i = 0; i < 10; i++) begin
      check(cnt[i] == (i == idx ? 1 : 0), $sformatf("%s: counter %0d = %0d", what, i, cnt[i]));
      cnt[i] = 0;
    end
  endtask

  initial begin
    foreach (cnt[i]) cnt[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      bit p0;
      p0 = phase;
      check(bx_stb == !phase, "bx_stb in phase 0");
      @(negedge clk);
      check(phase == !p0, "phase toggles");
    end
    pulse_bx(0, 6'h01, 1); expect_only(0, "BC0 cmd");
    pulse_bx(0, 6'h03, 1); expect_only(1, "L1Reset cmd");
    pulse_bx(0, 6'h06, 1); expect_only(2, "Start cmd");
    pulse_bx(0, 6'h07, 1); expect_only(3, "Stop cmd");
    pulse_bx(0, 6'h30, 1); expect_only(4, "Inject cmd");
    pulse_bx(0, 6'h32, 1); expect_only(5, "BCR cmd");
    pulse_bx(0, 6'h06, 0); expect_only(-1, "no strobe");
    pulse_bx(0, 6'h15, 1); expect_only(-1, "unused code");
    pulse_bx(1, 0, 0); expect_only(0, "bc0 line");
    pulse_bx(2, 0, 0); expect_only(5, "bcntres line");
    pulse_bx(3, 0, 0); expect_only(7, "evcntres line");
    pulse_bx(4, 0, 0); expect_only(6, "l1accept line");
    pulse_bx(5, 0, 0); expect_only(1, "l1reset line");
    pulse_bx(6, 0, 0, 12); expect_only(8, "hard reset 300 ns");
    pulse_bx(7, 0, 0); expect_only(9, "soft reset line");
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
