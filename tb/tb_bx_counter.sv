// tb_bx_counter: checks load, arm, start on BC1, count, wrap and stop.
//
// Uses a short orbit (ORBIT=20). A bunch counter reset loads the preset;
// BC0 before Start Trigger must not start the counter; after Start Trigger
// the next BC0 starts it and the count advances first on the following
// bunch crossing, then by one per bunch crossing with a wrap from 19 to 0.
// L1Reset reloads the preset while running; Stop Trigger freezes the value.
// The start/stop/load rules follow the specification; the 20-crossing orbit
// is shortened by this testbench so the wrap is reached quickly.
module tb_bx_counter;
  localparam int ORBIT = 20;
  logic clk = 0, rst = 1, bx_stb = 0;
  always #5 clk = ~clk;
  always @(posedge clk) bx_stb <= rst ? 1'b1 : ~bx_stb;

  logic [11:0] preset = 12'd7, bxn;
  logic load = 0, start_trig = 0, stop_trig = 0, bc0 = 0, running;
  int checks = 0, failures = 0;

  bx_counter #(.ORBIT(ORBIT)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // pulse one input for one cycle, in the cycle after a bx_stb like ccb_if
  task automatic pulse(ref logic s);
    while (!bx_stb) @(negedge clk);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  int exp_v;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    pulse(load);
    check(bxn == 7, "preset loaded");
    pulse(bc0);
    repeat (6) @(negedge clk);
    check(bxn == 7 && !running, "BC0 without Start does not start");
    pulse(start_trig);
    repeat (6) @(negedge clk);
    check(bxn == 7, "Start alone does not count");
    pulse(bc0);
    // BC0 cycle done; counter has not yet moved
    check(bxn == 7 && running, "running after BC0, value held");
    exp_v = 7;
    // the pulse task returns in the BC1 cycle; the count moves at its end
    @(negedge clk);
    for (int n = 0; n < 50; n++) begin
      if (n > 0) repeat (2) @(negedge clk);
      exp_v = (exp_v + 1) % ORBIT;
      check(bxn == 12'(exp_v), $sformatf("count %0d exp %0d", bxn, exp_v));
    end
    preset = 12'd3;
    pulse(load);
    check(bxn == 3, "L1Reset reload while running");
    pulse(stop_trig);
    exp_v = bxn;
    repeat (10) @(negedge clk);
    check(bxn == 12'(exp_v) && !running, "stopped");
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
