// tb_onewire_master: reads a serial number from a DS2401 model.
//
// Runs the whole access sequence the way software does it through CSR6:
// reset slot, wait for status[2], expect presence (status[0]=0); send the
// Read ROM command 33h LSB first as write-one/write-zero slots, each time
// waiting for status[4]; then 64 read slots, each waiting for status[3] and
// taking status[1]. The ROM read must equal the model's, start with family
// code 01h, and the model must have seen one reset and command 33h. The
// lengths of the low pulses are measured against the parameters, a command
// while busy must be ignored, and clear must zero the status. Slot times are
// scaled down; their ratios follow the defaults.
// The pulse lengths scale the specification's 800/3/50/12 us; the sampling
// points are this design's choice.
module tb_onewire_master;
  localparam int RL = 400, PS = 60, RR = 300, RDL = 3, RDS = 12, W0 = 50, W1 = 10, SL = 70;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic cmd_reset = 0, cmd_read = 0, cmd_write0 = 0, cmd_write1 = 0, clear = 0;
  logic ow_drive_low, slave_low, bus;
  logic [4:0] status;
  logic [63:0] rom, got;
  logic [7:0] last_cmd;
  int resets;
  int checks = 0, failures = 0;
  int low_cnt = 0, last_low = 0;

  assign bus = !(ow_drive_low || slave_low);

  onewire_master #(.T_RST_LOW(RL), .PRES_SAMPLE(PS), .RST_REC(RR), .T_RD_LOW(RDL),
                   .RD_SAMPLE(RDS), .T_W0_LOW(W0), .T_W1_LOW(W1), .T_SLOT(SL)) dut (
    .clk, .rst, .cmd_reset, .cmd_read, .cmd_write0, .cmd_write1, .clear,
    .ow_in(bus), .ow_drive_low, .status
  );
  ds2401_model #(.RESET_MIN(200), .PD_WAIT(20), .PD_LEN(100), .W_THRESH(25), .HOLD(30)) chip (
    .clk, .bus, .drive_low(slave_low), .rom, .last_cmd, .resets
  );

  always @(posedge clk) begin
    if (ow_drive_low) low_cnt <= low_cnt + 1;
    else if (low_cnt != 0) begin last_low <= low_cnt; low_cnt <= 0; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  task automatic wait_bit(input int b);
    int t = 0;
    while (!status[b] && t < 5000) begin @(negedge clk); t++; end
    check(status[b], $sformatf("status[%0d] rises", b));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    pulse(cmd_reset);
    check(status[2] == 0, "init status low while busy");
    pulse(cmd_read);   // ignored: reset slot is running
    wait_bit(2);
    check(status[0] == 0, "presence pulse seen");
    check(last_low == RL, $sformatf("reset pulse %0d cycles", last_low));
    check(resets == 1, "model saw one reset");
    for (int i = 0; i < 8; i++) begin
      if (8'h33 >> i & 1) pulse(cmd_write1); else pulse(cmd_write0);
      @(negedge clk);
      check(status[4] == 0, "command status low while busy");
      wait_bit(4);
      check(last_low == ((8'h33 >> i & 1) ? W1 : W0), $sformatf("write slot %0d low %0d", i, last_low));
      repeat (3) @(negedge clk);
    end
    check(last_cmd == 8'h33, $sformatf("model received command %h", last_cmd));
    for (int i = 0; i < 64; i++) begin
      pulse(cmd_read);
      wait_bit(3);
      got[i] = status[1];
      repeat (3) @(negedge clk);
    end
    check(got == rom, $sformatf("ROM %h exp %h", got, rom));
    check(got[7:0] == 8'h01, "family code 01h");
    pulse(clear);
    check(status == 0, "CSR6 clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
