// tb_mpc_csr: checks the register map.
//
// Writes and reads back CSR0, CSR2, CSR4 and CSR5 through the register bus,
// checks the read-only bits (TDO and configuration done in CSR0, CSR1 firmware
// date, CSR3 FIFO flags, CSR6 status), the clock delay selection of CSR0[13]
// (30h) versus CSR2[15:8], the JTAG bits, one pulse per command offset, the
// FIFO_A/FIFO_B push and pop strobes and read data routing, and the L1A
// counter with its clear. CSR1 is set to 1252 (4 July 2002), the example
// value of the specification.
// The offsets and bit positions follow the specification's register
// tables; reset values and the L1A clear are this design's choices.
module tb_mpc_csr;
  localparam int NT = 9, NL = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [7:0] rb_addr = 0;
  logic rb_wr = 0, rb_rd = 0;
  logic [15:0] rb_wdata = 0, rb_rdata;
  logic [15:0] csr0, csr2, csr4, csr5;
  logic [7:0] clk_delay;
  logic jtag_tdi, jtag_tms, jtag_tck, jtag_tdo = 0, fpga_done = 0;
  logic cmd_hard_reset, cmd_soft_reset, cmd_dll_reset, cmd_inject, cmd_txen_pulse;
  logic cmd_ow_reset, cmd_ow_read, cmd_ow_write0, cmd_ow_write1, cmd_ow_clear;
  logic [2*NT-1:0] fa_wr, fa_rd;
  logic [15:0] fa_rdata [2*NT];
  logic [NL-1:0] fb_wr, fb_rd;
  logic [15:0] fb_rdata [NL];
  logic fa_full = 0, fa_empty = 1, fb_full = 1, fb_empty = 0;
  logic [4:0] csr6 = 5'b10101;
  logic l1accept = 0, l1a_clear = 0;
  int checks = 0, failures = 0;
  int cmd_cnt [10];

  mpc_csr #(.N_TMB(NT), .N_LINK(NL), .FW_DATE(16'd1252)) dut (.*);

  always_comb begin
    foreach (fa_rdata[h]) fa_rdata[h] = 16'h1000 + 16'(h);
    foreach (fb_rdata[k]) fb_rdata[k] = 16'h2000 + 16'(k);
  end

  always @(posedge clk) begin
    cmd_cnt[0] += cmd_hard_reset; cmd_cnt[1] += cmd_soft_reset; cmd_cnt[2] += cmd_dll_reset;
    cmd_cnt[3] += cmd_inject; cmd_cnt[4] += cmd_txen_pulse; cmd_cnt[5] += cmd_ow_reset;
    cmd_cnt[6] += cmd_ow_read; cmd_cnt[7] += cmd_ow_clear; cmd_cnt[8] += cmd_ow_write0;
    cmd_cnt[9] += cmd_ow_write1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    rb_addr = a; rb_wdata = d; rb_wr = 1;
    @(negedge clk) rb_wr = 0;
    @(negedge clk);
  endtask

  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    rb_addr = a; rb_rd = 1;
    #1 d = rb_rdata;
    @(negedge clk) rb_rd = 0;
  endtask

  logic [15:0] v;
  logic [7:0] cmd_addr [10] = '{8'h02, 8'h04, 8'h06, 8'hB2, 8'hB6, 8'hC0, 8'hC2, 8'hC4, 8'hC6, 8'hC8};
  initial begin
    foreach (cmd_cnt[i]) cmd_cnt[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    foreach (cmd_cnt[i]) cmd_cnt[i] = 0;
    rd(8'h00, v); check(v == 0 && clk_delay == 0, "CSR0 reset value");
    wr(8'h00, 16'hFFFF);
    jtag_tdo = 0; fpga_done = 0;
    rd(8'h00, v); check(v == 16'hEEFF, $sformatf("CSR0 %h: TDO and DONE come from pins", v));
    jtag_tdo = 1; fpga_done = 1;
    rd(8'h00, v); check(v == 16'hFFFF, "CSR0 TDO/DONE high");
    check(jtag_tdi && jtag_tms && jtag_tck, "JTAG bits");
    check(clk_delay == 8'h30, "CSR0[13]=1: delay code 30h");
    wr(8'hAC, 16'h2701);
    wr(8'h00, 16'h00A0);
    check(clk_delay == 8'h27, "CSR0[13]=0: delay from CSR2");
    check(jtag_tdi && !jtag_tms && jtag_tck, "JTAG bits 2");
    rd(8'hAC, v); check(v == 16'h2701, "CSR2 read back");
    wr(8'hB8, 16'h1234); rd(8'hB8, v); check(v == 16'h1234 && csr4 == 16'h1234, "CSR4");
    wr(8'hBA, 16'h0ABC); rd(8'hBA, v); check(v == 16'h0ABC && csr5 == 16'h0ABC, "CSR5");
    wr(8'hAA, 16'hFFFF); rd(8'hAA, v); check(v == 16'd1252, "CSR1 firmware date, read only");
    check(v[4:0] == 4 && v[8:5] == 7 && v[11:9] == 2, "CSR1 decodes to July 4, 2002");
    rd(8'hAE, v); check(v == 16'b0110, "CSR3 FIFO flags");
    rd(8'hBC, v); check(v == 16'b10101, "CSR6 status");
    foreach (cmd_addr[i]) begin
      wr(cmd_addr[i], 16'h0);
      for (int j = 0; j < 10; j++) begin
        check(cmd_cnt[j] == (i == j), $sformatf("command %h pulse %0d", cmd_addr[i], j));
        cmd_cnt[j] = 0;
      end
    end
    for (int h = 0; h < 2 * NT; h++) begin
      rb_addr = 8'h80 + 8'(2 * h); rb_wr = 1; #1;
      check(fa_wr == (18'(1) << h) && fa_rd == 0, "FIFO_A write strobe");
      rb_wr = 0; rb_rd = 1; #1;
      check(fa_rd == (18'(1) << h) && rb_rdata == 16'h1000 + 16'(h), "FIFO_A read");
      rb_rd = 0;
    end
    for (int k = 0; k < NL; k++) begin
      rb_addr = 8'hA4 + 8'(2 * k); rb_wr = 1; #1;
      check(fb_wr == (3'(1) << k), "FIFO_B write strobe");
      rb_wr = 0; rb_rd = 1; #1;
      check(fb_rd == (3'(1) << k) && rb_rdata == 16'h2000 + 16'(k), "FIFO_B read");
      rb_rd = 0;
    end
    @(negedge clk);
    repeat (5) begin l1accept = 1; @(negedge clk); l1accept = 0; @(negedge clk); end
    rd(8'hB0, v); check(v == 5, "L1A counter");
    l1a_clear = 1; @(negedge clk); l1a_clear = 0;
    rd(8'hB0, v); check(v == 0, "L1A counter clear");
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
