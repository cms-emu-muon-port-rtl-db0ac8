// tb_vme_slave: checks the A24/D16 slave with a VME master model.
//
// The master drives address, AM, WRITE*, LWORD* and data, asserts AS* and
// both data strobes, waits for DTACK* and releases. Writes must produce one
// rb_wr with the right offset and data; reads one rb_rd and return the
// rb_rdata the test supplies (a function of the offset). Accesses with a
// wrong slot (GA), wrong A[15:8] switch value, an unsupported AM, a byte
// access (one data strobe) or LWORD* low must get no DTACK and no strobe.
// The address, AM and word-only rules follow the specification; the
// synchroniser timing is this design's choice.
module tb_vme_slave;
  logic clk = 0, rst = 1;
  always #6 clk = ~clk;

  logic [4:0] ga = 5'd12;
  logic [7:0] base_sw = 8'h00;
  logic [23:1] vme_a = 0;
  logic [5:0] vme_am = 0;
  logic vme_as_n = 1, vme_ds0_n = 1, vme_ds1_n = 1, vme_lword_n = 1, vme_write_n = 1;
  logic [15:0] vme_d_in = 0, vme_d_out;
  logic vme_d_oe, vme_dtack_n;
  logic [7:0] rb_addr;
  logic rb_wr, rb_rd, dack;
  logic [15:0] rb_wdata, rb_rdata;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0;
  logic [7:0] last_addr;
  logic [15:0] last_wdata;

  vme_slave dut (.*);

  assign rb_rdata = {8'hA5, rb_addr};

  always @(posedge clk) begin
    if (rb_wr) begin n_wr++; last_addr = rb_addr; last_wdata = rb_wdata; end
    if (rb_rd) begin n_rd++; last_addr = rb_addr; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // one VME cycle; returns whether DTACK came and the data read
  task automatic vme_cycle(input logic [23:0] addr, input logic [5:0] am, input bit write,
                           input logic [15:0] wd, input bit byte_acc, input bit lword,
                           output bit acked, output logic [15:0] rd);
    int t;
    vme_a = addr[23:1]; vme_am = am; vme_write_n = !write; vme_lword_n = !lword;
    vme_d_in = wd;
    #20 vme_as_n = 0;
    #10 vme_ds0_n = 0; vme_ds1_n = byte_acc;
    acked = 0; t = 0;
    while (t < 60) begin
      @(posedge clk);
      if (!vme_dtack_n) begin acked = 1; break; end
      t++;
    end
    rd = vme_d_out;
    if (acked && !write) check(vme_d_oe, "data driven during read DTACK");
    #5 vme_as_n = 1; vme_ds0_n = 1; vme_ds1_n = 1;
    t = 0;
    while (!vme_dtack_n && t < 20) begin @(posedge clk); t++; end
    check(vme_dtack_n, "DTACK released");
    repeat (3) @(posedge clk);
    check(!vme_d_oe, "data bus released");
  endtask

  bit ack;
  logic [15:0] rd;
  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 40; n++) begin
      logic [7:0] off;
      logic [15:0] wd;
      int w0, r0;
      off = {7'($urandom), 1'b0};
      wd = 16'($urandom);
      w0 = n_wr; r0 = n_rd;
      vme_cycle({5'd12, 3'b000, 8'h00, off}, (n % 2) ? 6'h39 : 6'h3D, n % 3 != 0, wd, 0, 0, ack, rd);
      check(ack, "DTACK for a valid access");
      if (n % 3 != 0) check(n_wr == w0 + 1 && n_rd == r0 && last_addr == off && last_wdata == wd, "write strobe");
      else            check(n_rd == r0 + 1 && n_wr == w0 && last_addr == off && rd == {8'hA5, off}, "read data");
    end
    begin
      int w0, r0;
      w0 = n_wr; r0 = n_rd;
      vme_cycle(24'h680000, 6'h39, 1, 0, 0, 0, ack, rd); check(!ack, "wrong slot ignored");
      vme_cycle(24'h600100, 6'h39, 1, 0, 0, 0, ack, rd); check(!ack, "wrong A15..8 ignored");
      vme_cycle(24'h610000, 6'h39, 1, 0, 0, 0, ack, rd); check(!ack, "A18..16 not zero ignored");
      vme_cycle(24'h600000, 6'h09, 1, 0, 0, 0, ack, rd); check(!ack, "A32 AM ignored");
      vme_cycle(24'h600000, 6'h39, 1, 0, 1, 0, ack, rd); check(!ack, "byte access ignored");
      vme_cycle(24'h600000, 6'h39, 1, 0, 0, 1, ack, rd); check(!ack, "LWORD access ignored");
      check(n_wr == w0 && n_rd == r0, "no strobes for ignored accesses");
    end
    // switch-selected base
    base_sw = 8'h3C;
    vme_cycle(24'h603C04, 6'h39, 1, 16'h5555, 0, 0, ack, rd);
    check(ack && last_addr == 8'h04 && last_wdata == 16'h5555, "base address from switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
