// tb_mpc_top: end-to-end test of the Muon Port Card logic at its default
// sizes (9 TMBs, 3 links, 511-word FIFOs, full-length 1-Wire and TX_EN
// timings).
//
// The test acts as the crate: nine TMBs drive random LCTs on their active-low
// lines every bunch crossing, the CCB drives commands, a VME master programs
// and reads the card, and a DS2401 model answers on the 1-Wire bus. For every
// bunch crossing a reference computes the three link words (sorting or the
// CSR4 choice, BC0 OR, BX0, Sync_Er) and the winner bits, and checks them on
// the outputs 5 cycles after frame 1 was driven, frame 2 one cycle later.
// The phases are:
//   A  sorter mode, until FIFO_B stops recording (FULL flag), first FIFO_B
//      words read back over VME
//   B  transparent mode with random CSR4 sources, same latency as A; after
//      a soft reset each FIFO_B records its own link and is read back
//   -  station-1 traffic (ninth TMB silent)
//   C  bunch counter: preset, BCR, Start, BC0; BX0 from the counter,
//      BXN comparator and BC0-check Sync_Er
//   D  IDLE mode (CSR2[0]) and the L1Reset TX_EN pulse
//   E  soft reset, FIFO_A loaded over VME, Test-mode play-out through the
//      sorter to the links and into FIFO_B, read back over VME
//   F  L1A counter, hard reset, 1-Wire reset/presence and Read ROM
//   G  clock delay code, JTAG bits, DLL reset, CCB inject command, FIFO_A
//      FULL flag, CCB hard and soft reset lines, front-panel LEDs
// Each mechanism is counted and a failure is counted for one that never
// happened.
// The expected values follow the specification's rules for sorting, BC0,
// BX0, Sync_Er, TX_EN, FIFOs and registers; the 5-cycle latency and the
// order of the phases are this design's and this testbench's choices.
module tb_mpc_top;
  import mpc_pkg::*;
  localparam int NT = 9, NL = 3, NI = 18, LAT = 5;

  logic clk = 0, rst = 1;
  always #6 clk = ~clk;

  // DUT ports
  logic frame_phase;
  logic [31:0] tmb_n [NT];
  logic [NT-1:0] winner_n;
  logic [5:0] ccb_cmd_n = '1;
  logic ccb_cmd_strobe_n = 1, ccb_bc0_n = 1, ccb_bcntres_n = 1, ccb_evcntres_n = 1;
  logic ccb_l1accept_n = 1, ccb_l1reset_n = 1, mpc_hard_reset_n = 1, mpc_soft_reset_n = 1;
  logic mpc_cfg_done_n;
  logic [4:0] vme_ga = 5'd12;
  logic [7:0] base_sw = 8'h00;
  logic [23:1] vme_a = 0;
  logic [5:0] vme_am = 6'h39;
  logic vme_as_n = 1, vme_ds0_n = 1, vme_ds1_n = 1, vme_lword_n = 1, vme_write_n = 1, vme_sysreset_n = 1;
  logic [15:0] vme_d_in = 0, vme_d_out;
  logic vme_d_oe, vme_dtack_n;
  logic [15:0] sp_txd [NL];
  logic [NL-1:0] sp_tx_en;
  logic tlk_enable, tlk_prbsen;
  logic [7:0] clk_delay;
  logic fpga_reload, dll_reset, jtag_tdi, jtag_tms, jtag_tck, jtag_tdo = 0, fpga_done = 1;
  logic ow_drive_low, ow_in, slave_low;
  logic [N_LED-1:0] led;

  mpc_top dut (.*);

  // 1-Wire bus with the serial-number chip, timings in 80.16 MHz cycles
  assign ow_in = !(ow_drive_low || slave_low);
  logic [63:0] rom;
  logic [7:0] ow_last_cmd;
  int ow_resets;
  ds2401_model #(.RESET_MIN(32000), .PD_WAIT(2405), .PD_LEN(9620), .W_THRESH(2405), .HOLD(2405)) chip (
    .clk, .bus(ow_in), .drive_low(slave_low), .rom, .last_cmd(ow_last_cmd), .resets(ow_resets)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // mechanism counters
  typedef enum int {M_SORT, M_TIE, M_CANCEL, M_TRANSP, M_WINNER, M_BC0_OR, M_BX0_CNT, M_BX0_TMB,
                    M_ER_TMB, M_ER_COMP, M_ER_BC0, M_BC0_OK, M_IDLE, M_TXEN_PULSE, M_FIFOB_FULL,
                    M_INJECT, M_FIFOB_RB, M_L1A, M_HRES, M_OW, M_SRES, M_CLKDLY, M_JTAG, M_DLL,
                    M_CCB_INJECT, M_FIFOA_FULL, M_CCB_HRES, M_CCB_SRES, M_STATION1, M_NUM} mech_e;
  int mech [M_NUM];

  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- reference model ----------------
  logic [15:0] m_csr0 = 0, m_csr2 = 0, m_csr4 = 0;
  int   bc0_cyc = -1;         // cycle of the CCB BC0 that started the counter
  int   preset = 0;

  function automatic void ref_sort(input lct_t in [NI], output lct_t b [NL], output logic [NI-1:0] w);
    bit taken [NI];
    foreach (taken[i]) taken[i] = 0;
    w = '0;
    for (int k = 0; k < NL; k++) begin
      int pick = -1;
      for (int i = 0; i < NI; i++)
        if (!taken[i] && in[i].quality != 0 && (pick < 0 || in[i].quality >= in[pick].quality)) pick = i;
      if (pick >= 0) begin taken[pick] = 1; w[pick] = 1; b[k] = in[pick]; end
      else b[k] = '0;
    end
  endfunction

  typedef struct {
    int          due;
    logic [31:0] word [NL];
    logic [NL-1:0] en;
    logic [NI-1:0] win;
  } exp_t;
  exp_t expq [$];
  logic [15:0] fifob_exp [NL][$];
  int fifob_cnt = 0;
  bit record_fifob = 0;

  // bunch counter value seen by bunch crossing whose frame 1 is at cycle c0
  function automatic int bxn_at(input int c0);
    int i;
    i = (c0 - bc0_cyc) / 2;
    return (preset + i + 1) % ORBIT;
  endfunction

  function automatic exp_t make_exp(input lct_t in [NI], input int c0);
    exp_t e;
    lct_t s [NL];
    logic [NI-1:0] w;
    logic [NL-1:0] we;
    logic bc0;
    int bxn;
    bit bxn_valid;
    e.due = c0 + LAT;
    bc0 = 0;
    foreach (in[i]) bc0 |= in[i].bc0;
    if (!m_csr4[0]) begin
      ref_sort(in, s, w);
      we = {NL{s[0].vpf}};
      mech[M_SORT]++;
    end else begin
      w = '0;
      for (int k = 0; k < NL; k++) begin
        int c;
        c = int'(m_csr4[5*k+1 +: 5]);
        if (c >= 1 && c <= 18) begin s[k] = in[c-1]; we[k] = in[c-1].vpf; w[c-1] |= in[c-1].vpf; end
        else begin s[k] = '0; we[k] = 0; end
      end
      mech[M_TRANSP]++;
    end
    e.win = w;
    if (w != 0) mech[M_WINNER]++;
    bxn_valid = (bc0_cyc >= 0);
    bxn = bxn_valid ? bxn_at(c0) : 0;
    for (int k = 0; k < NL; k++) begin
      lct_t o;
      bit er_t, er_c, er_b;
      o = s[k];
      o.bc0 = bc0;
      o.bx0 = m_csr0[3] ? s[k].bx0 : 1'(bxn);
      er_t = s[k].er && !m_csr0[10];
      er_c = s[k].vpf && (s[k].bx0 != 1'(bxn)) && !m_csr0[11];
      er_b = bc0 && (bxn != 0) && !m_csr0[2];
      o.er = er_t || er_c || er_b;
      mech[M_ER_TMB] += er_t; mech[M_ER_COMP] += er_c; mech[M_ER_BC0] += er_b;
      if (k == 0 && bc0 && !m_csr0[2] && bxn == 0) mech[M_BC0_OK]++;
      if (!m_csr0[3] && k == 0) mech[M_BX0_CNT]++;
      if (m_csr0[3] && k == 0) mech[M_BX0_TMB]++;
      e.word[k] = o;
      e.en[k] = m_csr0[9] && (!m_csr2[0] || s[k].vpf || bc0);
      if (m_csr2[0] && !e.en[k] && m_csr0[9]) mech[M_IDLE]++;
    end
    if (bc0) mech[M_BC0_OR]++;
    if (record_fifob)
      for (int k = 0; k < NL; k++)
        if (we[k] && fifob_exp[k].size() <= 509) begin
          fifob_exp[k].push_back(s[k][15:0]);
          fifob_exp[k].push_back(s[k][31:16]);
        end
    return e;
  endfunction

  // ---------------- TMB traffic ----------------
  bit   traffic = 0;
  bit   check_en = 1;
  int   bc0_at_bxn0 = -1;   // drive a TMB BC0 where the counter reads 0
  int   n_bx = 0;
  bit   station1 = 0;

  function automatic lct_t rand_lct();
    lct_t l;
    l = 32'($urandom);
    l.quality = 4'($urandom_range(0, 6));
    l.bc0 = ($urandom_range(0, 40) == 0);
    return l;
  endfunction

  lct_t cur [NI];
  bit   drove_f1 = 0;
  always @(negedge clk) begin
    if (traffic && frame_phase == 0) begin
      drove_f1 = 1;
      foreach (cur[i]) cur[i] = rand_lct();
      if (n_bx % 7 == 0) begin
        // equal-quality tie between TMB slots and within a TMB
        cur[4].quality = 4'd15; cur[5].quality = 4'd15; cur[12].quality = 4'd15;
        mech[M_TIE]++;
      end
      if (n_bx % 11 == 0) begin
        foreach (cur[i]) cur[i].quality = 0;
        cur[3].quality = 4'd2;
        mech[M_CANCEL]++;
      end
      if (station1) begin
        // station 1: only eight chambers, the ninth TMB sends nothing
        cur[2*NT-2] = '0; cur[2*NT-1] = '0;
        mech[M_STATION1]++;
      end
      if (bc0_at_bxn0 >= 0 && bc0_cyc >= 0) begin
        foreach (cur[i]) cur[i].bc0 = 0;
        if (bxn_at(cyc) == 0 || bxn_at(cyc) == 5) cur[7].bc0 = 1;
      end
      for (int t = 0; t < NT; t++) tmb_n[t] = ~{cur[2*t+1][15:0], cur[2*t][15:0]};
      expq.push_back(make_exp(cur, cyc));
      n_bx++;
    end else if (drove_f1 && frame_phase == 1) begin
      drove_f1 = 0;
      for (int t = 0; t < NT; t++) tmb_n[t] = ~{cur[2*t+1][31:16], cur[2*t][31:16]};
    end else begin
      for (int t = 0; t < NT; t++) tmb_n[t] = '1;
    end
  end

  // output checker
  always @(negedge clk) begin
    if (expq.size() > 0 && expq[0].due == cyc) begin
      exp_t e;
      e = expq.pop_front();
      if (check_en) begin
        for (int k = 0; k < NL; k++) begin
          check(sp_txd[k] == e.word[k][15:0], $sformatf("link %0d frame 1 %h exp %h", k, sp_txd[k], e.word[k][15:0]));
          check(sp_tx_en[k] == e.en[k], $sformatf("link %0d tx_en frame 1", k));
        end
        for (int t = 0; t < NT; t++) check(!winner_n[t] == e.win[2*t], "winner frame 1");
        @(negedge clk);
        for (int k = 0; k < NL; k++) begin
          check(sp_txd[k] == e.word[k][31:16], $sformatf("link %0d frame 2 %h exp %h", k, sp_txd[k], e.word[k][31:16]));
          check(sp_tx_en[k] == e.en[k], $sformatf("link %0d tx_en frame 2", k));
        end
        for (int t = 0; t < NT; t++) check(!winner_n[t] == e.win[2*t+1], "winner frame 2");
      end
    end
  end

  // ---------------- VME master ----------------
  task automatic vme(input bit write, input logic [7:0] off, input logic [15:0] wd, output logic [15:0] rd);
    int t;
    vme_a = {5'd12, 3'b000, 8'h00, off[7:1]}; vme_am = 6'h39; vme_write_n = !write; vme_lword_n = 1;
    vme_d_in = wd;
    #15 vme_as_n = 0;
    #10 vme_ds0_n = 0; vme_ds1_n = 0;
    t = 0;
    while (vme_dtack_n && t < 100) begin @(posedge clk); t++; end
    check(!vme_dtack_n, $sformatf("DTACK for offset %h", off));
    rd = vme_d_out;
    #5 vme_as_n = 1; vme_ds0_n = 1; vme_ds1_n = 1;
    while (!vme_dtack_n) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask
  logic [15:0] rdv;
  task automatic vw(input logic [7:0] off, input logic [15:0] d); vme(1, off, d, rdv); endtask
  task automatic vr(input logic [7:0] off, output logic [15:0] d); vme(0, off, 16'h0, d); endtask

  // ---------------- CCB ----------------
  task automatic ccb_cmd(input logic [5:0] code, output int at);
    @(negedge clk);
    while (frame_phase != 0) @(negedge clk);
    at = cyc;
    ccb_cmd_n = ~code; ccb_cmd_strobe_n = 0;
    repeat (2) @(negedge clk);
    ccb_cmd_n = '1; ccb_cmd_strobe_n = 1;
  endtask

  task automatic drain();
    traffic = 0;
    repeat (12) @(negedge clk);
  endtask

  task automatic run_bx(input int n);
    int start;
    start = n_bx;
    traffic = 1;
    while (n_bx < start + n) @(negedge clk);
    drain();
  endtask

  // ---------------- sequence ----------------
  int at, low, t0;
  logic [15:0] v;
  lct_t pat [3][NI];
  initial begin
    foreach (mech[i]) mech[i] = 0;
    foreach (tmb_n[t]) tmb_n[t] = '1;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);

    // ---- A: sorter mode, FIFO_B fills up
    m_csr0 = 16'h4A0C;  // TLK enable, TxEn, MASKCOMP, MASKBX0, MASKBC0
    vw(8'h00, m_csr0);
    vr(8'h00, v);
    check(v == (m_csr0 | 16'h1000), "CSR0 read back with DONE");
    check(tlk_enable && !tlk_prbsen, "TLK enable pins");
    vr(8'hAE, v); check(v == 16'b1010, "CSR3 both FIFOs empty");
    record_fifob = 1;
    run_bx(1100);
    record_fifob = 0;
    vr(8'hAE, v);
    check(v[2] == 1, "FIFO_B FULL after trigger-mode recording");
    if (v[2]) mech[M_FIFOB_FULL]++;
    check(fifob_exp[0].size() == 510, $sformatf("model FIFO_B1 holds %0d words", fifob_exp[0].size()));
    for (int k = 0; k < NL; k++)
      for (int i = 0; i < 6; i++) begin
        vr(8'hA4 + 8'(2 * k), v);
        check(v == fifob_exp[k][i], $sformatf("FIFO_B%0d word %0d %h exp %h", k+1, i, v, fifob_exp[k][i]));
        mech[M_FIFOB_RB]++;
      end

    // ---- B: transparent mode; a soft reset empties FIFO_B first, then each
    // buffer records its own link whenever that link carries vpf=1
    vw(8'h04, 0);
    mech[M_SRES]++;
    for (int k = 0; k < NL; k++) fifob_exp[k].delete();
    record_fifob = 1;
    for (int r = 0; r < 6; r++) begin
      m_csr4 = {5'($urandom_range(1, 18)), 5'($urandom_range(0, 18)), 5'($urandom_range(0, 20)), 1'b1};
      vw(8'hB8, m_csr4);
      run_bx(40);
    end
    record_fifob = 0;
    m_csr4 = 0;
    vw(8'hB8, m_csr4);
    for (int k = 0; k < NL; k++) begin
      int n;
      n = fifob_exp[k].size();
      for (int i = 0; i < n; i++) begin
        vr(8'hA4 + 8'(2 * k), v);
        check(v == fifob_exp[k][i], $sformatf("transparent FIFO_B%0d word %0d %h exp %h", k+1, i, v, fifob_exp[k][i]));
      end
      mech[M_FIFOB_RB]++;
    end
    vr(8'hAE, v);
    check(v[3] == 1, "FIFO_B empty after reading back the transparent-mode records");

    // ---- station-1 traffic: eight TMBs, the two best go to links 1 and 2
    station1 = 1;
    run_bx(100);
    station1 = 0;

    // ---- C: bunch counter, BX0 and Sync_Er
    preset = 3000;
    vw(8'hBA, 16'(preset));
    ccb_cmd(6'h32, at);    // bunch counter reset
    ccb_cmd(6'h06, at);    // start trigger
    m_csr0 = 16'h4600;     // BX0 from counter, all comparators on, TMB Sync_Er masked
    vw(8'h00, m_csr0);
    ccb_cmd(6'h01, at);    // BC0: counting starts on the next bunch crossing
    bc0_cyc = at;
    bc0_at_bxn0 = 1;
    run_bx(620);           // passes the counter wrap to 0
    bc0_at_bxn0 = -1;
    m_csr0 = 16'h4200;     // TMB Sync_Er on as well
    vw(8'h00, m_csr0);
    run_bx(60);
    ccb_cmd(6'h07, at);    // stop trigger: counter freezes
    check_en = 0;          // the frozen counter is no longer modelled
    run_bx(4);
    check_en = 1;
    bc0_cyc = -1;
    m_csr0 = 16'h4A0C;
    vw(8'h00, m_csr0);

    // ---- D: IDLE mode and the L1Reset TX_EN pulse
    m_csr2 = 16'h0001;
    vw(8'hAC, m_csr2);
    run_bx(100);
    m_csr2 = 0;
    vw(8'hAC, m_csr2);
    ccb_cmd(6'h03, at);    // L1Reset
    low = 0;
    for (int c = 0; c < 400; c++) begin
      low += (sp_tx_en == '0);
      @(negedge clk);
    end
    check(low == 256, $sformatf("TX_EN low for %0d cycles after L1Reset (3.2 us = 256)", low));
    if (low > 0) mech[M_TXEN_PULSE]++;
    check(sp_tx_en == '1, "TX_EN back on");

    // ---- E: soft reset, FIFO_A test patterns, play-out
    vw(8'h04, 0);
    mech[M_SRES]++;
    repeat (4) @(negedge clk);
    vr(8'hAE, v); check(v == 16'b1010, "soft reset empties the FIFOs");
    for (int p = 0; p < 3; p++)
      for (int i = 0; i < NI; i++) begin
        pat[p][i] = rand_lct();
        pat[p][i].vpf = 1;
        pat[p][i].quality = 4'($urandom_range(1, 15));
      end
    for (int t = 0; t < NT; t++)
      for (int p = 0; p < 3; p++) begin
        vw(8'h80 + 8'(4 * t), pat[p][2*t][15:0]);
        vw(8'h80 + 8'(4 * t), pat[p][2*t][31:16]);
        vw(8'h82 + 8'(4 * t), pat[p][2*t+1][15:0]);
        vw(8'h82 + 8'(4 * t), pat[p][2*t+1][31:16]);
      end
    vr(8'hAE, v); check(v[1] == 0, "FIFO_A not empty after loading");
    m_csr0 = 16'h4A0D;     // Test mode
    vw(8'h00, m_csr0);
    check(led[LED_TEST], "TEST LED");
    begin
      exp_t e [3];
      int found, idx;
      lct_t b [NL];
      logic [NI-1:0] w;
      for (int p = 0; p < 3; p++) e[p] = make_exp(pat[p], 0);
      vw(8'hB2, 0);        // play out FIFO_A
      found = -1; idx = 0;
      t0 = cyc;
      while (cyc < t0 + 1200) begin
        @(negedge clk);
        if (found < 0 && sp_txd[0] == e[0].word[0][15:0] && sp_tx_en[0]) found = cyc;
        if (found >= 0 && idx < 3 && cyc == found + 2 * idx) begin
          for (int k = 0; k < NL; k++) check(sp_txd[k] == e[idx].word[k][15:0], $sformatf("test pattern %0d link %0d frame 1", idx, k));
          for (int t = 0; t < NT; t++) check(!winner_n[t] == e[idx].win[2*t], "test pattern winner");
        end
        if (found >= 0 && idx < 3 && cyc == found + 2 * idx + 1) begin
          for (int k = 0; k < NL; k++) check(sp_txd[k] == e[idx].word[k][31:16], $sformatf("test pattern %0d link %0d frame 2", idx, k));
          idx++;
        end
      end
      check(found >= 0 && idx == 3, "test patterns reached the links");
      if (idx == 3) mech[M_INJECT]++;
      vr(8'hAE, v); check(v[1] == 1, "FIFO_A empty after play-out");
      // FIFO_B holds exactly the three selected patterns
      for (int p = 0; p < 3; p++) begin
        ref_sort(pat[p], b, w);
        for (int k = 0; k < NL; k++) begin
          vr(8'hA4 + 8'(2 * k), v); check(v == b[k][15:0], $sformatf("FIFO_B%0d pattern %0d frame 1", k+1, p));
          vr(8'hA4 + 8'(2 * k), v); check(v == b[k][31:16], $sformatf("FIFO_B%0d pattern %0d frame 2", k+1, p));
          mech[M_FIFOB_RB]++;
        end
      end
      vr(8'hAE, v); check(v[3] == 1, "FIFO_B empty after read-out");
    end
    m_csr0 = 16'h4A0C;
    vw(8'h00, m_csr0);

    // ---- F: L1A counter, hard reset, 1-Wire
    ccb_l1accept_n = 1;
    for (int i = 0; i < 7; i++) begin
      while (frame_phase != 0) @(negedge clk);
      ccb_l1accept_n = 0; repeat (2) @(negedge clk); ccb_l1accept_n = 1;
      repeat (2) @(negedge clk);
    end
    vr(8'hB0, v); check(v == 7, $sformatf("L1A counter %0d", v));
    if (v == 7) mech[M_L1A]++;
    fork
      vw(8'h02, 0);
      begin
        t0 = 0;
        repeat (80) begin @(posedge clk); if (fpga_reload) t0++; end
      end
    join
    check(t0 == 1, "hard reset pulse");
    if (t0 == 1) mech[M_HRES]++;
    vw(8'hC0, 0);          // 1-Wire reset pulse
    do vr(8'hBC, v); while (!v[2]);
    check(v[0] == 0, "presence pulse from the serial number chip");
    for (int i = 0; i < 8; i++) begin
      vw(((8'h33 >> i) & 8'h01) != 0 ? 8'hC8 : 8'hC6, 0);
      do vr(8'hBC, v); while (!v[4]);
    end
    check(ow_last_cmd == 8'h33, "Read ROM command received");
    begin
      logic [7:0] fam;
      for (int i = 0; i < 8; i++) begin
        vw(8'hC2, 0);
        do vr(8'hBC, v); while (!v[3]);
        fam[i] = v[1];
      end
      check(fam == 8'h01, $sformatf("family code %h", fam));
      if (fam == 8'h01) mech[M_OW]++;
    end

    // ---- G: board controls, CCB inject, FIFO_A FULL, CCB reset lines
    vw(8'hAC, 16'h2500);
    vw(8'h00, 16'h4200);
    check(clk_delay == 8'h25, $sformatf("clock delay from CSR2 %h", clk_delay));
    vw(8'h00, 16'h6200);
    check(clk_delay == 8'h30, "clock delay fixed at 30h by CSR0[13]");
    if (clk_delay == 8'h30) mech[M_CLKDLY]++;
    vw(8'h00, 16'h42A0);   // TCK and TDI high, TMS low
    jtag_tdo = 1;
    repeat (2) @(negedge clk);
    vr(8'h00, v);
    check(jtag_tck && jtag_tdi && !jtag_tms && v[8] && led[LED_TCK], "JTAG bits, TDO read back, TCK LED");
    jtag_tdo = 0;
    vw(8'h00, 16'h42C0);   // TCK and TMS high, TDI low
    vr(8'h00, v);
    check(jtag_tck && !jtag_tdi && jtag_tms && !v[8], "JTAG bits second pattern");
    if (jtag_tms) mech[M_JTAG]++;
    vw(8'hAC, 16'h0000);
    fork
      vw(8'h06, 0);
      begin
        t0 = 0;
        repeat (80) begin @(posedge clk); if (dll_reset) t0++; end
      end
    join
    check(t0 == 1, "DLL reset pulse");
    if (t0 == 1) mech[M_DLL]++;
    // FIFO_A FULL: fill the LCT1 half of TMB 5
    for (int i = 0; i < 511; i++) vw(8'h92, 16'(i));
    vr(8'hAE, v);
    check(v[0] == 1 && v[1] == 0, $sformatf("FIFO_A FULL after 511 words, CSR3 %h", v));
    check(led[LED_FAFL] && !led[LED_FAEM], "FIFO_A LEDs");
    if (v[0]) mech[M_FIFOA_FULL]++;
    // play it out with the CCB inject command: TMB 5 LCT1 carries the words
    m_csr0 = 16'h420D;
    vw(8'h00, m_csr0);
    check_en = 0;
    ccb_cmd(6'h30, at);
    begin
      int seen;
      seen = 0;
      for (int c = 0; c < 1200; c++) begin
        @(negedge clk);
        if (led[LED_RNTS]) seen |= 1;
      end
      vr(8'hAE, v);
      check(v[1] == 1 && v[0] == 0, "FIFO_A empty after CCB inject play-out");
      check(seen == 1, "RNTS LED after inject");
      if (v[1] && seen == 1) mech[M_CCB_INJECT]++;
    end
    check_en = 1;
    // the words played out have vpf=0, so FIFO_B stays empty; fill it over
    // VME and let the CCB soft reset line clear it
    vr(8'hAE, v);
    check(v[3] == 1, "FIFO_B records nothing without vpf");
    vw(8'hA6, 16'h1234);
    vr(8'hAE, v);
    check(v[3] == 0, "FIFO_B2 written over VME");
    @(negedge clk);
    while (frame_phase != 0) @(negedge clk);
    mpc_soft_reset_n = 0; repeat (2) @(negedge clk); mpc_soft_reset_n = 1;
    repeat (4) @(negedge clk);
    vr(8'hAE, v);
    check(v == 16'b1010, "Mpc_soft_reset empties the FIFOs");
    vr(8'h00, v);
    check(v[0] == 1, "soft reset keeps CSR0");
    check(led[LED_SRES], "SRES LED");
    if (v[0]) mech[M_CCB_SRES]++;
    // CCB hard reset line, 300 ns long
    fork
      begin
        @(negedge clk);
        while (frame_phase != 0) @(negedge clk);
        mpc_hard_reset_n = 0; repeat (24) @(negedge clk); mpc_hard_reset_n = 1;
      end
      begin
        t0 = 0;
        repeat (60) begin @(posedge clk); if (fpga_reload) t0++; end
      end
    join
    check(t0 == 1, $sformatf("one fpga_reload pulse for a 300 ns Mpc_hard_reset, got %0d", t0));
    check(led[LED_HRES] && led[LED_L1RS] && led[LED_DONE], "HRES, L1RS and DONE LEDs");
    check(mpc_cfg_done_n == 0, "configuration done reported to the CCB");
    if (t0 == 1) mech[M_CCB_HRES]++;
    m_csr0 = 16'h4A0C;
    vw(8'h00, m_csr0);

    // ---- mechanism coverage
    foreach (mech[i]) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %-14s %0d", m.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
