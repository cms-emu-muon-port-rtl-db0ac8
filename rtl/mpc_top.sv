// mpc_top: FPGA logic of the CMS EMU Muon Port Card (MPC2004) together with
// the CSR0 register.
//
// Every 25 ns bunch crossing nine Trigger Motherboards (TMBs) each send up to
// two LCT trigger primitives, 32 bits each, as two 80 MHz frames on 32 lines.
// The card keeps the three best of the 18 LCTs by quality (sorter mode) or
// any three chosen through CSR4 (transparent mode), sends them in two 16-bit
// frames to three TLK2501 serializers that drive the optical links to the
// Sector Processor, and returns a winner bit to each TMB for each LCT chosen.
// Its own bunch counter supplies BX0 and checks the BXN and BC0 of the data
// for synchronisation errors. Test data can be loaded over VME into FIFO_A
// and played out through the same path, and FIFO_B records what was selected.
//
// Data path (one 80.16 MHz clock, `frame_phase` 0 in first-frame cycles):
//   tmb_n --> tmb_rx --> muon_select (mpc_sorter or CSR4) --> sp_link_tx --> sp_txd
//                  ^ fifo_a_bank (Test mode)   |--> fifo_b_bank, winner_n
// Control: ccb_if (CCB commands), bx_counter, vme_slave + mpc_csr,
// onewire_master (DS2401), front_panel (LEDs).
//
// Timing: frame 1 of a bunch crossing on tmb_n in cycle c appears as frame 1
// on sp_txd in cycle c+5 and frame 2 in c+6; the LCT0 winner bits appear in
// c+5 and the LCT1 winner bits in c+6, in both modes. Backplane GTLP lines
// (tmb_n, ccb_*_n, mpc_*_n, winner_n) are active low as on the board. A soft
// reset (VME 600004h, Mpc_soft_reset or VME SYSRESET*) re-initialises the
// data path, FIFOs, counters and 1-Wire master but keeps the registers; a
// hard reset only pulses fpga_reload, which asks the board to reload the FPGA.
// The VME data bus is split into in/out/output-enable signals. The
// structure, codes and register map follow the specification; the single
// clock domain, the pipeline depth and the reset split are this design's.
module mpc_top #(
  parameter int unsigned N_TMB      = 9,
  parameter int unsigned N_LINK     = 3,
  parameter int unsigned FIFO_DEPTH = 511,
  parameter int unsigned TXEN_PULSE = 256,
  parameter int unsigned ONESHOT    = 4008000,
  parameter int unsigned OW_RST_LOW = 64128
) (
  input  logic        clk,
  input  logic        rst,
  output logic        frame_phase,
  // TMB backplane lines, active low
  input  logic [31:0] tmb_n [N_TMB],
  output logic [N_TMB-1:0] winner_n,
  // CCB fast control bus and MPC reload bus, active low
  input  logic [5:0]  ccb_cmd_n,
  input  logic        ccb_cmd_strobe_n,
  input  logic        ccb_bc0_n,
  input  logic        ccb_bcntres_n,
  input  logic        ccb_evcntres_n,
  input  logic        ccb_l1accept_n,
  input  logic        ccb_l1reset_n,
  input  logic        mpc_hard_reset_n,
  input  logic        mpc_soft_reset_n,
  output logic        mpc_cfg_done_n,
  // VME
  input  logic [4:0]  vme_ga,
  input  logic [7:0]  base_sw,
  input  logic [23:1] vme_a,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic        vme_ds0_n,
  input  logic        vme_ds1_n,
  input  logic        vme_lword_n,
  input  logic        vme_write_n,
  input  logic        vme_sysreset_n,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  // TLK2501 serializers
  output logic [15:0] sp_txd [N_LINK],
  output logic [N_LINK-1:0] sp_tx_en,
  output logic        tlk_enable,
  output logic        tlk_prbsen,
  // board control
  output logic [7:0]  clk_delay,
  output logic        fpga_reload,
  output logic        dll_reset,
  output logic        jtag_tdi,
  output logic        jtag_tms,
  output logic        jtag_tck,
  input  logic        jtag_tdo,
  input  logic        fpga_done,
  // DS2401 1-Wire bus
  output logic        ow_drive_low,
  input  logic        ow_in,
  // front panel
  output logic [mpc_pkg::N_LED-1:0] led
);
  import mpc_pkg::*;

  // CCB
  logic phase, bx_stb;
  logic c_bc0, c_l1reset, c_start, c_stop, c_inject, c_bcr, c_l1a, c_evres, c_hres, c_sres;
  // VME register bus
  logic [7:0]  rb_addr;
  logic        rb_wr, rb_rd, dack;
  logic [15:0] rb_wdata, rb_rdata;
  // registers and commands
  logic [15:0] csr0, csr2, csr4, csr5;
  logic v_hres, v_sres, v_dll, v_inject, v_txen, ow_rs, ow_rd, ow_w0, ow_w1, ow_cl;
  logic [4:0]  csr6;
  // FIFOs
  logic [2*N_TMB-1:0] fa_wr, fa_rd;
  logic [15:0]        fa_rdata [2*N_TMB];
  logic [N_LINK-1:0]  fb_wr, fb_rd, fb_wrote;
  logic [15:0]        fb_rdata [N_LINK];
  logic fa_full, fa_empty, fb_full, fb_empty, fa_busy, fa_valid;
  logic [31:0] fa_frame [N_TMB];
  // data path
  logic [31:0] tmb [N_TMB];
  lct_t        lct [2*N_TMB];
  logic        lct_stb, sel_stb, bc0_any, idle_all;
  lct_t        sel [N_LINK];
  logic [N_LINK-1:0]  sel_we, link_vpf;
  logic [2*N_TMB-1:0] sel_winner;
  logic [N_TMB-1:0]   winner;
  logic [11:0] bxn;
  logic        bx_running;
  // resets
  logic        srst;

  assign frame_phase = phase;

  ccb_if u_ccb (
    .clk, .rst,
    .ccb_cmd_n, .ccb_cmd_strobe_n, .ccb_bc0_n, .ccb_bcntres_n, .ccb_evcntres_n,
    .ccb_l1accept_n, .ccb_l1reset_n, .mpc_hard_reset_n, .mpc_soft_reset_n,
    .phase, .bx_stb,
    .bc0(c_bc0), .l1reset(c_l1reset), .start_trig(c_start), .stop_trig(c_stop),
    .inject(c_inject), .bcnt_reset(c_bcr), .l1accept(c_l1a), .evcnt_reset(c_evres),
    .hard_reset(c_hres), .soft_reset(c_sres)
  );

  always_ff @(posedge clk) srst <= rst || c_sres || v_sres || !vme_sysreset_n;

  vme_slave u_vme (
    .clk, .rst,
    .ga(vme_ga), .base_sw, .vme_a, .vme_am, .vme_as_n, .vme_ds0_n, .vme_ds1_n,
    .vme_lword_n, .vme_write_n, .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .rb_addr, .rb_wr, .rb_rd, .rb_wdata, .rb_rdata, .dack
  );

  mpc_csr #(.N_TMB(N_TMB), .N_LINK(N_LINK)) u_csr (
    .clk, .rst,
    .rb_addr, .rb_wr, .rb_rd, .rb_wdata, .rb_rdata,
    .csr0, .csr2, .csr4, .csr5, .clk_delay, .jtag_tdi, .jtag_tms, .jtag_tck,
    .jtag_tdo, .fpga_done,
    .cmd_hard_reset(v_hres), .cmd_soft_reset(v_sres), .cmd_dll_reset(v_dll),
    .cmd_inject(v_inject), .cmd_txen_pulse(v_txen),
    .cmd_ow_reset(ow_rs), .cmd_ow_read(ow_rd), .cmd_ow_write0(ow_w0),
    .cmd_ow_write1(ow_w1), .cmd_ow_clear(ow_cl),
    .fa_wr, .fa_rd, .fa_rdata, .fb_wr, .fb_rd, .fb_rdata,
    .fa_full, .fa_empty, .fb_full, .fb_empty,
    .csr6, .l1accept(c_l1a), .l1a_clear(c_evres || srst)
  );

  bx_counter #(.ORBIT(ORBIT)) u_bxc (
    .clk, .rst(srst), .bx_stb, .preset(csr5[11:0]), .load(c_l1reset || c_bcr),
    .start_trig(c_start), .stop_trig(c_stop), .bc0(c_bc0), .bxn, .running(bx_running)
  );

  fifo_a_bank #(.N_TMB(N_TMB), .DEPTH(FIFO_DEPTH), .NWORDS(FIFO_DEPTH)) u_fifo_a (
    .clk, .rst(srst), .phase, .test_mode(csr0[0]), .start(c_inject || v_inject),
    .vme_wr(fa_wr), .vme_rd(fa_rd), .vme_wdata(rb_wdata), .vme_rdata(fa_rdata),
    .frame(fa_frame), .frame_valid(fa_valid), .busy(fa_busy),
    .any_full(fa_full), .all_empty(fa_empty)
  );

  always_comb
    for (int t = 0; t < N_TMB; t++) tmb[t] = ~tmb_n[t];

  tmb_rx #(.N_TMB(N_TMB)) u_rx (
    .clk, .rst(srst), .phase, .tmb, .test_sel(csr0[0]),
    .fifo_frame(fa_frame), .fifo_valid(fa_valid), .lct, .lct_stb
  );

  muon_select #(.N_TMB(N_TMB), .N_LINK(N_LINK)) u_sel (
    .clk, .rst(srst), .lct, .lct_stb, .csr4,
    .sel, .sel_we, .sel_winner, .bc0_any, .sel_stb, .winner_frame(winner)
  );
  assign winner_n = ~winner;

  sp_link_tx #(.N_LINK(N_LINK), .TXEN_PULSE(TXEN_PULSE)) u_tx (
    .clk, .rst(srst), .sel, .sel_stb, .bc0_any,
    .bxn_lsb(bxn[0]), .bxn_zero(bxn == 12'd0),
    .mask_bc0(csr0[2]), .bx0_from_tmb(csr0[3]), .mask_tmb(csr0[10]), .mask_comp(csr0[11]),
    .txen_csr(csr0[9]), .idle_mode(csr2[0]), .txen_pulse(c_l1reset || v_txen),
    .txd(sp_txd), .tx_en(sp_tx_en), .idle_all, .link_vpf
  );

  fifo_b_bank #(.N_LINK(N_LINK), .DEPTH(FIFO_DEPTH)) u_fifo_b (
    .clk, .rst(srst), .sel, .we(sel_we), .sel_stb,
    .vme_wr(fb_wr), .vme_rd(fb_rd), .vme_wdata(rb_wdata), .vme_rdata(fb_rdata),
    .any_full(fb_full), .all_empty(fb_empty), .wrote(fb_wrote)
  );

  onewire_master #(.T_RST_LOW(OW_RST_LOW)) u_ow (
    .clk, .rst(srst), .cmd_reset(ow_rs), .cmd_read(ow_rd), .cmd_write0(ow_w0),
    .cmd_write1(ow_w1), .clear(ow_cl), .ow_in, .ow_drive_low, .status(csr6)
  );

  front_panel #(.ONESHOT(ONESHOT)) u_fp (
    .clk, .rst,
    .muon_vpf(fb_wrote | link_vpf), .hard_reset(c_hres || v_hres),
    .soft_reset(c_sres || v_sres || !vme_sysreset_n), .dack, .idle(idle_all),
    .run_test(c_inject || v_inject), .l1reset(c_l1reset), .done(fpga_done),
    .test_mode(csr0[0]), .tck(csr0[7]), .fa_empty, .fb_empty, .fa_full, .fb_full, .led
  );

  assign tlk_enable     = csr0[14];
  assign tlk_prbsen     = csr0[15];
  assign fpga_reload    = c_hres || v_hres;
  assign dll_reset      = v_dll;
  assign mpc_cfg_done_n = ~fpga_done;

endmodule
