// mpc_csr: register map behind the VME slave.
//
// Decodes the byte offset rb_addr of a word access (base 600000h):
//   00 CSR0 (R/W; bit 8 reads TDO, bit 12 reads FPGA configuration done)
//   02/04/06 write: hard reset, soft reset, DLL reset pulses
//   80..A2 FIFO_A1..9, [15:0] at the lower and [31:16] at the upper address
//   A4/A6/A8 FIFO_B1..3
//   AA CSR1 firmware date (read only), AC CSR2 (R/W), AE CSR3 FIFO status
//   B0 L1A counter (read), B2 write: play out FIFO_A in Test mode,
//   B6 write: TX_EN 0-pulse, B8 CSR4 (R/W), BA CSR5 (R/W), BC CSR6 (read)
//   C0/C2/C6/C8 write: 1-Wire reset, read, write-zero, write-one slots;
//   C4 write: clear CSR6
// Command offsets give a one-cycle pulse; FIFO offsets give one-cycle
// push/pop strobes with rb_wdata as the data. rb_rdata is combinational on
// rb_addr; the VME slave waits long enough for a popped FIFO word.
//
// CSR0[13]=1 sets the clock delay code to 30h, the middle of the measured
// safe window; otherwise CSR2[15:8] is used. CSR0[7:5] drive TCK, TMS, TDI.
// The 16-bit L1A counter counts l1accept and clears on l1a_clear. The map and
// bit meanings follow the specification. CSR1 is read only (the register
// table marks its bits R although the address table says R/W), and the
// FIFO flags are in CSR3 (the register table), not CSR2 as one passage says.
// Reset values of 0 and the counter's clear source are this design's choices.
// CSR0 is discrete logic on the board; here it sits with the FPGA registers.
module mpc_csr #(
  parameter int unsigned N_TMB   = 9,
  parameter int unsigned N_LINK  = 3,
  parameter logic [15:0] FW_DATE = mpc_pkg::fw_date(2005, 11, 24)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  rb_addr,
  input  logic        rb_wr,
  input  logic        rb_rd,
  input  logic [15:0] rb_wdata,
  output logic [15:0] rb_rdata,
  // registers
  output logic [15:0] csr0,
  output logic [15:0] csr2,
  output logic [15:0] csr4,
  output logic [15:0] csr5,
  output logic [7:0]  clk_delay,
  output logic        jtag_tdi,
  output logic        jtag_tms,
  output logic        jtag_tck,
  input  logic        jtag_tdo,
  input  logic        fpga_done,
  // command pulses
  output logic        cmd_hard_reset,
  output logic        cmd_soft_reset,
  output logic        cmd_dll_reset,
  output logic        cmd_inject,
  output logic        cmd_txen_pulse,
  output logic        cmd_ow_reset,
  output logic        cmd_ow_read,
  output logic        cmd_ow_write0,
  output logic        cmd_ow_write1,
  output logic        cmd_ow_clear,
  // FIFO access
  output logic [2*N_TMB-1:0]  fa_wr,
  output logic [2*N_TMB-1:0]  fa_rd,
  input  logic [15:0]         fa_rdata [2*N_TMB],
  output logic [N_LINK-1:0]   fb_wr,
  output logic [N_LINK-1:0]   fb_rd,
  input  logic [15:0]         fb_rdata [N_LINK],
  input  logic                fa_full,
  input  logic                fa_empty,
  input  logic                fb_full,
  input  logic                fb_empty,
  // status
  input  logic [4:0]  csr6,
  input  logic        l1accept,
  input  logic        l1a_clear
);
  localparam logic [7:0] A_CSR0 = 8'h00, A_HRES = 8'h02, A_SRES = 8'h04, A_DLL = 8'h06;
  localparam logic [7:0] A_FA   = 8'h80, A_FB   = 8'hA4;
  localparam logic [7:0] A_CSR1 = 8'hAA, A_CSR2 = 8'hAC, A_CSR3 = 8'hAE, A_L1A = 8'hB0;
  localparam logic [7:0] A_INJ  = 8'hB2, A_TXEN = 8'hB6, A_CSR4 = 8'hB8, A_CSR5 = 8'hBA;
  localparam logic [7:0] A_CSR6 = 8'hBC, A_OWRS = 8'hC0, A_OWRD = 8'hC2, A_OWCL = 8'hC4;
  localparam logic [7:0] A_OWW0 = 8'hC6, A_OWW1 = 8'hC8;

  logic [15:0] l1a_cnt;
  logic [15:0] csr0_rd, csr3;

  always_ff @(posedge clk) begin
    if (rst) begin
      csr0 <= '0;
      csr2 <= '0;
      csr4 <= '0;
      csr5 <= '0;
    end else if (rb_wr) begin
      case (rb_addr)
        A_CSR0: csr0 <= rb_wdata;
        A_CSR2: csr2 <= rb_wdata;
        A_CSR4: csr4 <= rb_wdata;
        A_CSR5: csr5 <= rb_wdata;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {cmd_hard_reset, cmd_soft_reset, cmd_dll_reset, cmd_inject, cmd_txen_pulse} <= '0;
      {cmd_ow_reset, cmd_ow_read, cmd_ow_write0, cmd_ow_write1, cmd_ow_clear}      <= '0;
    end else begin
      cmd_hard_reset <= rb_wr && rb_addr == A_HRES;
      cmd_soft_reset <= rb_wr && rb_addr == A_SRES;
      cmd_dll_reset  <= rb_wr && rb_addr == A_DLL;
      cmd_inject     <= rb_wr && rb_addr == A_INJ;
      cmd_txen_pulse <= rb_wr && rb_addr == A_TXEN;
      cmd_ow_reset   <= rb_wr && rb_addr == A_OWRS;
      cmd_ow_read    <= rb_wr && rb_addr == A_OWRD;
      cmd_ow_clear   <= rb_wr && rb_addr == A_OWCL;
      cmd_ow_write0  <= rb_wr && rb_addr == A_OWW0;
      cmd_ow_write1  <= rb_wr && rb_addr == A_OWW1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || l1a_clear) l1a_cnt <= '0;
    else if (l1accept)    l1a_cnt <= l1a_cnt + 16'd1;
  end

  always_comb begin
    for (int h = 0; h < 2 * N_TMB; h++) begin
      fa_wr[h] = rb_wr && rb_addr == A_FA + 8'(2 * h);
      fa_rd[h] = rb_rd && rb_addr == A_FA + 8'(2 * h);
    end
    for (int k = 0; k < N_LINK; k++) begin
      fb_wr[k] = rb_wr && rb_addr == A_FB + 8'(2 * k);
      fb_rd[k] = rb_rd && rb_addr == A_FB + 8'(2 * k);
    end
  end

  always_comb begin
    csr0_rd     = csr0;
    csr0_rd[8]  = jtag_tdo;
    csr0_rd[12] = fpga_done;
    csr3        = {12'h000, fb_empty, fb_full, fa_empty, fa_full};
    rb_rdata    = '0;
    case (rb_addr)
      A_CSR0: rb_rdata = csr0_rd;
      A_CSR1: rb_rdata = FW_DATE;
      A_CSR2: rb_rdata = csr2;
      A_CSR3: rb_rdata = csr3;
      A_L1A:  rb_rdata = l1a_cnt;
      A_CSR4: rb_rdata = csr4;
      A_CSR5: rb_rdata = csr5;
      A_CSR6: rb_rdata = {11'h000, csr6};
      default: ;
    endcase
    for (int h = 0; h < 2 * N_TMB; h++)
      if (rb_addr == A_FA + 8'(2 * h)) rb_rdata = fa_rdata[h];
    for (int k = 0; k < N_LINK; k++)
      if (rb_addr == A_FB + 8'(2 * k)) rb_rdata = fb_rdata[k];
  end

  assign clk_delay = csr0[13] ? 8'h30 : csr2[15:8];
  assign jtag_tdi  = csr0[5];
  assign jtag_tms  = csr0[6];
  assign jtag_tck  = csr0[7];

endmodule
