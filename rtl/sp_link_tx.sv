// sp_link_tx: output stage towards the TLK2501 serializers of the optical
// links to the Sector Processor.
//
// For every link the selected 32-bit muon is sent as two 16-bit frames, frame
// 1 (bits [15:0]) in the cycle after sel_stb and frame 2 (bits [31:16]) in the
// cycle after that. Before frame 2 is formed three bits are replaced:
//   * BC0 becomes the OR of the BC0 bits of all TMBs (bc0_any), independent of
//     the sorting;
//   * BX0 is the winner's BXN[0] if csr0[3] (MASKBX0) is 1, otherwise the
//     lowest bit of the internal bunch counter;
//   * ER is the OR of three masked sources: the winner's own Sync_Er (masked
//     by csr0[10]), a mismatch between the winner's BXN[0] and the counter's
//     lowest bit (masked by csr0[11]), and a BC0 check that flags a BC0 from a
//     TMB arriving while the bunch counter is not 0 (masked by csr0[2]).
// The counter is sampled once, on sel_stb, so both frames see the same value.
// The comparator only acts on links that carry vpf=1, and the BC0 check
// expects counter value 0; both are this design's reading.
//
// TX_EN of all links is low (TLK2501 IDLE) while csr0[9] is 0 and for
// TXEN_PULSE cycles after txen_pulse (L1Reset or the VME command; 3.2 us =
// 256 cycles of 80.16 MHz). With csr2[0]=1 a link is also IDLE unless it
// carries vpf=1 or a BC0 is present. TX_EN changes with frame 1.
module sp_link_tx #(
  parameter int unsigned N_LINK     = 3,
  parameter int unsigned TXEN_PULSE = 256
) (
  input  logic          clk,
  input  logic          rst,
  input  mpc_pkg::lct_t sel [N_LINK],
  input  logic          sel_stb,
  input  logic          bc0_any,
  input  logic          bxn_lsb,
  input  logic          bxn_zero,
  input  logic          mask_bc0,      // csr0[2]
  input  logic          bx0_from_tmb,  // csr0[3]
  input  logic          mask_tmb,      // csr0[10]
  input  logic          mask_comp,     // csr0[11]
  input  logic          txen_csr,      // csr0[9]
  input  logic          idle_mode,     // csr2[0]
  input  logic          txen_pulse,
  output logic [15:0]   txd   [N_LINK],
  output logic [N_LINK-1:0] tx_en,
  output logic          idle_all,
  output logic [N_LINK-1:0] link_vpf
);
  import mpc_pkg::*;

  localparam int unsigned CW = $clog2(TXEN_PULSE + 1);

  lct_t        o     [N_LINK];
  logic [15:0] f2_q  [N_LINK];
  logic [CW-1:0] pcnt;
  logic [N_LINK-1:0] idle_ok, idle_ok_q;

  always_comb begin
    for (int k = 0; k < N_LINK; k++) begin
      logic comp_err, bc0_err;
      comp_err = sel[k].vpf && (sel[k].bx0 != bxn_lsb);
      bc0_err  = bc0_any && !bxn_zero;
      o[k]     = sel[k];
      o[k].bc0 = bc0_any;
      o[k].bx0 = bx0_from_tmb ? sel[k].bx0 : bxn_lsb;
      idle_ok[k] = !idle_mode || sel[k].vpf || bc0_any;
      o[k].er  = (sel[k].er && !mask_tmb) || (comp_err && !mask_comp) || (bc0_err && !mask_bc0);
    end
  end

  always_ff @(posedge clk) begin
    if (rst)             pcnt <= '0;
    else if (txen_pulse) pcnt <= CW'(TXEN_PULSE - 1);
    else if (pcnt != '0) pcnt <= pcnt - CW'(1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N_LINK; k++) begin
        txd[k]  <= '0;
        f2_q[k] <= '0;
      end
      tx_en    <= '0;
      idle_ok_q <= '0;
      link_vpf <= '0;
    end else begin
      for (int k = 0; k < N_LINK; k++) begin
        if (sel_stb) begin
          txd[k]      <= o[k][15:0];
          f2_q[k]     <= o[k][31:16];
          link_vpf[k] <= sel[k].vpf;
        end else begin
          txd[k]      <= f2_q[k];
        end
        if (sel_stb) idle_ok_q[k] <= idle_ok[k];
        tx_en[k] <= txen_csr && !txen_pulse && (pcnt == '0) &&
                    (sel_stb ? idle_ok[k] : idle_ok_q[k]);
      end
    end
  end

  assign idle_all = (tx_en == '0);

endmodule
