// muon_select: picks the muons for the optical links and the winner bits.
//
// In sorter mode (csr4[0]=0) link k carries the k-th best LCT from
// mpc_sorter, winner bits mark the selected LCTs, and the vpf of the best
// muon is the FIFO_B write enable of all links, so the three FIFO_B buffers
// stay equally filled. In transparent mode (csr4[0]=1) the 5-bit fields
// csr4[5:1], csr4[10:6] and csr4[15:11] name the source of links 1, 2 and 3:
// code n = 1..18 selects muon n, i.e. LCT (n-1)%2 of TMB (n+1)/2; code 0
// disables the link. Quality 0 is not cancelled there; a winner bit and the
// link's own FIFO_B write enable follow the vpf of the selected LCT.
//
// Both modes are registered in the same stage, so the latency does not depend
// on the mode: the result appears with sel_stb, one cycle after lct_stb, and
// stays for the bunch crossing. bc0_any is the OR of the BC0 bits of all
// LCTs, passed on regardless of the selection. winner_frame carries the
// winner bits of the TMBs' LCT0 in the cycle after sel_stb and those of LCT1
// in the cycle after that, in step with the link frames. Codes 19..31 select
// nothing (this design's choice, the specification lists 0..18 only).
module muon_select #(
  parameter int unsigned N_TMB  = 9,
  parameter int unsigned N_LINK = 3
) (
  input  logic          clk,
  input  logic          rst,
  input  mpc_pkg::lct_t lct    [2*N_TMB],
  input  logic          lct_stb,
  input  logic [15:0]   csr4,
  output mpc_pkg::lct_t sel    [N_LINK],
  output logic [N_LINK-1:0] sel_we,
  output logic [2*N_TMB-1:0] sel_winner,
  output logic          bc0_any,
  output logic          sel_stb,
  output logic [N_TMB-1:0] winner_frame
);
  import mpc_pkg::*;
  localparam int unsigned N_IN = 2 * N_TMB;

  lct_t                    best     [N_LINK];
  logic                    best_vld [N_LINK];
  logic [$clog2(N_IN)-1:0] best_idx [N_LINK];
  logic [N_IN-1:0]         sort_win;

  lct_t              nxt_sel [N_LINK];
  logic [N_LINK-1:0] nxt_we;
  logic [N_IN-1:0]   nxt_win;
  logic              nxt_bc0;

  mpc_sorter #(.N_IN(N_IN), .N_OUT(N_LINK)) u_sorter (
    .lct(lct), .best(best), .best_vld(best_vld), .best_idx(best_idx), .winner(sort_win)
  );

  always_comb begin
    nxt_bc0 = 1'b0;
    for (int i = 0; i < N_IN; i++) nxt_bc0 |= lct[i].bc0;
    nxt_win = '0;
    nxt_we  = '0;
    for (int k = 0; k < N_LINK; k++) nxt_sel[k] = '0;
    if (!csr4[0]) begin
      nxt_win = sort_win;
      for (int k = 0; k < N_LINK; k++) begin
        nxt_sel[k] = best[k];
        nxt_we[k]  = best[0].vpf;
      end
    end else begin
      for (int k = 0; k < N_LINK; k++) begin
        for (int m = 0; m < N_IN; m++) begin
          if (32'(csr4[5*k + 1 +: 5]) == m + 1) begin
            nxt_sel[k]  = lct[m];
            nxt_we[k]   = lct[m].vpf;
            nxt_win[m]  = nxt_win[m] | lct[m].vpf;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N_LINK; k++) sel[k] <= '0;
      sel_we       <= '0;
      sel_winner   <= '0;
      bc0_any      <= 1'b0;
      sel_stb      <= 1'b0;
      winner_frame <= '0;
    end else begin
      sel_stb <= lct_stb;
      if (lct_stb) begin
        sel        <= nxt_sel;
        sel_we     <= nxt_we;
        sel_winner <= nxt_win;
        bc0_any    <= nxt_bc0;
      end
      for (int t = 0; t < N_TMB; t++)
        winner_frame[t] <= sel_stb ? sel_winner[2*t] : sel_winner[2*t + 1];
    end
  end

endmodule
