// fifo_b_bank: the three FIFO_B buffers that record what is sent to the
// optical links.
//
// FIFO_Bk records the muon selected for link k as two 16-bit words, frame 1
// then frame 2, taken from the selection stage (before the BC0/BX0/Sync_Er
// insertion of sp_link_tx, so a link with no muon records zeros). A pattern
// is stored when we[k] is high in the sel_stb cycle and at least two words of
// room are left, so a buffer never holds half a pattern; recording stops
// when it is full. any_full reports a buffer that cannot take another
// pattern (510 or 511 of 511 words), so the flag rises once recording
// stops. In sorter mode the same enable (vpf of the best muon) drives all
// three, which keeps them equally filled. VME can write and read
// each buffer on its own; a VME write in a cycle where the link writes is
// dropped. Read data is on vme_rdata from the cycle after the read. The point
// of capture, the two-word room check and the VME write priority are this
// design's choices.
module fifo_b_bank #(
  parameter int unsigned N_LINK = 3,
  parameter int unsigned DEPTH  = 511
) (
  input  logic              clk,
  input  logic              rst,
  input  mpc_pkg::lct_t     sel [N_LINK],
  input  logic [N_LINK-1:0] we,
  input  logic              sel_stb,
  input  logic [N_LINK-1:0] vme_wr,
  input  logic [N_LINK-1:0] vme_rd,
  input  logic [15:0]       vme_wdata,
  output logic [15:0]       vme_rdata [N_LINK],
  output logic              any_full,
  output logic              all_empty,
  output logic [N_LINK-1:0] wrote
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [N_LINK-1:0] full, empty, second, wr_en;
  logic [15:0]       wdata [N_LINK];
  logic [CW-1:0]     cnt   [N_LINK];
  logic [N_LINK-1:0] first;

  always_comb begin
    for (int k = 0; k < N_LINK; k++) begin
      first[k] = sel_stb && we[k] && (cnt[k] <= CW'(DEPTH - 2));
      if (first[k]) begin
        wr_en[k] = 1'b1;
        wdata[k] = sel[k][15:0];
      end else if (second[k]) begin
        wr_en[k] = 1'b1;
        wdata[k] = sel[k][31:16];
      end else begin
        wr_en[k] = vme_wr[k];
        wdata[k] = vme_wdata;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) second <= '0;
    else     second <= first;
  end
  assign wrote = first;

  for (genvar k = 0; k < N_LINK; k++) begin : g_link
    mpc_fifo #(.DEPTH(DEPTH), .WIDTH(16)) u_fifo (
      .clk, .rst,
      .wr_en(wr_en[k]), .wdata(wdata[k]),
      .rd_en(vme_rd[k]), .rdata(vme_rdata[k]),
      .full(full[k]), .empty(empty[k]), .count(cnt[k])
    );
  end

  // full: some buffer has no room left for another two-word pattern
  always_comb begin
    any_full = 1'b0;
    for (int k = 0; k < N_LINK; k++) any_full |= full[k] || (cnt[k] > CW'(DEPTH - 2));
  end
  assign all_empty = &empty;

endmodule
