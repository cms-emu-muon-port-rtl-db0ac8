// fifo_a_bank: the nine FIFO_A test-pattern buffers.
//
// FIFO_Ai holds test data for TMBi: its low half (bits [15:0], LCT0) and high
// half (bits [31:16], LCT1) are separate 16-bit FIFOs with their own VME
// addresses, so both halves are written and read over VME independently. One
// FIFO word is one 80 MHz frame of a TMB bus, so a pattern of two LCTs takes
// two words.
//
// On `start` in Test mode the bank plays out NWORDS words (511, a whole
// buffer) from all eighteen FIFOs at once, one word per 80 MHz cycle, as
// `frame` for the TMB receiver; an empty half gives zeros. Pops are issued so
// that the first word arrives in a first-frame cycle (phase=0);
// frame_valid marks the play-out cycles and `busy` is high from start to the
// last word. A VME read of a half pops one word, whose value is on
// vme_rdata from the next cycle. The split into halves and the play-out of
// empty halves as zeros are this design's choices.
module fifo_a_bank #(
  parameter int unsigned N_TMB  = 9,
  parameter int unsigned DEPTH  = 511,
  parameter int unsigned NWORDS = 511
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               phase,
  input  logic               test_mode,
  input  logic               start,
  input  logic [2*N_TMB-1:0] vme_wr,
  input  logic [2*N_TMB-1:0] vme_rd,
  input  logic [15:0]        vme_wdata,
  output logic [15:0]        vme_rdata [2*N_TMB],
  output logic [31:0]        frame     [N_TMB],
  output logic               frame_valid,
  output logic               busy,
  output logic               any_full,
  output logic               all_empty
);
  localparam int unsigned NH = 2 * N_TMB;
  localparam int unsigned NW = $clog2(NWORDS + 1);

  logic [NH-1:0] full, empty, had, pop;
  logic          pending, playing;
  logic [NW-1:0] left;
  logic [$clog2(DEPTH+1)-1:0] cnt [NH];

  for (genvar h = 0; h < NH; h++) begin : g_half
    mpc_fifo #(.DEPTH(DEPTH), .WIDTH(16)) u_fifo (
      .clk, .rst,
      .wr_en(vme_wr[h]), .wdata(vme_wdata),
      .rd_en(vme_rd[h] || pop[h]), .rdata(vme_rdata[h]),
      .full(full[h]), .empty(empty[h]), .count(cnt[h])
    );
  end

  // pops start in a second-frame cycle, so the first word lands in phase 0
  always_ff @(posedge clk) begin
    if (rst) begin
      pending     <= 1'b0;
      playing     <= 1'b0;
      left        <= '0;
      had         <= '0;
      frame_valid <= 1'b0;
    end else begin
      if (start && test_mode && !pending && !playing) pending <= 1'b1;
      if (pending && !phase) begin
        pending <= 1'b0;
        playing <= 1'b1;
        left    <= NW'(NWORDS);
      end
      if (playing) begin
        left <= left - NW'(1);
        if (left == NW'(1)) playing <= 1'b0;
      end
      frame_valid <= playing;
      had         <= pop;
    end
  end

  always_comb begin
    for (int h = 0; h < NH; h++) pop[h] = playing && !empty[h];
    for (int t = 0; t < N_TMB; t++) begin
      frame[t][15:0]  = had[2*t]     ? vme_rdata[2*t]     : 16'h0;
      frame[t][31:16] = had[2*t + 1] ? vme_rdata[2*t + 1] : 16'h0;
    end
  end

  assign busy      = pending || playing || frame_valid;
  assign any_full  = |full;
  assign all_empty = &empty;

endmodule
