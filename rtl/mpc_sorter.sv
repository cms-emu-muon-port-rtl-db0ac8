// mpc_sorter: selects the best N_OUT of N_IN LCTs by their 4-bit quality.
//
// Purely combinational. Input i is ranked by counting the inputs that beat
// it: input j beats i if its quality is larger, or if the qualities are equal
// and j > i. Inputs are numbered 2*t + l for TMB t (0 = TMB1, lowest slot)
// and LCT l, so a tie goes to the TMB with the larger slot number and, within
// one TMB, to LCT1 over LCT0, as the specification requires. Ranks are
// therefore unique. An input of rank r < N_OUT with non-zero quality appears
// on best[r] and sets winner[i]; LCTs of quality 0 are cancelled. Unfilled
// outputs are all zeros with best_vld=0. The ranking rule and cancelling
// follow the specification; the rank-count structure is this design's choice.
module mpc_sorter #(
  parameter int unsigned N_IN  = 18,
  parameter int unsigned N_OUT = 3
) (
  input  mpc_pkg::lct_t lct      [N_IN],
  output mpc_pkg::lct_t best     [N_OUT],
  output logic          best_vld [N_OUT],
  output logic [$clog2(N_IN)-1:0] best_idx [N_OUT],
  output logic [N_IN-1:0] winner
);
  localparam int unsigned RW = $clog2(N_IN + 1);

  logic [RW-1:0] rank [N_IN];

  always_comb begin
    for (int i = 0; i < N_IN; i++) begin
      rank[i] = '0;
      for (int j = 0; j < N_IN; j++) begin
        if (j != i) begin
          if ((lct[j].quality > lct[i].quality) ||
              ((lct[j].quality == lct[i].quality) && (j > i)))
            rank[i] = rank[i] + RW'(1);
        end
      end
    end
  end

  always_comb begin
    winner = '0;
    for (int k = 0; k < N_OUT; k++) begin
      best[k]     = '0;
      best_vld[k] = 1'b0;
      best_idx[k] = '0;
    end
    for (int i = 0; i < N_IN; i++) begin
      for (int k = 0; k < N_OUT; k++) begin
        if (lct[i].quality != 4'd0 && rank[i] == RW'(k)) begin
          best[k]     = lct[i];
          best_vld[k] = 1'b1;
          best_idx[k] = ($clog2(N_IN))'(i);
          winner[i]   = 1'b1;
        end
      end
    end
  end

endmodule
