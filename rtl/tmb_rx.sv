// tmb_rx: receiver for the nine Trigger Motherboard data buses.
//
// Each TMB drives 32 lines at 80 MHz. In the first frame of a bunch crossing
// lines [15:0] carry frame 1 of LCT0 and lines [31:16] frame 1 of LCT1; the
// second frame carries frame 2 of both in the same way. In Test mode
// (test_sel=1) the FIFO_A play-out replaces the TMB lines; with no play-out
// running the input is then all zeros. The source is registered once, the
// first frame is held, and after the second frame both 32-bit LCTs of every
// TMB are presented together for one bunch crossing with a one-cycle
// lct_stb. `phase` is the frame index of the data on the input lines in the
// current cycle (0 = first frame). Frame layout follows the specification;
// the single input register is this design's choice.
//
// Latency: frame 2 on the input in cycle c gives lct_stb in cycle c+2.
module tmb_rx #(
  parameter int unsigned N_TMB = 9
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               phase,
  input  logic [31:0]        tmb        [N_TMB],
  input  logic               test_sel,
  input  logic [31:0]        fifo_frame [N_TMB],
  input  logic               fifo_valid,
  output mpc_pkg::lct_t      lct        [2*N_TMB],
  output logic               lct_stb
);
  logic [31:0] in_q [N_TMB];
  logic [31:0] f1_q [N_TMB];
  logic        ph_q;

  always_ff @(posedge clk) begin
    for (int t = 0; t < N_TMB; t++) begin
      if (!test_sel)       in_q[t] <= tmb[t];
      else if (fifo_valid) in_q[t] <= fifo_frame[t];
      else                 in_q[t] <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph_q    <= 1'b0;
      lct_stb <= 1'b0;
      for (int t = 0; t < N_TMB; t++) begin
        f1_q[t]       <= '0;
        lct[2*t]      <= '0;
        lct[2*t + 1]  <= '0;
      end
    end else begin
      ph_q    <= phase;
      lct_stb <= ph_q;
      for (int t = 0; t < N_TMB; t++) begin
        if (!ph_q) begin
          f1_q[t] <= in_q[t];
        end else begin
          lct[2*t]     <= {in_q[t][15:0],  f1_q[t][15:0]};
          lct[2*t + 1] <= {in_q[t][31:16], f1_q[t][31:16]};
        end
      end
    end
  end

endmodule
