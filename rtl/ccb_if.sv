// ccb_if: interface to the Clock and Control Board fast control bus.
//
// The FPGA runs from one 80.16 MHz clock. This module owns the frame phase:
// `phase` is 0 in the cycle that carries the first 80 MHz frame of a bunch
// crossing and 1 in the cycle that carries the second; `bx_stb` marks the
// first-frame cycle. The CCB lines are GTLP, active low. They are 25 ns
// (one bunch crossing) pulses or levels, so they are sampled once per bunch
// crossing, on bx_stb, and turned into one-cycle active-high pulses in the
// following cycle.
//
// Commands on ccb_cmd[5:0] are decoded while ccb_cmd_strobe is active:
// 01h BC0, 03h L1Reset, 06h Start Trigger, 07h Stop Trigger, 30h inject
// FIFO_A patterns, 32h bunch counter reset (these codes are the
// specification's). The dedicated Ccb_bc0, Ccb_bcntres and Ccb_L1Reset lines
// are treated like the matching commands, Ccb_eventres clears the L1A
// counter, and the 300 ns hard-reset line gives a single pulse on its leading
// edge; those uses of the lines are this design's choice.
module ccb_if (
  input  logic       clk,
  input  logic       rst,
  // CCB fast control bus, active low
  input  logic [5:0] ccb_cmd_n,
  input  logic       ccb_cmd_strobe_n,
  input  logic       ccb_bc0_n,
  input  logic       ccb_bcntres_n,
  input  logic       ccb_evcntres_n,
  input  logic       ccb_l1accept_n,
  input  logic       ccb_l1reset_n,
  // MPC reload bus, active low
  input  logic       mpc_hard_reset_n,
  input  logic       mpc_soft_reset_n,
  // frame timing
  output logic       phase,
  output logic       bx_stb,
  // decoded one-cycle pulses
  output logic       bc0,
  output logic       l1reset,
  output logic       start_trig,
  output logic       stop_trig,
  output logic       inject,
  output logic       bcnt_reset,
  output logic       l1accept,
  output logic       evcnt_reset,
  output logic       hard_reset,
  output logic       soft_reset
);
  import mpc_pkg::*;

  logic       hard_q;
  logic [5:0] cmd;
  logic       cmd_vld;

  always_ff @(posedge clk) begin
    if (rst) phase <= 1'b0;
    else     phase <= ~phase;
  end
  assign bx_stb = ~phase;

  assign cmd     = ~ccb_cmd_n;
  assign cmd_vld = ~ccb_cmd_strobe_n;

  always_ff @(posedge clk) begin
    if (rst) begin
      {bc0, l1reset, start_trig, stop_trig, inject, bcnt_reset} <= '0;
      {l1accept, evcnt_reset, hard_reset, soft_reset}           <= '0;
      hard_q <= 1'b0;
    end else if (bx_stb) begin
      bc0         <= ~ccb_bc0_n       | (cmd_vld && cmd == CMD_BC0);
      l1reset     <= ~ccb_l1reset_n   | (cmd_vld && cmd == CMD_L1RESET);
      start_trig  <= cmd_vld && cmd == CMD_START_TRIG;
      stop_trig   <= cmd_vld && cmd == CMD_STOP_TRIG;
      inject      <= cmd_vld && cmd == CMD_INJECT;
      bcnt_reset  <= ~ccb_bcntres_n   | (cmd_vld && cmd == CMD_BCNT_RESET);
      l1accept    <= ~ccb_l1accept_n;
      evcnt_reset <= ~ccb_evcntres_n;
      soft_reset  <= ~mpc_soft_reset_n;
      hard_reset  <= ~mpc_hard_reset_n & ~hard_q;
      hard_q      <= ~mpc_hard_reset_n;
    end else begin
      {bc0, l1reset, start_trig, stop_trig, inject, bcnt_reset} <= '0;
      {l1accept, evcnt_reset, hard_reset, soft_reset}           <= '0;
    end
  end

endmodule
