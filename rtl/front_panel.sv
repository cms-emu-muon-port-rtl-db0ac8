// front_panel: drivers for the status LEDs on the front panel.
//
// Event LEDs use a one-shot so that a single-cycle event stays visible for
// ONESHOT cycles (50 ms at 80.16 MHz by default): MUON1..3 (vpf of the three
// output patterns), HRES (hard reset), SRES (soft reset), DACK (VME access),
// IDLE (all serializers idle), RNTS (FIFO_A play-out started), L1RS (L1Reset
// decoded). Level LEDs copy their signal: DONE, TEST, TCK and the four FIFO
// flags, so these seven outputs are plain copies of inputs by intent. CLK40
// blinks from bit BLINK_BIT of a free-running counter, about 4.8 Hz at
// 80.16 MHz for bit 23. Indices into led[] are the LED_* constants
// of mpc_pkg; led bits are active high. Which LEDs have one-shots follows the
// specification; the one-shot length and counter bit are this design's
// choice.
module front_panel #(
  parameter int unsigned ONESHOT   = 4008000,
  parameter int unsigned BLINK_BIT = 23
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] muon_vpf,
  input  logic       hard_reset,
  input  logic       soft_reset,
  input  logic       dack,
  input  logic       idle,
  input  logic       run_test,
  input  logic       l1reset,
  input  logic       done,
  input  logic       test_mode,
  input  logic       tck,
  input  logic       fa_empty,
  input  logic       fb_empty,
  input  logic       fa_full,
  input  logic       fb_full,
  output logic [mpc_pkg::N_LED-1:0] led
);
  import mpc_pkg::*;

  localparam int unsigned N_OS = 9;
  logic [N_OS-1:0] trig, os;
  logic [BLINK_BIT:0] blink;

  assign trig = {l1reset, run_test, idle, dack, soft_reset, hard_reset, muon_vpf};

  for (genvar i = 0; i < N_OS; i++) begin : g_os
    oneshot #(.LEN(ONESHOT)) u_os (.clk, .rst, .trig(trig[i]), .q(os[i]));
  end

  always_ff @(posedge clk) begin
    if (rst) blink <= '0;
    else     blink <= blink + 1'b1;
  end

  always_comb begin
    led            = '0;
    led[LED_MUON1] = os[0];
    led[LED_MUON2] = os[1];
    led[LED_MUON3] = os[2];
    led[LED_HRES]  = os[3];
    led[LED_SRES]  = os[4];
    led[LED_DACK]  = os[5];
    led[LED_IDLE]  = os[6];
    led[LED_RNTS]  = os[7];
    led[LED_L1RS]  = os[8];
    led[LED_DONE]  = done;
    led[LED_TEST]  = test_mode;
    led[LED_TCK]   = tck;
    led[LED_FAEM]  = fa_empty;
    led[LED_FBEM]  = fb_empty;
    led[LED_FAFL]  = fa_full;
    led[LED_FBFL]  = fb_full;
    led[LED_CLK40] = blink[BLINK_BIT];
  end

endmodule
