// ds2401_model: behavioural model of the DS2401 silicon serial number chip
// for simulation only, not synthesizable logic.
//
// It watches the 1-Wire bus level `bus` and pulls it low through `drive_low`.
// Times are clock cycles of `clk`. A low period of at least RESET_MIN cycles
// is a reset: PD_WAIT cycles after the master releases the bus the model
// sends a PD_LEN-cycle presence pulse and waits for a command. In command
// state every slot is one bit, LSB first: a low period shorter than W_THRESH
// is a 1, a longer one a 0. After eight bits it records the command; 33h or
// 0Fh (Read ROM) switches to data state, where at the start of each slot a
// 0 bit of the ROM is answered by holding the bus low for HOLD cycles. The ROM
// is {CRC, 8'h00, serial[39:0], family 8'h01}, sent LSB first; the CRC is the
// 1-Wire CRC-8 (x^8 + x^5 + x^4 + 1) of the first seven bytes. Low periods
// the model causes itself (its presence pulse, its 0 data bits) are not
// taken as master slots. `resets` counts reset pulses, `last_cmd` holds the
// last complete command byte.
// The ROM layout, family code, CRC and LSB-first order follow the
// specification; the slot thresholds are parameters chosen per testbench.
module ds2401_model #(
  parameter int unsigned RESET_MIN = 200,
  parameter int unsigned PD_WAIT   = 20,
  parameter int unsigned PD_LEN    = 100,
  parameter int unsigned W_THRESH  = 25,
  parameter int unsigned HOLD      = 30,
  parameter logic [39:0] SERIAL    = 40'h12_3456_789A
) (
  input  logic clk,
  input  logic bus,
  output logic drive_low,
  output logic [63:0] rom,
  output logic [7:0]  last_cmd,
  output int          resets
);
  typedef enum {ST_IDLE, ST_CMD, ST_DATA} st_e;
  st_e st = ST_IDLE;
  int low_len = 0, pd_t = -1, hold_t = 0, nbits = 0, bit_i = 0;
  logic bus_q = 1;
  bit   master_slot = 0;
  logic [7:0] cmd = 0;

  function automatic logic [7:0] crc8(input logic [55:0] d);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 0; i < 56; i++) begin
      logic fb;
      fb = c[0] ^ d[i];
      c = c >> 1;
      if (fb) c = c ^ 8'h8C;
    end
    return c;
  endfunction

  initial begin
    rom = {crc8({8'h00, SERIAL, 8'h01}), 8'h00, SERIAL, 8'h01};
    drive_low = 0;
    last_cmd = 0;
    resets = 0;
  end

  always @(posedge clk) begin
    bus_q <= bus;
    if (!bus) low_len <= low_len + 1;
    // falling edge: slot start, by the master unless the model drives
    if (bus_q && !bus) master_slot <= !drive_low;
    if (bus_q && !bus && st == ST_DATA && hold_t == 0 && pd_t < 0) begin
      if (!rom[bit_i]) begin drive_low <= 1; hold_t <= HOLD; end
      bit_i <= (bit_i + 1) % 64;
    end
    if (hold_t > 0) begin
      hold_t <= hold_t - 1;
      if (hold_t == 1) drive_low <= 0;
    end
    // rising edge: end of the master's low period
    if (!bus_q && bus && !drive_low && master_slot) begin
      if (low_len >= RESET_MIN) begin
        pd_t   <= PD_WAIT + PD_LEN;
        st     <= ST_CMD;
        nbits  <= 0;
        bit_i  <= 0;
        resets <= resets + 1;
      end else if (st == ST_CMD) begin
        logic [7:0] c;
        c = {(low_len < W_THRESH) ? 1'b1 : 1'b0, cmd[7:1]};
        cmd <= c;
        nbits <= nbits + 1;
        if (nbits == 7) begin
          last_cmd <= c;
          st <= (c == 8'h33 || c == 8'h0F) ? ST_DATA : ST_IDLE;
        end
      end
      low_len <= 0;
    end else if (bus) begin
      low_len <= 0;
    end
    if (pd_t >= 0) begin
      pd_t <= pd_t - 1;
      if (pd_t == PD_LEN) drive_low <= 1;
      if (pd_t == 0)      begin drive_low <= 0; pd_t <= -1; end
    end
  end
endmodule
