// onewire_master: bus master for the DS2401 silicon serial number chip.
//
// Each VME command starts one 1-Wire slot; software sequences the protocol
// (reset and presence, eight command bits LSB first, 64 data bits) by
// polling the CSR6 status bits this module provides:
//   reset : bus low for 800 us, then released; the level is sampled
//           PRES_SAMPLE after release (0 = presence pulse seen); status[2]
//           rises RST_REC after release.
//   read  : bus low for 3 us, released, sampled at RD_SAMPLE from the start
//           of the slot; the sample goes to status[1], status[3] rises at the
//           end of the slot.
//   write0/write1 : bus low for 50 us / 12 us; status[4] rises at the end of
//           the slot.
// status = {cmd_done, read_done, init_done, data, presence}. Starting a slot
// clears its done bit, `clear` clears all five, and commands arriving while a
// slot runs are ignored. The pulse lengths are the specification's; the
// sampling instants, slot length and recovery time follow common DS2401
// practice and are this design's choice. All times are counts of the 80.16
// MHz clock. ow_in is synchronised with two flip-flops; ow_drive_low drives
// an open-drain output.
module onewire_master #(
  parameter int unsigned T_RST_LOW   = 64128,  // 800 us
  parameter int unsigned PRES_SAMPLE = 5611,   // 70 us after release
  parameter int unsigned RST_REC     = 38477,  // 480 us after release
  parameter int unsigned T_RD_LOW    = 240,    // 3 us
  parameter int unsigned RD_SAMPLE   = 1042,   // 13 us
  parameter int unsigned T_W0_LOW    = 4008,   // 50 us
  parameter int unsigned T_W1_LOW    = 962,    // 12 us
  parameter int unsigned T_SLOT      = 5611    // 70 us
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       cmd_reset,
  input  logic       cmd_read,
  input  logic       cmd_write0,
  input  logic       cmd_write1,
  input  logic       clear,
  input  logic       ow_in,
  output logic       ow_drive_low,
  output logic [4:0] status
);
  typedef enum logic [2:0] {OP_NONE, OP_RESET, OP_READ, OP_W0, OP_W1} op_e;
  localparam int unsigned TW = $clog2(T_RST_LOW + RST_REC + 1);

  op_e         op;
  logic [TW-1:0] t;
  logic [1:0]  in_s;
  logic [TW-1:0] low_end, sample_at, slot_end;

  always_ff @(posedge clk) begin
    if (rst) in_s <= 2'b11;
    else     in_s <= {in_s[0], ow_in};
  end

  always_comb begin
    low_end   = '0;
    sample_at = '0;
    slot_end  = '0;
    case (op)
      OP_RESET: begin
        low_end   = TW'(T_RST_LOW);
        sample_at = TW'(T_RST_LOW + PRES_SAMPLE);
        slot_end  = TW'(T_RST_LOW + RST_REC);
      end
      OP_READ: begin
        low_end   = TW'(T_RD_LOW);
        sample_at = TW'(RD_SAMPLE);
        slot_end  = TW'(T_SLOT);
      end
      OP_W0: begin
        low_end   = TW'(T_W0_LOW);
        slot_end  = TW'(T_SLOT);
      end
      OP_W1: begin
        low_end   = TW'(T_W1_LOW);
        slot_end  = TW'(T_SLOT);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      op           <= OP_NONE;
      t            <= '0;
      status       <= '0;
      ow_drive_low <= 1'b0;
    end else if (op == OP_NONE) begin
      t <= '0;
      if (clear) status <= '0;
      if (cmd_reset) begin
        op <= OP_RESET;  status[2] <= 1'b0;  ow_drive_low <= 1'b1;
      end else if (cmd_read) begin
        op <= OP_READ;   status[3] <= 1'b0;  ow_drive_low <= 1'b1;
      end else if (cmd_write0) begin
        op <= OP_W0;     status[4] <= 1'b0;  ow_drive_low <= 1'b1;
      end else if (cmd_write1) begin
        op <= OP_W1;     status[4] <= 1'b0;  ow_drive_low <= 1'b1;
      end
    end else begin
      t <= t + TW'(1);
      if (clear) status <= '0;
      if (t == low_end - TW'(1)) ow_drive_low <= 1'b0;
      if (op == OP_RESET && t == sample_at) status[0] <= in_s[1];
      if (op == OP_READ  && t == sample_at) status[1] <= in_s[1];
      if (t == slot_end) begin
        op <= OP_NONE;
        case (op)
          OP_RESET: status[2] <= 1'b1;
          OP_READ:  status[3] <= 1'b1;
          default:  status[4] <= 1'b1;
        endcase
      end
    end
  end

endmodule
