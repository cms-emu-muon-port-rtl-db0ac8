// vme_slave: A24/D16 VME slave front end.
//
// The board answers to address modifiers 39h and 3Dh (A24 non-privileged
// and supervisory data) with 16-bit word transfers only: both data strobes
// must be active and LWORD* high, so byte accesses get no DTACK. The base
// address comes from geographical addressing: A[23:19] must equal the slot
// number on GA[4:0] (slot 12 gives 600000h), A[18:16] must be 0 and A[15:8]
// must equal the base-address switch setting `base_sw`. A[7:1] selects the
// register, passed on as the byte offset rb_addr; its bit 0 is always 0
// because only even (word) addresses exist.
//
// AS*, DS0*, DS1* and WRITE* are synchronised with two flip-flops; address,
// AM and data are sampled once the synchronised strobes show a transfer (they
// are stable by then under the VME rules). A write gives a one-cycle rb_wr
// and then DTACK. A read gives a one-cycle rb_rd, waits RD_WAIT cycles,
// latches rb_rdata, drives it with vme_d_oe and asserts DTACK. DTACK is
// held until the master releases the data strobes. `dack` pulses once per
// access. The address map and transfer types follow the specification; the
// synchroniser, wait states and state machine are this design's choices.
module vme_slave #(
  parameter int unsigned RD_WAIT = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  ga,
  input  logic [7:0]  base_sw,
  input  logic [23:1] vme_a,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic        vme_ds0_n,
  input  logic        vme_ds1_n,
  input  logic        vme_lword_n,
  input  logic        vme_write_n,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  output logic [7:0]  rb_addr,
  output logic        rb_wr,
  output logic        rb_rd,
  output logic [15:0] rb_wdata,
  input  logic [15:0] rb_rdata,
  output logic        dack
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ACK} state_e;

  state_e      state;
  logic [1:0]  as_s, ds0_s, ds1_s, wr_s;
  logic        strobe, match;
  logic [$clog2(RD_WAIT + 1)-1:0] wcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s  <= 2'b11;
      ds0_s <= 2'b11;
      ds1_s <= 2'b11;
      wr_s  <= 2'b11;
    end else begin
      as_s  <= {as_s[0],  vme_as_n};
      ds0_s <= {ds0_s[0], vme_ds0_n};
      ds1_s <= {ds1_s[0], vme_ds1_n};
      wr_s  <= {wr_s[0],  vme_write_n};
    end
  end

  assign strobe = !as_s[1] && !ds0_s[1] && !ds1_s[1];
  assign match  = (vme_am == 6'h39 || vme_am == 6'h3D) && vme_lword_n &&
                  (vme_a[23:19] == ga) && (vme_a[18:16] == 3'b000) &&
                  (vme_a[15:8] == base_sw);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      rb_wr       <= 1'b0;
      rb_rd       <= 1'b0;
      rb_addr     <= '0;
      rb_wdata    <= '0;
      vme_d_out   <= '0;
      vme_d_oe    <= 1'b0;
      vme_dtack_n <= 1'b1;
      wcnt        <= '0;
      dack        <= 1'b0;
    end else begin
      rb_wr <= 1'b0;
      rb_rd <= 1'b0;
      dack  <= 1'b0;
      case (state)
        S_IDLE: begin
          if (strobe && match) begin
            rb_addr  <= {vme_a[7:1], 1'b0};
            rb_wdata <= vme_d_in;
            dack     <= 1'b1;
            if (!wr_s[1]) begin
              rb_wr <= 1'b1;
              state <= S_ACK;
            end else begin
              rb_rd <= 1'b1;
              wcnt  <= '0;
              state <= S_WAIT;
            end
          end
        end
        S_WAIT: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == ($clog2(RD_WAIT + 1))'(RD_WAIT - 1)) begin
            vme_d_out <= rb_rdata;
            vme_d_oe  <= 1'b1;
            state     <= S_ACK;
          end
        end
        S_ACK: begin
          vme_dtack_n <= 1'b0;
          if (ds0_s[1] && ds1_s[1]) begin
            vme_dtack_n <= 1'b1;
            vme_d_oe    <= 1'b0;
            state       <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
