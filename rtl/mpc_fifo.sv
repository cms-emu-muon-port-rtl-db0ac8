// mpc_fifo: synchronous FIFO used for the FIFO_A and FIFO_B test buffers.
//
// DEPTH words of WIDTH bits (511 x 16 as in the specification), held in a
// plain array so that it maps to a block RAM. A write is taken when wr_en is
// high and the FIFO is not full; a read when rd_en is high and it is not
// empty. Read data is registered: it appears on rdata in the cycle after the
// accepted read and stays until the next one. `count` is the fill level.
// After reset the FIFO is empty (empty=1, full=0). Pointers wrap at DEPTH,
// which need not be a power of two. The synchronous reset is this design's
// choice.
module mpc_fifo #(
  parameter int unsigned DEPTH = 511,
  parameter int unsigned WIDTH = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rdata,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
    if (do_rd) rdata     <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + AW'(1);
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + AW'(1);
      case ({do_wr, do_rd})
        2'b10:   count <= count + CW'(1);
        2'b01:   count <= count - CW'(1);
        default: count <= count;
      endcase
    end
  end

endmodule
