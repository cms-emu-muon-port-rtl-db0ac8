// bx_counter: the MPC's own bunch crossing counter.
//
// L1Reset or Bunch Counter Reset loads the preset value held in CSR5.
// Start Trigger arms the counter; the BC0 that follows starts it, so that it
// first advances on the next bunch crossing (BC1). Stop Trigger stops it.
// While running it advances once per bunch crossing, on bx_stb, and wraps
// after ORBIT-1 to 0. The load/arm/start/stop behaviour follows the
// specification; the 12-bit width and the wrap at the LHC orbit length are
// this design's choice. All inputs are one-cycle pulses from ccb_if; a load
// takes priority over counting.
module bx_counter #(
  parameter int unsigned ORBIT = 3564
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bx_stb,
  input  logic [11:0] preset,
  input  logic        load,
  input  logic        start_trig,
  input  logic        stop_trig,
  input  logic        bc0,
  output logic [11:0] bxn,
  output logic        running
);
  logic armed;

  always_ff @(posedge clk) begin
    if (rst) begin
      armed   <= 1'b0;
      running <= 1'b0;
    end else if (stop_trig) begin
      armed   <= 1'b0;
      running <= 1'b0;
    end else if (start_trig) begin
      armed   <= 1'b1;
    end else if (armed && bc0) begin
      running <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                   bxn <= '0;
    else if (load)             bxn <= preset;
    else if (running && bx_stb) bxn <= (bxn == 12'(ORBIT - 1)) ? 12'd0 : bxn + 12'd1;
  end

endmodule
