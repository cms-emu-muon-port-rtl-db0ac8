// oneshot: retriggerable pulse stretcher for a front panel LED.
//
// A one-cycle (or longer) trigger makes `q` high for LEN clock cycles after
// the trigger last went away, so short events stay visible. LEN is chosen by
// the user of the module.
module oneshot #(
  parameter int unsigned LEN = 4008000
) (
  input  logic clk,
  input  logic rst,
  input  logic trig,
  output logic q
);
  logic [$clog2(LEN + 1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)       cnt <= '0;
    else if (trig) cnt <= ($clog2(LEN + 1))'(LEN);
    else if (cnt != '0) cnt <= cnt - 1'b1;
  end
  assign q = (cnt != '0);

endmodule
