// z_delay: the Z unit, a W-bit register that delays its input by one cycle.
//
// It is the only storage element of every network in this library. With a
// central clock, Z x_n = x_(n-1): the value written in one cycle is read in
// the next. In the networks that take the most significant coefficient first
// the same register is labelled Z^-1; the hardware does not change.
//
// Interface: d is captured on the rising edge of clk when en is high; en low
// holds the value, so a whole network can be paused without losing state.
// clr (synchronous) empties the register, which is how the delay units are
// cleared before a new polynomial is streamed in. rst_n is an asynchronous,
// active-low reset to zero. Enable, clear and reset are this design's own
// choice of control; the networks themselves only need the clock.
module z_delay #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clr,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= d;
  end

endmodule
