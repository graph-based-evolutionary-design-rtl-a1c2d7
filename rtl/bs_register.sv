// bs_register: 1-bit register node of the bit-serial circuits.
//
// Delays an LSB-first stream by one clock, which moves every bit to the next
// higher weight: as integers, y = 2*x. A synchronous, active-high reset clears
// it so that a new word starts from zero (reset is this design's choice).
// Timing: y follows x one rising clk edge later.
// The node and its equation y = 2x are the method's; LSB-first order and the
// reset are this design's choices.
module bs_register (
  input  logic clk,
  input  logic rst,
  input  logic x,
  output logic y
);

  always_ff @(posedge clk) begin
    if (rst) y <= 1'b0;
    else     y <= x;
  end

endmodule
