// Tripled system reset.
//
// The card's reset reaches the FPGA on three pins.  Each pin is registered in
// its own flip-flop at 40 MHz and a two-out-of-three vote of the three flops is
// registered once more to form the system reset, so a single upset flop or a
// single faulty pin can neither cause nor mask a reset.  Tripling the reset
// follows the card description; the extra output register and the
// active-high polarity are this design's choices.
//
// Timing: rst follows a majority of the pins after two clock edges.
module reset_tmr (
  input  logic       clk,
  input  logic [2:0] rst_pin,   // three copies of the reset, active high
  output logic       rst        // voted system reset, active high
);
  logic [2:0] rst_q;
  logic       vote;

  always_ff @(posedge clk) rst_q <= rst_pin;

  assign vote = (rst_q[0] & rst_q[1]) | (rst_q[0] & rst_q[2]) | (rst_q[1] & rst_q[2]);

  always_ff @(posedge clk) rst <= vote;
endmodule
