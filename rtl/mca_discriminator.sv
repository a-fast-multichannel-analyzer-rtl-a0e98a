// mca_discriminator: behavioural model of the analog input discriminator.
//
// This is not synthesizable logic: the real part is an analog comparator on
// the board, and this model stands in for it in simulation. The output is
// high while the analog input is above the adjustable threshold (a trimmed
// reference voltage on the board), so every pulse above threshold yields one
// digital pulse. Input and threshold are real-valued voltages. The
// comparator function follows the design description; the propagation delay
// (10 ns by default) and the absence of hysteresis are this model's choices.
module mca_discriminator #(
  parameter real DELAY_NS = 10.0   // comparator propagation delay
) (
  input  real  vin,        // analog input, volts
  input  real  vth,        // threshold, volts
  output logic out         // high while vin > vth
);
  initial out = 1'b0;

  always @(vin, vth) out <= #(DELAY_NS * 1ns) (vin > vth);
endmodule
