// mca_trigger_gen: behavioural model of the dual-monostable ADC trigger
// generator.
//
// This is not synthesizable logic: the real part is a dual monostable
// multivibrator whose pulse widths are set by resistor-capacitor networks,
// one of them with a trimmer. The model reproduces its timing in simulation.
// The rising edge of the discriminator output fires the first monostable,
// whose pulse (500 ns by default) waits for the shaped analog pulse to reach
// its maximum. Its falling edge fires the second monostable, whose pulse is
// the ADC conversion trigger. That sequence and the 500 ns width follow the
// design description; the 100 ns trigger width, active-high polarity and
// non-retriggerable behaviour (an edge during the first pulse is ignored)
// are this model's choices.
module mca_trigger_gen #(
  parameter real DELAY_NS = 500.0,  // first monostable: wait for the peak
  parameter real TRIG_NS  = 100.0   // second monostable: ADC trigger width
) (
  input  logic disc,       // discriminator output
  output logic delay_q,    // first monostable output
  output logic trig        // ADC conversion trigger
);
  initial begin
    delay_q = 1'b0;
    trig    = 1'b0;
  end

  // A blocking wait inside the process ignores edges during the pulse.
  always @(posedge disc) begin
    delay_q <= 1'b1;
    #(DELAY_NS * 1ns);
    delay_q <= 1'b0;
  end

  always @(negedge delay_q) begin
    trig <= 1'b1;
    #(TRIG_NS * 1ns);
    trig <= 1'b0;
  end
endmodule
