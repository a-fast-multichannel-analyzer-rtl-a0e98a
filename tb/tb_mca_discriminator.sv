// tb_mca_discriminator: checks the comparator model: output high exactly
// while the input is above the threshold, after the propagation delay, for
// several thresholds, and one output pulse per input pulse above threshold.
`timescale 1ns/1ps
module tb_mca_discriminator;
  real vin = 0.0, vth = 1.0;
  logic out;
  int checks = 0, failures = 0, pulses = 0;

  mca_discriminator #(.DELAY_NS(10.0)) dut (.vin, .vth, .out);

  always @(posedge out) pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50;
    for (int t = 0; t < 3; t++) begin
      vth = 0.5 + 2.0 * t;
      #50;
      for (int k = 0; k < 20; k++) begin
        real a;
        a = $urandom_range(0, 1000) / 100.0;
        vin = a;
        #5  check(out == 1'b0 || k > 0, "output waits for the delay");
        #10 check(out == (a > vth), $sformatf("in %f th %f out %b", a, vth, out));
        vin = 0.0;
        #20 check(out == 1'b0, "output low after the pulse");
      end
    end
    pulses = 0;
    vth = 1.0;
    repeat (7) begin vin = 3.0; #40 vin = 0.2; #40; end
    repeat (5) begin vin = 0.9; #40 vin = 0.0; #40; end
    check(pulses == 7, $sformatf("%0d output pulses for 7 pulses above threshold", pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
