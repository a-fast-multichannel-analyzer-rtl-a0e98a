// adc_model: behavioural model of a sampling ADC as used on the analyzer
// board. A rising edge of `trig` samples the analog input; after CONV_NS the
// code appears on `data` and `eoc` rises (eoc is low during a conversion,
// like a busy pin). Triggers during a conversion, and for ACQ_NS after it
// (the track-and-hold acquisition time), are ignored, so the throughput is
// 1 / (CONV_NS + ACQ_NS). The input range is 0 V to VFS; codes saturate at
// both ends.
module adc_model #(
  parameter int unsigned BITS    = 16,
  parameter real         VFS     = 10.0,
  parameter real         CONV_NS = 4000.0,
  parameter real         ACQ_NS  = 0.0
) (
  input  real              vin,
  input  logic             trig,
  output logic             eoc,
  output logic [BITS-1:0]  data
);
  int unsigned conversions = 0;
  realtime     ready_at = 0;
  initial begin
    eoc = 1'b1;
    data = '0;
  end

  always @(posedge trig) if ($realtime >= ready_at) begin
    real v, c;
    v = vin;
    ready_at = $realtime + (CONV_NS + ACQ_NS) * 1ns;
    eoc = 1'b0;
    #(CONV_NS * 1ns);
    c = v / VFS * (2.0 ** BITS);
    if (c < 0.0) data = '0;
    else if (c >= 2.0 ** BITS) data = '1;
    else data = BITS'($rtoi(c));
    conversions++;
    eoc = 1'b1;
  end
endmodule
