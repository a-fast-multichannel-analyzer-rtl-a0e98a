// tb_mca_rate: counting-rate test of the whole board (counts registered
// against input pulse rate).
//
// A pulse generator feeds the board fixed-amplitude pulses (flat top 560 ns)
// at a set period, for each of two ADC models: a 16-bit converter at 200 ksps
// (4 us conversion plus 1 us acquisition) and a 12-bit one at 1.25 Msps
// (0.8 us). After each rate point the PC reads the count of the pulse's
// channel over the bus. The testbench predicts that count with its own
// timing model of the chain: a pulse is converted when the first monostable
// is free at its discriminator edge and the ADC is ready at the trigger
// 500 ns later. The measured rate must follow the input rate up to the ADC's
// maximum and saturate above it; the logic itself must never drop an event.
`timescale 1ns/1ps
module tb_mca_rate;
  import mca_pkg::*;
  localparam logic [9:0] BASE = 10'h300;
  localparam real VFS = 10.0;
  localparam int  CH  = 2000;          // 12-bit channel of the pulses
  localparam int  NP  = 60;            // pulses per rate point

  logic clk = 0, rst_n = 0;
  real ana_in = 0.0, threshold = 0.5;
  logic adc_trig, adc_eoc;
  logic [11:0] adc_data, sram_addr;
  logic [15:0] sram_dq_out, sram_dq_in;
  logic sram_dq_oe, sram_oe_n, sram_we_n;
  logic disc_out, peak_wait, acq_en, event_done, event_missed;
  int checks = 0, failures = 0, n_missed = 0;

  isa_bus_if isa ();
  always #25 clk = ~clk;

  logic use_adc2 = 0;
  logic eoc1, eoc2;
  logic [15:0] data1;
  logic [11:0] data2;
  adc_model #(.BITS(16), .VFS(VFS), .CONV_NS(4000.0), .ACQ_NS(1000.0)) adc1 (
    .vin(ana_in), .trig(adc_trig & ~use_adc2), .eoc(eoc1), .data(data1));
  adc_model #(.BITS(12), .VFS(VFS), .CONV_NS(800.0)) adc2 (
    .vin(ana_in), .trig(adc_trig & use_adc2), .eoc(eoc2), .data(data2));
  assign adc_eoc  = use_adc2 ? eoc2 : eoc1;
  assign adc_data = use_adc2 ? data2 : data1[15:4];

  mca_board dut (
    .clk, .rst_n, .ana_in, .threshold,
    .adc_trig, .adc_eoc, .adc_data,
    .sram_addr, .sram_dq_out, .sram_dq_oe, .sram_dq_in, .sram_oe_n, .sram_we_n,
    .isa_sa(isa.sa), .isa_aen(isa.aen), .isa_ior_n(isa.ior_n), .isa_iow_n(isa.iow_n),
    .isa_sd_in(isa.sd_host), .isa_sd_out(isa.sd_card), .isa_sd_oe(isa.sd_card_oe),
    .isa_iocs16_n(isa.iocs16_n),
    .disc_out, .peak_wait, .acq_en, .event_done, .event_missed);

  sram_model #(.AW(12), .DW(16)) mem (.addr(sram_addr), .din(sram_dq_out), .din_oe(sram_dq_oe),
    .dout(sram_dq_in), .oe_n(sram_oe_n), .we_n(sram_we_n));

  always @(posedge clk) if (rst_n && event_missed) n_missed++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected conversions for NP pulses of period `per_ns`, ADC cycle `cyc_ns`.
  function automatic int predict(input int per_ns, input int cyc_ns);
    int mono_free = -1000000, adc_free = -1000000;
    int n = 0;
    for (int k = 0; k < NP; k++) begin
      int edge_t, trig_t;
      edge_t = k * per_ns + 10;      // comparator delay
      if (edge_t >= mono_free) begin
        mono_free = edge_t + 500;
        trig_t = edge_t + 500;
        if (trig_t >= adc_free) begin
          adc_free = trig_t + cyc_ns;
          n++;
        end
      end
    end
    return n;
  endfunction

  task automatic rate_point(input int per_ns, input int cyc_ns, input string adc);
    logic [15:0] d;
    int expect_n;
    real amp;
    // clear the channel, acquire, stop, read
    isa.io_write(BASE + 2, 16'(CH));
    isa.io_write(BASE + 4, 16'd0);
    isa.io_write(BASE + 0, 16'h0001);
    amp = (CH + 0.5) * VFS / 4096.0;
    for (int k = 0; k < NP; k++) begin
      ana_in = amp;
      #560;
      ana_in = 0.0;
      repeat (per_ns - 560) #1;
    end
    #6000;
    isa.io_write(BASE + 0, 16'h0000);
    isa.io_write(BASE + 2, 16'(CH));
    isa.io_read(BASE + 4, d);
    expect_n = predict(per_ns, cyc_ns);
    $display("%s: input %7.1f kHz, registered %7.1f kHz (%0d of %0d pulses)", adc,
             1.0e6 / per_ns, 1.0e6 / per_ns * d / NP, d, NP);
    check(d == 16'(expect_n), $sformatf("%s period %0d ns: %0d counts, expected %0d", adc, per_ns, d, expect_n));
    if (per_ns > cyc_ns + 20) check(d == 16'(NP), $sformatf("%s period %0d ns: below the ADC limit every pulse counts", adc, per_ns));
  endtask

  initial begin
    #40ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    use_adc2 = 0;
    rate_point(20000, 5000, "ADC 16-bit");
    rate_point(8000, 5000, "ADC 16-bit");
    rate_point(5100, 5000, "ADC 16-bit");
    rate_point(4300, 5000, "ADC 16-bit");
    rate_point(2700, 5000, "ADC 16-bit");
    rate_point(1700, 5000, "ADC 16-bit");
    use_adc2 = 1;
    rate_point(4000, 800, "ADC 12-bit");
    rate_point(1500, 800, "ADC 12-bit");
    rate_point(900, 800, "ADC 12-bit");
    rate_point(730, 800, "ADC 12-bit");
    rate_point(610, 800, "ADC 12-bit");
    check(n_missed == 0, "the logic never dropped an event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
