// mca_board: the multichannel analyzer board, from analog input to PC bus.
//
// An analog pulse (for instance from a time-to-amplitude converter) enters
// the discriminator. A pulse above threshold fires the dual monostable, which
// waits 500 ns for the pulse to peak and then triggers the ADC. The ADC and
// the SRAM are commercial chips outside this module: their pins are ports.
// When the ADC signals the end of conversion, the logic device (mca_cpld)
// adds one to the SRAM word addressed by the 12 converted bits, in 200 ns.
// The PC reads the spectrum over the ISA bus.
//
// The discriminator and trigger generator are behavioural models of analog
// parts, so this module simulates but is only partly synthesizable: the
// synthesizable part is mca_cpld. The chain of parts follows the design
// description; the port names and bus splitting are this design's choices.
//
// Timing: one event occupies the logic for four 20 MHz cycles; the ADC
// conversion (about 0.8 us to 5 us for the converters considered) and the
// 500 ns peak wait dominate the time per event.
module mca_board
  import mca_pkg::*;
#(
  parameter logic [9:0]  BASE_ADDR  = 10'h300,
  parameter int unsigned ADC_BITS   = ADC_BITS_DEF,
  parameter int unsigned COUNT_W    = COUNT_W_DEF,
  parameter real         PEAK_WAIT_NS = 500.0,   // first monostable width
  parameter real         TRIG_NS      = 100.0    // ADC trigger width
) (
  input  logic                clk,          // 20 MHz oscillator
  input  logic                rst_n,
  // analog side
  input  real                 ana_in,       // input pulse, volts
  input  real                 threshold,    // discriminator threshold, volts
  // ADC chip
  output logic                adc_trig,     // start of conversion
  input  logic                adc_eoc,      // end of conversion
  input  logic [ADC_BITS-1:0] adc_data,     // the most significant ADC bits
  // SRAM chip
  output logic [ADC_BITS-1:0] sram_addr,
  output logic [COUNT_W-1:0]  sram_dq_out,
  output logic                sram_dq_oe,
  input  logic [COUNT_W-1:0]  sram_dq_in,
  output logic                sram_oe_n,
  output logic                sram_we_n,
  // ISA bus
  input  logic [9:0]          isa_sa,
  input  logic                isa_aen,
  input  logic                isa_ior_n,
  input  logic                isa_iow_n,
  input  logic [15:0]         isa_sd_in,
  output logic [15:0]         isa_sd_out,
  output logic                isa_sd_oe,
  output logic                isa_iocs16_n,
  // indicators
  output logic                disc_out,     // discriminator output
  output logic                peak_wait,    // first monostable running
  output logic                acq_en,
  output logic                event_done,
  output logic                event_missed
);

  mca_discriminator u_disc (.vin(ana_in), .vth(threshold), .out(disc_out));

  mca_trigger_gen #(.DELAY_NS(PEAK_WAIT_NS), .TRIG_NS(TRIG_NS)) u_trig (
    .disc(disc_out), .delay_q(peak_wait), .trig(adc_trig));

  mca_cpld #(.BASE_ADDR(BASE_ADDR), .ADC_BITS(ADC_BITS), .COUNT_W(COUNT_W)) u_cpld (
    .clk, .rst_n, .adc_eoc, .adc_data,
    .sram_addr, .sram_dq_out, .sram_dq_oe, .sram_dq_in, .sram_oe_n, .sram_we_n,
    .isa_sa, .isa_aen, .isa_ior_n, .isa_iow_n, .isa_sd_in, .isa_sd_out, .isa_sd_oe,
    .isa_iocs16_n, .acq_en, .event_done, .event_missed);

endmodule
