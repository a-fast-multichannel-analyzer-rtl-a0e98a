// tb_mca_board: end-to-end test of the analyzer board at its default sizes
// (12-bit channels, 16-bit counts, 4096-channel SRAM).
//
// Analog pulses with a 400 ns rise and a flat top go through the
// discriminator, the 500 ns peak wait, an ADC model and the logic into the
// SRAM model; the PC bus model clears the spectrum, starts and stops
// acquisition and reads the spectrum back. Two ADC models stand in for the
// two converters considered: a 16-bit one at 200 ksps (4 us conversion, 1 us
// acquisition) of which the 12 most significant bits are used, and a 12-bit
// one at 1.25 Msps (0.8 us conversion). Each pulse amplitude is placed in the
// middle of a channel, so the expected channel is known without the design.
//
// Phases: (A) 16-bit ADC, 4096 channels, full clear and full read-back;
// (B) 12-bit ADC, 1024 channels; (C) 12-bit ADC, 2048 channels. Pulses below
// threshold are mixed in and must not be counted. Mechanisms counted, each
// of which must occur: sub-threshold rejection, stored events, channel-mode
// switches, a host fetch held back during acquisition, spectrum clear and
// read-back through the auto-incrementing data port, use of both ADCs.
`timescale 1ns/1ps
module tb_mca_board;
  import mca_pkg::*;
  localparam int unsigned AW = 12, DW = 16;
  localparam logic [9:0] BASE = 10'h300;
  localparam real VFS = 10.0;
  localparam real VTH = 0.1;

  logic clk = 0, rst_n = 0;
  real ana_in = 0.0, threshold = VTH;
  logic adc_trig, adc_eoc;
  logic [AW-1:0] adc_data;
  logic [AW-1:0] sram_addr;
  logic [DW-1:0] sram_dq_out, sram_dq_in;
  logic sram_dq_oe, sram_oe_n, sram_we_n;
  logic disc_out, peak_wait, acq_en, event_done, event_missed;

  int checks = 0, failures = 0;
  int n_done = 0, n_missed = 0, n_rejected = 0, n_mode_switch = 0, n_held = 0;
  int n_cleared = 0, n_read = 0, n_adc1 = 0, n_adc2 = 0, max_latency = 0;
  logic [DW-1:0] ref_hist [2**AW];

  isa_bus_if isa ();
  always #25 clk = ~clk;

  // ---- the two ADC models; `use_adc2` selects which one is fitted ----
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

  sram_model #(.AW(AW), .DW(DW)) mem (.addr(sram_addr), .din(sram_dq_out), .din_oe(sram_dq_oe),
    .dout(sram_dq_in), .oe_n(sram_oe_n), .we_n(sram_we_n));

  always @(posedge clk) if (rst_n) begin
    if (event_done) n_done++;
    if (event_missed) n_missed++;
  end

  // cycles from the end of conversion to the stored event
  always @(posedge adc_eoc) if (rst_n && acq_en) begin
    int lat;
    lat = 0;
    while (!event_done && lat < 20) begin @(posedge clk); #1; lat++; end
    if (lat > max_latency) max_latency = lat;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One shaped pulse of the given amplitude: 400 ns linear rise, flat top to
  // 1.2 us, then back to zero; `rest_ns` of baseline follow.
  task automatic pulse(input real amp, input int rest_ns);
    for (int s = 1; s <= 20; s++) begin
      ana_in = amp * s / 20.0;
      #20;
    end
    #800;
    ana_in = 0.0;
    repeat (rest_ns / 10) #10;
  endtask

  // A pulse in the middle of 12-bit channel c, counted in the reference.
  task automatic event_pulse(input int c, input chan_mode_e m, input int rest_ns);
    ref_hist[c >> mode_shift(m)]++;
    if (use_adc2) n_adc2++; else n_adc1++;
    pulse((c + 0.5) * VFS / 4096.0, rest_ns);
  endtask

  task automatic set_ctrl(input logic acq, input chan_mode_e m);
    isa.io_write(BASE + 0, 16'({m, acq}));
  endtask

  task automatic clear_spectrum(input int n);
    isa.io_write(BASE + 2, 16'd0);
    for (int i = 0; i < n; i++) begin
      isa.io_write(BASE + 4, 16'd0);
      ref_hist[i] = '0;
      n_cleared++;
    end
  endtask

  task automatic read_spectrum(input int n, input string tag);
    logic [15:0] d;
    int bad = 0;
    isa.io_write(BASE + 2, 16'd0);
    for (int i = 0; i < n; i++) begin
      isa.io_read(BASE + 4, d);
      n_read++;
      if (d != 16'(ref_hist[i])) begin
        if (bad < 4) $display("  %s: channel %0d read %0d expected %0d", tag, i, d, ref_hist[i]);
        bad++;
      end
    end
    check(bad == 0, $sformatf("%s: %0d channels read back", tag, n));
  endtask

  initial begin
    #60ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    int sub, d0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // the SRAM powers up with arbitrary contents
    for (int i = 0; i < 2**AW; i++) begin mem.mem[i] = DW'($urandom); ref_hist[i] = mem.mem[i]; end
    mem.contention = 0;

    // ---- A: 16-bit ADC, 4096 channels ----
    clear_spectrum(4096);
    set_ctrl(1'b1, CH_4096);
    sub = 0;
    for (int k = 0; k < 300; k++) begin
      if (k % 15 == 7) begin
        pulse(VTH * 0.5, 5000);     // below threshold
        sub++;
      end else begin
        event_pulse($urandom_range(64, 4095), CH_4096, 5000);
      end
      if (k == 150) begin
        isa.io_write(BASE + 2, 16'd10);   // fetch asked for while acquiring
        isa.io_read(BASE + 0, d);
        if (d[4]) n_held++;
      end
    end
    n_rejected += sub;
    #6000;
    check(n_done == n_adc1, $sformatf("A: %0d events stored for %0d pulses above threshold", n_done, n_adc1));
    check(adc1.conversions == n_adc1, $sformatf("A: %0d conversions, sub-threshold pulses not converted", adc1.conversions));
    set_ctrl(1'b0, CH_4096);
    read_spectrum(4096, "A 4096 channels");

    // ---- B: 12-bit ADC, 1024 channels ----
    use_adc2 = 1;
    clear_spectrum(1024);
    set_ctrl(1'b1, CH_1024);
    n_mode_switch++;
    d0 = n_done;
    for (int k = 0; k < 300; k++) begin
      if (k % 20 == 3) begin pulse(VTH * 0.8, 1000); n_rejected++; end
      else event_pulse($urandom_range(64, 4095), CH_1024, 1000);
    end
    #2000;
    set_ctrl(1'b0, CH_1024);
    read_spectrum(1024, "B 1024 channels");

    // ---- C: 12-bit ADC, 2048 channels ----
    clear_spectrum(2048);
    set_ctrl(1'b1, CH_2048);
    n_mode_switch++;
    for (int k = 0; k < 200; k++) event_pulse($urandom_range(64, 4095), CH_2048, 1000);
    #2000;
    set_ctrl(1'b0, CH_2048);
    read_spectrum(2048, "C 2048 channels");
    check(n_done == n_adc1 + n_adc2, $sformatf("%0d events stored, %0d pulses above threshold", n_done, n_adc1 + n_adc2));

    // ---- timing and mechanisms ----
    check(max_latency <= 7, $sformatf("event stored %0d cycles after the end of conversion", max_latency));
    check(n_missed == 0, "no event lost in the logic's dead time");
    check(mem.contention == 0, "no SRAM bus contention");
    check(isa.cycles_no_response == 0, "card answered every bus read");
    $display("mechanisms: stored=%0d rejected=%0d mode_switches=%0d held_fetch=%0d cleared=%0d read=%0d adc1=%0d adc2=%0d",
             n_done, n_rejected, n_mode_switch, n_held, n_cleared, n_read, n_adc1, n_adc2);
    check(n_done > 0, "mechanism: events stored");
    check(n_rejected > 0, "mechanism: sub-threshold pulses rejected");
    check(n_mode_switch >= 2, "mechanism: channel-mode switches");
    check(n_held > 0, "mechanism: host fetch held during acquisition");
    check(n_cleared > 0 && n_read > 0, "mechanism: clear and read-back");
    check(n_adc1 > 0 && n_adc2 > 0, "mechanism: both ADCs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
