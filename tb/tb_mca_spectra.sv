// tb_mca_spectra: the two spectrum-quality measurements run through the whole
// board: a homogeneity histogram (differential nonlinearity) and a slit-mask
// peak series (integral nonlinearity).
//
// Homogeneity: a TAC fed by two generators of slightly different period
// sweeps its output amplitude in small equal steps over the whole range. The
// testbench reproduces that sweep (a fixed amplitude step with a random
// starting phase) through the 12-bit, 1.25 Msps ADC model at 1024 channels.
// The read-back spectrum must equal the testbench's own histogram, and the
// nonuniformity, the standard deviation of the counts over their mean, is
// reported. With an ideal ADC model only the sweep's quantization remains:
// all counts must lie within one of each other.
//
// Slit mask: photons through 20 slits 0.3 mm wide at a 2 mm pitch, with
// 0.1 mm detector blur, converted at 0.2 V/mm through the 16-bit, 200 ksps ADC
// model at 2048 channels. The testbench finds each peak's centroid in the
// read-back spectrum, fits a line of centroid against slit position, and
// reports NL = max |fit - centroid| / channel range * 100 %. The spectrum
// must equal the testbench's histogram and NL must be below 0.1 %.
`timescale 1ns/1ps
module tb_mca_spectra;
  import mca_pkg::*;
  localparam logic [9:0] BASE = 10'h300;
  localparam real VFS = 10.0;

  logic clk = 0, rst_n = 0;
  real ana_in = 0.0, threshold = 0.1;
  logic adc_trig, adc_eoc;
  logic [11:0] adc_data, sram_addr;
  logic [15:0] sram_dq_out, sram_dq_in;
  logic sram_dq_oe, sram_oe_n, sram_we_n;
  logic disc_out, peak_wait, acq_en, event_done, event_missed;
  int checks = 0, failures = 0;
  int ref_hist [4096];
  int spec [4096];

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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Shaped pulse: 400 ns rise, flat top to 1.2 us, then `rest_ns` of baseline.
  // The expected channel follows the ADC transfer function of the fitted model.
  task automatic pulse(input real amp, input int rest_ns, input chan_mode_e m);
    int code;
    if (use_adc2) code = $rtoi(amp / VFS * 4096.0);
    else          code = $rtoi(amp / VFS * 65536.0) >> 4;
    if (amp > threshold) ref_hist[code >> mode_shift(m)]++;
    for (int s = 1; s <= 20; s++) begin
      ana_in = amp * s / 20.0;
      #20;
    end
    #800;
    ana_in = 0.0;
    repeat (rest_ns / 10) #10;
  endtask

  task automatic clear_and_start(input int n, input chan_mode_e m);
    isa.io_write(BASE + 0, 16'h0000);
    isa.io_write(BASE + 2, 16'd0);
    for (int i = 0; i < n; i++) isa.io_write(BASE + 4, 16'd0);
    for (int i = 0; i < 4096; i++) ref_hist[i] = 0;
    isa.io_write(BASE + 0, 16'({m, 1'b1}));
  endtask

  task automatic stop_and_read(input int n, input string tag);
    logic [15:0] d;
    int bad = 0;
    #6000;
    isa.io_write(BASE + 0, 16'h0000);
    isa.io_write(BASE + 2, 16'd0);
    for (int i = 0; i < n; i++) begin
      isa.io_read(BASE + 4, d);
      spec[i] = int'(d);
      if (spec[i] != ref_hist[i]) bad++;
    end
    check(bad == 0, $sformatf("%s: spectrum equals the expected histogram (%0d channels differ)", tag, bad));
  endtask

  // Sum of four uniform numbers: approximately normal, zero mean, unit sigma.
  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 4; i++) s += $urandom_range(0, 100000) / 100000.0 - 0.5;
    return s * 1.732;
  endfunction

  initial begin
    #100ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // ---- homogeneity histogram, 1024 channels ----
    begin
      localparam int NCH = 1024, LO = 16, NPULSE = 6000;
      real step, phase, v, sum, sum2, mean, sd;
      int n;
      use_adc2 = 1;
      clear_and_start(NCH, CH_1024);
      // the sweep covers channels LO .. NCH-1 (the lowest lie below threshold)
      step  = (NCH - LO) * 4.0 / NPULSE * 1.0007;
      phase = $urandom_range(0, 1000) / 1000.0;
      for (int k = 0; k < NPULSE; k++) begin
        v = LO * 4.0 + phase + k * step;
        if (v >= 4096.0) v -= (NCH - LO) * 4.0;
        pulse(v * VFS / 4096.0, 1000, CH_1024);
      end
      stop_and_read(NCH, "homogeneity");
      sum = 0.0; sum2 = 0.0; n = 0;
      for (int i = LO + 1; i < NCH - 1; i++) begin
        sum += spec[i]; sum2 += real'(spec[i]) * spec[i]; n++;
      end
      mean = sum / n;
      sd = (sum2 / n - mean * mean) > 0.0 ? $sqrt(sum2 / n - mean * mean) : 0.0;
      $display("homogeneity: %0d channels, mean %0.2f counts, nonuniformity %0.2f %%, statistical 1/sqrt(N) %0.2f %%",
               n, mean, 100.0 * sd / mean, 100.0 / $sqrt(mean));
      begin
        automatic int lo_c = 1 << 30, hi_c = 0;
        for (int i = LO + 1; i < NCH - 1; i++) begin
          if (spec[i] < lo_c) lo_c = spec[i];
          if (spec[i] > hi_c) hi_c = spec[i];
        end
        check(hi_c - lo_c <= 1, $sformatf("homogeneity: counts %0d..%0d, within the sweep's one-count quantization", lo_c, hi_c));
      end
    end

    // ---- slit mask, 2048 channels ----
    begin
      localparam int NSLIT = 20, PER_SLIT = 300, NCH = 2048;
      real x, cen [NSLIT], pos [NSLIT], sx, sy, sxx, sxy, a, b, r_ch, nl, worst;
      use_adc2 = 0;
      clear_and_start(NCH, CH_2048);
      for (int k = 0; k < NSLIT * PER_SLIT; k++) begin
        int s;
        s = k % NSLIT;
        x = 2.0 + 2.0 * s + ($urandom_range(0, 1000) / 1000.0 - 0.5) * 0.3 + 0.1 * gauss();
        pulse(0.5 + 0.2 * x, 4000, CH_2048);
      end
      stop_and_read(NCH, "slit mask");
      // centroid of each peak inside +-1 mm (+-41 channels) of its nominal place
      for (int s = 0; s < NSLIT; s++) begin
        real c0, w, m;
        c0 = (0.5 + 0.2 * (2.0 + 2.0 * s)) / VFS * 2048.0;
        w = 0.0; m = 0.0;
        for (int i = $rtoi(c0) - 40; i <= $rtoi(c0) + 40; i++) begin
          w += spec[i]; m += real'(spec[i]) * (i + 0.5);
        end
        cen[s] = w > 0.0 ? m / w : 0.0;
        pos[s] = 2.0 + 2.0 * s;
      end
      sx = 0; sy = 0; sxx = 0; sxy = 0;
      for (int s = 0; s < NSLIT; s++) begin
        sx += pos[s]; sy += cen[s]; sxx += pos[s] * pos[s]; sxy += pos[s] * cen[s];
      end
      b = (NSLIT * sxy - sx * sy) / (NSLIT * sxx - sx * sx);
      a = (sy - b * sx) / NSLIT;
      r_ch = cen[NSLIT - 1] - cen[0];
      worst = 0.0;
      for (int s = 0; s < NSLIT; s++) begin
        nl = (a + b * pos[s] - cen[s]);
        if (nl < 0.0) nl = -nl;
        if (nl > worst) worst = nl;
      end
      $display("slit mask: %0.2f channels per mm, peak spacing %0.2f channels, NL %0.4f %%",
               b, 2.0 * b, 100.0 * worst / r_ch);
      check(b > 40.0 && b < 42.0, "slit mask: gain near 40.96 channels per mm");
      check(100.0 * worst / r_ch < 0.1, "slit mask: integral nonlinearity below 0.1 %");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
