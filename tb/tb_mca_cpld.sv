// tb_mca_cpld: self-checking testbench of the complete logic device: the
// histogramming state machine and the PC interface sharing one SRAM.
//
// End-of-conversion pulses (some back to back at the 200 ns limit) are
// histogrammed while acquisition is enabled; the PC bus model then stops
// acquisition and reads the channels back through the data port. Checks: the
// read-back spectrum against the testbench's own histogram in 4096- and
// 2048-channel modes, the latency from end of conversion to the write strobe,
// that a host access requested during acquisition is held back, that no
// event is lost at four-cycle spacing, and that clearing through the data
// port empties the channels.
`timescale 1ns/1ps
module tb_mca_cpld;
  import mca_pkg::*;
  localparam int unsigned AW = 12, DW = 16;
  localparam logic [9:0] BASE = 10'h300;
  localparam int unsigned NCH = 256;   // channels exercised

  logic clk = 0, rst_n = 0;
  logic adc_eoc = 0;
  logic [AW-1:0] adc_data = '0;
  logic [AW-1:0] sram_addr;
  logic [DW-1:0] sram_dq_out, sram_dq_in;
  logic sram_dq_oe, sram_oe_n, sram_we_n, acq_en, event_done, event_missed;
  int checks = 0, failures = 0, n_done = 0, n_missed = 0, host_strobes_in_acq = 0;
  int max_latency = 0;
  logic quiet = 0;   // acquisition on, no events coming
  logic [DW-1:0] ref_hist [2**AW];

  isa_bus_if isa ();
  always #25 clk = ~clk;

  mca_cpld #(.BASE_ADDR(BASE), .ADC_BITS(AW), .COUNT_W(DW)) dut (
    .clk, .rst_n, .adc_eoc, .adc_data,
    .sram_addr, .sram_dq_out, .sram_dq_oe, .sram_dq_in, .sram_oe_n, .sram_we_n,
    .isa_sa(isa.sa), .isa_aen(isa.aen), .isa_ior_n(isa.ior_n), .isa_iow_n(isa.iow_n),
    .isa_sd_in(isa.sd_host), .isa_sd_out(isa.sd_card), .isa_sd_oe(isa.sd_card_oe),
    .isa_iocs16_n(isa.iocs16_n), .acq_en, .event_done, .event_missed);

  sram_model #(.AW(AW), .DW(DW)) mem (.addr(sram_addr), .din(sram_dq_out), .din_oe(sram_dq_oe),
    .dout(sram_dq_in), .oe_n(sram_oe_n), .we_n(sram_we_n));

  always @(posedge clk) if (rst_n) begin
    if (event_done) n_done++;
    if (event_missed) n_missed++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One event: the word appears with the end of conversion; `gap` is the
  // number of cycles to the next event.
  task automatic event_in(input logic [AW-1:0] d, input int gap, input chan_mode_e m);
    int lat;
    @(negedge clk);
    adc_data = d; adc_eoc = 1;
    ref_hist[d >> mode_shift(m)]++;
    if (gap >= 8) begin
      lat = 0;
      while (sram_we_n) begin @(posedge clk); #1; lat++; end
      if (lat > max_latency) max_latency = lat;
      repeat (gap - lat) @(negedge clk);
    end else begin
      @(negedge clk); @(negedge clk);
      repeat (gap - 2) @(negedge clk);
    end
    adc_eoc = 0;
    @(negedge clk);
    adc_eoc = 0;
  endtask

  // Read channels [0, n) through the data port and compare.
  task automatic read_back(input int n, input string tag);
    logic [15:0] d;
    int bad = 0;
    isa.io_write(BASE + 2, 16'd0);
    for (int i = 0; i < n; i++) begin
      isa.io_read(BASE + 4, d);
      if (d != 16'(ref_hist[i])) begin
        if (bad < 4) $display("  %s: channel %0d read %0d expected %0d", tag, i, d, ref_hist[i]);
        bad++;
      end
    end
    check(bad == 0, {tag, ": spectrum read back"});
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 2**AW; i++) begin mem.mem[i] = '0; ref_hist[i] = '0; end
    mem.contention = 0;

    // clear the first channels through the data port after presetting them
    for (int i = 0; i < NCH; i++) mem.mem[i] = DW'($urandom);
    isa.io_write(BASE + 2, 16'd0);
    for (int i = 0; i < NCH; i++) isa.io_write(BASE + 4, 16'd0);
    repeat (5) @(negedge clk);
    begin
      automatic int nz = 0;
      for (int i = 0; i < NCH; i++) if (mem.mem[i] != '0) nz++;
      check(nz == 0, "spectrum cleared through the data port");
    end

    // acquire in 4096-channel mode
    isa.io_write(BASE + 0, 16'h0001);
    for (int k = 0; k < 150; k++) event_in(AW'($urandom_range(0, NCH - 1)), 10 + $urandom_range(0, 10), CH_4096);
    check(max_latency <= 5, $sformatf("write strobe %0d cycles after the end of conversion", max_latency));
    // a host fetch asked for during acquisition waits
    isa.io_write(BASE + 2, 16'd3);
    for (int k = 0; k < 100; k++) event_in(AW'($urandom_range(0, NCH - 1)), 4, CH_4096);
    repeat (10) @(negedge clk);
    quiet = 1;
    repeat (40) @(negedge clk);
    quiet = 0;
    check(host_strobes_in_acq == 0, "no host memory access during acquisition");
    isa.io_read(BASE + 0, d);
    check(d[4] == 1'b1, "host fetch pending during acquisition");
    repeat (10) @(negedge clk);
    check(n_done == 250 && n_missed == 0, $sformatf("%0d of 250 events stored, %0d lost", n_done, n_missed));
    isa.io_write(BASE + 0, 16'h0000);
    read_back(NCH, "4096 channels");

    // acquire in 2048-channel mode: the word is halved
    isa.io_write(BASE + 0, 16'h0003);
    for (int k = 0; k < 150; k++) event_in(AW'($urandom_range(0, 2 * NCH - 1)), 9, CH_2048);
    isa.io_write(BASE + 0, 16'h0002);
    read_back(NCH, "2048 channels");

    check(mem.contention == 0, "no SRAM bus contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && quiet && (!sram_oe_n || !sram_we_n)) host_strobes_in_acq++;
endmodule
