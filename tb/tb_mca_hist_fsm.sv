// tb_mca_hist_fsm: self-checking testbench of the histogramming state machine.
//
// A 20 MHz clock drives the machine; an SRAM model holds the histogram. The
// testbench sends end-of-conversion pulses with ADC words and keeps its own
// histogram, predicting which events are dropped from the four-cycle dead
// time alone. It checks: the whole histogram in each channel mode; the
// four-cycle busy time of an isolated event and its strobe sequence
// (set-up, READ pulse, WRITE pulse, hold); back-to-back events every four
// cycles with none lost; events every three cycles with every second one
// lost; events ignored while acquisition is disabled; and a count wrapping
// from all ones to zero.
`timescale 1ns/1ps
module tb_mca_hist_fsm;
  import mca_pkg::*;
  localparam int unsigned AW = 12, DW = 16;

  logic clk = 0, rst_n = 0, enable = 0;
  chan_mode_e chan_mode = CH_4096;
  logic adc_eoc = 0;
  logic [AW-1:0] adc_data = '0;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_dq_out, mem_dq_in;
  logic mem_dq_oe, mem_rd_n, mem_wr_n, busy, event_done, missed;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_done = 0, n_missed = 0;
  logic [DW-1:0] ref_hist [2**AW];
  longint last_acc;

  always #25 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (rst_n && event_done) n_done++;
    if (rst_n && missed) n_missed++;
  end

  mca_hist_fsm #(.ADC_BITS(AW), .COUNT_W(DW)) dut (.*);
  sram_model #(.AW(AW), .DW(DW)) mem (.addr(mem_addr), .din(mem_dq_out), .din_oe(mem_dq_oe),
    .dout(mem_dq_in), .oe_n(mem_rd_n), .we_n(mem_wr_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One end of conversion: the word changes with the rising edge of adc_eoc,
  // which stays high for `high` cycles and low for `low` cycles.
  task automatic send(input logic [AW-1:0] d, input int high, input int low);
    @(negedge clk);
    adc_data = d; adc_eoc = 1;
    if (enable) begin
      if (cycle - last_acc >= 4) begin
        ref_hist[d >> mode_shift(chan_mode)]++;
        last_acc = cycle;
      end
    end
    repeat (high) @(negedge clk);
    adc_eoc = 0;
    repeat (low - 1) @(negedge clk);
  endtask

  task automatic compare_all(input string tag);
    int bad = 0;
    for (int i = 0; i < 2**AW; i++) if (mem.mem[i] != ref_hist[i]) begin
      if (bad < 5) $display("  %s: channel %0d holds %0d, expected %0d", tag, i, mem.mem[i], ref_hist[i]);
      bad++;
    end
    check(bad == 0, {tag, ": histogram contents"});
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, d0, m0, busy_cycles;
    logic [2:0] strobes [4];
    for (int i = 0; i < 2**AW; i++) ref_hist[i] = '0;
    last_acc = -100;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // forget whatever the strobes did before reset reached them
    for (int i = 0; i < 2**AW; i++) mem.mem[i] = '0;
    mem.writes = 0;
    mem.contention = 0;

    // disabled: nothing is stored
    send(12'd100, 2, 10);
    repeat (8) @(negedge clk);
    check(n_done == 0 && mem.writes == 0, "no event stored while disabled");

    // isolated event: busy for exactly four cycles
    enable = 1;
    fork
      send(12'd7, 2, 12);
      begin
        busy_cycles = 0;
        wait (busy);
        while (busy) begin
          if (busy_cycles < 4) strobes[busy_cycles] = {mem_rd_n, mem_wr_n, mem_dq_oe};
          @(posedge clk); #1; busy_cycles++;
        end
      end
    join
    check(busy_cycles == 4, $sformatf("isolated event busy %0d cycles, expected 4", busy_cycles));
    // cycle 1 set-up, cycle 2 READ pulse, cycle 3 WRITE pulse, cycle 4 hold
    check(strobes[0] == 3'b110 && strobes[1] == 3'b010 && strobes[2] == 3'b101 && strobes[3] == 3'b111,
          $sformatf("strobe sequence %b %b %b %b (rd_n wr_n oe)", strobes[0], strobes[1], strobes[2], strobes[3]));

    // random events, spaced out, full 4096 channels
    for (int k = 0; k < 300; k++) send(12'($urandom), 1 + $urandom_range(0, 2), 6 + $urandom_range(0, 4));
    repeat (10) @(negedge clk);
    compare_all("4096 channels");
    check(n_missed == 0, "no event lost when spaced out");

    // back-to-back every four cycles: none lost, 200 ns per event
    d0 = n_done; m0 = n_missed;
    for (int k = 0; k < 40; k++) send(12'($urandom_range(0, 63)), 2, 2);
    repeat (10) @(negedge clk);
    check(n_done - d0 == 40 && n_missed == m0,
          $sformatf("4-cycle spacing: %0d stored, %0d lost", n_done - d0, n_missed - m0));

    // every three cycles: every second event falls in the dead time
    d0 = n_done; m0 = n_missed;
    for (int k = 0; k < 40; k++) send(12'($urandom_range(0, 63)), 1, 2);
    repeat (10) @(negedge clk);
    check(n_done - d0 == 20 && n_missed - m0 == 20,
          $sformatf("3-cycle spacing: %0d stored, %0d lost", n_done - d0, n_missed - m0));
    compare_all("after bursts");

    // 2048 and 1024 channels
    chan_mode = CH_2048;
    for (int k = 0; k < 200; k++) send(12'($urandom), 1, 6);
    chan_mode = CH_1024;
    for (int k = 0; k < 200; k++) send(12'($urandom), 1, 6);
    repeat (10) @(negedge clk);
    compare_all("2048/1024 channels");

    // count wraps from all ones to zero
    chan_mode = CH_4096;
    mem.mem[12'hABC] = '1; ref_hist[12'hABC] = '1;
    send(12'hABC, 1, 8);
    repeat (4) @(negedge clk);
    check(mem.mem[12'hABC] == '0, "count wraps to zero");
    check(mem.contention == 0, "no bus contention");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
