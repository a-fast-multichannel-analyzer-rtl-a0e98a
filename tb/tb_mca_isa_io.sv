// tb_mca_isa_io: self-checking testbench of the ISA I/O interface.
//
// A bus model performs PC I/O cycles, asynchronous to the 20 MHz clock, and
// an SRAM model with preset contents sits on the host memory port. Checks:
// control register write and read-back with the busy flag, no memory access
// while acquisition is enabled or the state machine is busy, reading a run of
// channels through the auto-incrementing data port (including pointer
// wrap-around), writing a run of channels (spectrum clear), the pointer read
// back, and no response with AEN high or at a foreign address.
`timescale 1ns/1ps
module tb_mca_isa_io;
  import mca_pkg::*;
  localparam int unsigned AW = 12, DW = 16;
  localparam logic [9:0] BASE = 10'h300;

  logic clk = 0, rst_n = 0, hist_busy = 0;
  logic acq_en, host_busy, mem_dq_oe, mem_rd_n, mem_wr_n;
  chan_mode_e chan_mode;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_dq_out, mem_dq_in;
  int checks = 0, failures = 0;
  int strobes_while_owned = 0;

  isa_bus_if isa ();

  always #25 clk = ~clk;

  mca_isa_io #(.BASE_ADDR(BASE), .ADC_BITS(AW), .COUNT_W(DW)) dut (
    .clk, .rst_n,
    .isa_sa(isa.sa), .isa_aen(isa.aen), .isa_ior_n(isa.ior_n), .isa_iow_n(isa.iow_n),
    .isa_sd_in(isa.sd_host), .isa_sd_out(isa.sd_card), .isa_sd_oe(isa.sd_card_oe),
    .isa_iocs16_n(isa.iocs16_n),
    .acq_en, .chan_mode, .hist_busy, .host_busy,
    .mem_addr, .mem_dq_out, .mem_dq_oe, .mem_dq_in, .mem_rd_n, .mem_wr_n);

  sram_model #(.AW(AW), .DW(DW)) mem (.addr(mem_addr), .din(mem_dq_out), .din_oe(mem_dq_oe),
    .dout(mem_dq_in), .oe_n(mem_rd_n), .we_n(mem_wr_n));

  always @(posedge clk) if (rst_n && (acq_en || hist_busy) && (!mem_rd_n || !mem_wr_n))
    strobes_while_owned++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    logic [DW-1:0] shadow [2**AW];
    int bad;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 2**AW; i++) begin
      shadow[i] = DW'($urandom);
      mem.mem[i] = shadow[i];
    end
    mem.writes = 0;

    // control register
    isa.io_write(BASE + 0, 16'h0005);
    check(acq_en == 1 && chan_mode == CH_1024, "control write");
    hist_busy = 1;
    isa.io_read(BASE + 0, d);
    check(d[3:0] == 4'b1101, $sformatf("status read %h", d));
    hist_busy = 0;

    // while acquiring, a memory fetch waits
    isa.io_write(BASE + 2, 16'd100);
    repeat (20) @(negedge clk);
    isa.io_read(BASE + 0, d);
    check(d[4] == 1'b1, "fetch pending while acquiring");
    // acquisition off but state machine still busy: still waits
    hist_busy = 1;
    isa.io_write(BASE + 0, 16'h0000);
    repeat (20) @(negedge clk);
    isa.io_read(BASE + 0, d);
    check(d[4] == 1'b1, "fetch waits for busy state machine");
    hist_busy = 0;
    repeat (10) @(negedge clk);
    isa.io_read(BASE + 0, d);
    check(d[4] == 1'b0 && d[0] == 1'b0, $sformatf("fetch done after stop, status %h", d));

    // read a run of channels, wrapping at the top
    isa.io_write(BASE + 2, 16'd4090);
    bad = 0;
    for (int k = 0; k < 40; k++) begin
      isa.io_read(BASE + 4, d);
      if (d != 16'(shadow[(4090 + k) % 4096])) begin
        if (bad < 4) $display("  channel %0d read %h expected %h", (4090 + k) % 4096, d, shadow[(4090 + k) % 4096]);
        bad++;
      end
    end
    check(bad == 0, "read run of channels");
    isa.io_read(BASE + 2, d);
    check(d == 16'd34, $sformatf("pointer after run %0d", d));

    // clear a run of channels
    isa.io_write(BASE + 2, 16'd1000);
    for (int k = 0; k < 30; k++) isa.io_write(BASE + 4, 16'(k * 3));
    repeat (10) @(negedge clk);
    bad = 0;
    for (int k = 0; k < 30; k++) if (mem.mem[1000 + k] != DW'(k * 3)) bad++;
    check(bad == 0 && mem.mem[999] == shadow[999] && mem.mem[1030] == shadow[1030], "write run of channels");
    isa.io_write(BASE + 2, 16'd1005);
    isa.io_read(BASE + 4, d);
    check(d == 16'd15, "read back a written channel");

    // AEN high and a foreign address are ignored
    isa.aen = 1;
    isa.io_write(BASE + 0, 16'h0001);
    isa.aen = 0;
    isa.io_write(10'h200, 16'h0001);
    check(acq_en == 0, "no decode with AEN or foreign address");
    check(isa.cycles_no_response == 0, "card answered every read");
    isa.io_read(10'h208, d);
    check(isa.cycles_no_response == 1, "no answer at foreign address");

    check(strobes_while_owned == 0, "no host memory strobe while the state machine owns the memory");
    check(mem.contention == 0, "no bus contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
