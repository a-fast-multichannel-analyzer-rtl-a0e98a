// mca_cpld: the digital logic of the multichannel analyzer, as programmed
// into the board's programmable logic device.
//
// It holds the histogramming state machine (mca_hist_fsm), the PC interface
// (mca_isa_io) and the multiplexer that gives the single SRAM port to one of
// them. Apart from the ADC, the SRAM and the 20 MHz clock, nothing else is
// needed on the digital side: every event is stored by hardware, with no
// processor involved.
//
// Memory ownership: while the PC interface runs a memory access (host_busy)
// the port is the interface's; otherwise it is the state machine's. The
// interface starts an access only when acquisition is disabled and the state
// machine is idle, and the state machine is held off while the interface
// owns the port, so the two never collide. The state machine's enable is the
// acquisition-enable bit of the control register.
//
// The SRAM data bus is split into dq_in, dq_out and dq_oe for the I/O pad;
// the strobes are active-low and registered in both sources.
module mca_cpld
  import mca_pkg::*;
#(
  parameter logic [9:0]  BASE_ADDR = 10'h300,
  parameter int unsigned ADC_BITS  = ADC_BITS_DEF,
  parameter int unsigned COUNT_W   = COUNT_W_DEF
) (
  input  logic                clk,          // 20 MHz
  input  logic                rst_n,
  // ADC
  input  logic                adc_eoc,
  input  logic [ADC_BITS-1:0] adc_data,
  // SRAM
  output logic [ADC_BITS-1:0] sram_addr,
  output logic [COUNT_W-1:0]  sram_dq_out,
  output logic                sram_dq_oe,
  input  logic [COUNT_W-1:0]  sram_dq_in,
  output logic                sram_oe_n,    // read strobe
  output logic                sram_we_n,    // write strobe
  // ISA bus
  input  logic [9:0]          isa_sa,
  input  logic                isa_aen,
  input  logic                isa_ior_n,
  input  logic                isa_iow_n,
  input  logic [15:0]         isa_sd_in,
  output logic [15:0]         isa_sd_out,
  output logic                isa_sd_oe,
  output logic                isa_iocs16_n,
  // status, for indicators and test
  output logic                acq_en,
  output logic                event_done,
  output logic                event_missed
);

  chan_mode_e chan_mode;
  logic hist_busy, host_busy, hist_en;

  logic [ADC_BITS-1:0] h_addr, p_addr;
  logic [COUNT_W-1:0]  h_dq, p_dq;
  logic h_oe, p_oe, h_rd_n, p_rd_n, h_wr_n, p_wr_n;

  assign hist_en = acq_en && !host_busy;

  mca_hist_fsm #(.ADC_BITS(ADC_BITS), .COUNT_W(COUNT_W)) u_hist (
    .clk, .rst_n, .enable(hist_en), .chan_mode,
    .adc_eoc, .adc_data,
    .mem_addr(h_addr), .mem_dq_out(h_dq), .mem_dq_oe(h_oe), .mem_dq_in(sram_dq_in),
    .mem_rd_n(h_rd_n), .mem_wr_n(h_wr_n),
    .busy(hist_busy), .event_done, .missed(event_missed));

  mca_isa_io #(.BASE_ADDR(BASE_ADDR), .ADC_BITS(ADC_BITS), .COUNT_W(COUNT_W)) u_isa (
    .clk, .rst_n,
    .isa_sa, .isa_aen, .isa_ior_n, .isa_iow_n, .isa_sd_in, .isa_sd_out, .isa_sd_oe, .isa_iocs16_n,
    .acq_en, .chan_mode, .hist_busy, .host_busy,
    .mem_addr(p_addr), .mem_dq_out(p_dq), .mem_dq_oe(p_oe), .mem_dq_in(sram_dq_in),
    .mem_rd_n(p_rd_n), .mem_wr_n(p_wr_n));

  always_comb begin
    if (host_busy) begin
      sram_addr   = p_addr;
      sram_dq_out = p_dq;
      sram_dq_oe  = p_oe;
      sram_oe_n   = p_rd_n;
      sram_we_n   = p_wr_n;
    end else begin
      sram_addr   = h_addr;
      sram_dq_out = h_dq;
      sram_dq_oe  = h_oe;
      sram_oe_n   = h_rd_n;
      sram_we_n   = h_wr_n;
    end
  end

  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
    !(host_busy && hist_busy));

endmodule
