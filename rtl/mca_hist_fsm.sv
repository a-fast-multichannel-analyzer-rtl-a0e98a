// mca_hist_fsm: histogramming state machine of the multichannel analyzer.
//
// When the ADC signals the end of a conversion, the machine latches the ADC
// word, uses it as the address of a channel in the external SRAM, reads the
// count stored there, adds one and writes it back. This read-increment-write
// takes four 20 MHz clock cycles, so the dead time per event is 200 ns and the
// logic alone could accept 5 million events per second; the ADC conversion
// time is the real limit.
//
// Cycle by cycle, counted from the clock edge that latches the ADC word:
//   1 LATCH   address driven, both strobes high (address set-up)
//   2 READ    first pulse: mem_rd_n low; the SRAM drives the count. On the
//             edge that ends this cycle (rising edge of the pulse) the count
//             plus one is captured.
//   3 WRITE   second pulse: mem_wr_n low, the incremented count driven.
//   4 RECOVER mem_wr_n back high; its rising edge stores the count in the
//             SRAM. Address and data are held one more cycle. An end of
//             conversion seen in this cycle already starts the next event, so
//             back-to-back events are accepted every four cycles.
// The four-cycle sequence, the two pulses and the edges on which the address
// is read, the count incremented and written follow the design description.
// These are this implementation's choices: the strobes are active-low
// registered outputs; adc_eoc is asynchronous and passes a two-flop
// synchronizer, its rising edge being the event (two cycles of latency, not
// dead time); an end of conversion arriving in cycles 1 to 3 is dropped and
// reported on `missed`; `chan_mode` selects 4096, 2048 or 1024 channels by
// dropping least significant ADC bits; a count wraps from all ones to zero.
//
// Interface: adc_data must be stable from adc_eoc rising until the LATCH
// edge (ADCs hold their output register until the next conversion).
// `event_done` pulses for one cycle in the RECOVER cycle of every event.
module mca_hist_fsm
  import mca_pkg::*;
#(
  parameter int unsigned ADC_BITS = ADC_BITS_DEF,  // latched ADC bits (address width)
  parameter int unsigned COUNT_W  = COUNT_W_DEF    // width of one count
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,      // acquisition enabled
  input  chan_mode_e          chan_mode,
  // ADC
  input  logic                adc_eoc,     // end of conversion, asynchronous
  input  logic [ADC_BITS-1:0] adc_data,
  // SRAM port
  output logic [ADC_BITS-1:0] mem_addr,
  output logic [COUNT_W-1:0]  mem_dq_out,
  output logic                mem_dq_oe,
  input  logic [COUNT_W-1:0]  mem_dq_in,
  output logic                mem_rd_n,
  output logic                mem_wr_n,
  // status
  output logic                busy,        // an event is being processed
  output logic                event_done,  // one-cycle pulse per stored event
  output logic                missed       // one-cycle pulse: event lost while busy
);

  hist_state_e         state_q, state_d;
  logic [2:0]          eoc_sync_q;
  logic                eoc_rise;
  logic [ADC_BITS-1:0] addr_q;
  logic [COUNT_W-1:0]  count_q;

  // Two flops to synchronize, a third to find the rising edge.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) eoc_sync_q <= '0;
    else        eoc_sync_q <= {eoc_sync_q[1:0], adc_eoc};
  end
  assign eoc_rise = eoc_sync_q[1] & ~eoc_sync_q[2];

  logic accept;
  assign accept = eoc_rise && enable &&
                  (state_q == HS_IDLE || state_q == HS_RECOVER);

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      HS_IDLE:    if (accept) state_d = HS_LATCH;
      HS_LATCH:   state_d = HS_READ;
      HS_READ:    state_d = HS_WRITE;
      HS_WRITE:   state_d = HS_RECOVER;
      HS_RECOVER: state_d = accept ? HS_LATCH : HS_IDLE;
      default:    state_d = HS_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= HS_IDLE;
      addr_q     <= '0;
      count_q    <= '0;
      mem_rd_n   <= 1'b1;
      mem_wr_n   <= 1'b1;
      mem_dq_oe  <= 1'b0;
      event_done <= 1'b0;
      missed     <= 1'b0;
    end else begin
      state_q <= state_d;
      if (accept) addr_q <= adc_data >> mode_shift(chan_mode);
      // rising edge of the read pulse: capture the count plus one
      if (state_q == HS_READ) count_q <= mem_dq_in + COUNT_W'(1);
      mem_rd_n   <= !(state_d == HS_READ);
      mem_wr_n   <= !(state_d == HS_WRITE);
      mem_dq_oe  <= (state_d == HS_WRITE) || (state_d == HS_RECOVER);
      event_done <= (state_d == HS_RECOVER);
      missed     <= eoc_rise && enable && !accept;
    end
  end

  assign mem_addr   = addr_q;
  assign mem_dq_out = count_q;
  assign busy       = (state_q != HS_IDLE);

  // The two strobes are never low together, and the bus is driven while writing.
  a_strobes_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(!mem_rd_n && !mem_wr_n));
  a_drive_on_write: assert property (@(posedge clk) disable iff (!rst_n)
    !mem_wr_n |-> mem_dq_oe);
  // One event occupies exactly four cycles.
  a_four_cycles: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == HS_LATCH |=> state_q == HS_READ ##1 state_q == HS_WRITE
                            ##1 state_q == HS_RECOVER);

endmodule
