// mca_pkg: types and constants shared by the multichannel-analyzer logic.
//
// The analyzer histograms pulse amplitudes: every converted amplitude is used
// as an address into an external SRAM whose word at that address is a count.
// The default sizes follow the design description: 12 ADC bits give 4096
// channels, and the logic runs from a 20 MHz clock so that one event is
// processed in four cycles (200 ns). The 16-bit count width, the channel-mode
// encoding and the I/O register map are this implementation's choices.
package mca_pkg;

  // Number of ADC bits latched by the logic (the 12 most significant bits of
  // the converter) and width of one histogram count.
  localparam int unsigned ADC_BITS_DEF = 12;
  localparam int unsigned COUNT_W_DEF  = 16;

  // Number of channels in use. Fewer channels drop least significant ADC bits.
  typedef enum logic [1:0] {
    CH_4096 = 2'd0,
    CH_2048 = 2'd1,
    CH_1024 = 2'd2   // code 3 is reserved and behaves as CH_4096
  } chan_mode_e;

  // States of the histogramming state machine; each busy state lasts one
  // clock cycle.
  typedef enum logic [2:0] {
    HS_IDLE    = 3'd0,  // waiting for an end of conversion
    HS_LATCH   = 3'd1,  // ADC word latched, address set up, strobes idle
    HS_READ    = 3'd2,  // first pulse: memory read strobe low
    HS_WRITE   = 3'd3,  // second pulse: memory write strobe low
    HS_RECOVER = 3'd4   // write strobe released (write edge), data held
  } hist_state_e;

  // Word offsets of the host I/O registers (byte offset = 2 * word offset).
  typedef enum logic [1:0] {
    REG_CTRL = 2'd0,  // control and status
    REG_ADDR = 2'd1,  // memory pointer
    REG_DATA = 2'd2,  // memory data, pointer auto-increments
    REG_NONE = 2'd3
  } host_reg_e;

  // Control register fields as seen by the host.
  typedef struct packed {
    logic       pending;   // read-only: a host memory access is waiting
    logic       busy;      // read-only: the state machine is processing an event
    chan_mode_e mode;      // number of channels
    logic       acq_en;    // 1: acquire events, memory belongs to the state machine
  } ctrl_reg_t;

  // Right shift applied to the ADC word for a channel mode.
  function automatic int unsigned mode_shift(chan_mode_e m);
    case (m)
      CH_2048: return 1;
      CH_1024: return 2;
      default: return 0;
    endcase
  endfunction

endpackage
