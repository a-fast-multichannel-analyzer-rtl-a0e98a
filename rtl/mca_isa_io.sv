// mca_isa_io: PC (ISA bus) I/O interface of the multichannel analyzer.
//
// The board sits on the ISA bus of a PC; the PC controls acquisition and reads
// the spectrum from the histogram SRAM with I/O instructions. The design
// description gives only that function; the register map, the handshake and
// the way the memory is shared are this implementation's choices:
//
//   byte offset 0  CTRL  write: bit 0 acquisition enable, bits 2:1 channel
//                        mode (0: 4096, 1: 2048, 2: 1024 channels).
//                        read: the same, plus bit 3 state machine busy and
//                        bit 4 a memory access still pending.
//   byte offset 2  ADDR  memory pointer (channel number), read/write.
//                        Writing it fetches that channel's count.
//   byte offset 4  DATA  read: the count fetched for the pointer; the pointer
//                        then advances and the next count is fetched.
//                        write: the count is stored at the pointer, which
//                        then advances (used to clear the spectrum).
// All registers are 16-bit I/O ports (IOCS16# is asserted on a hit) in an
// 8-byte window at BASE_ADDR; AEN high (DMA) masks the decode. Address bit
// 0 is not decoded, since every register is a 16-bit word.
//
// The ISA strobes are asynchronous to the 20 MHz clock. They pass two-flop
// synchronizers; the register offset and write data are taken when a
// synchronized strobe is seen low (an ISA I/O strobe lasts far longer than
// three clock cycles). Read data are driven combinationally from registers
// while IOR# is low, so a read never waits for the SRAM: the count is fetched
// ahead of time. The memory belongs to the histogramming state machine while
// acquisition is enabled or it is busy; a pending host access waits until
// acquisition is stopped and the machine is idle, so the PC reads a stable
// spectrum. A host access takes three cycles: address set-up, strobe low,
// strobe high with address and data held.
module mca_isa_io
  import mca_pkg::*;
#(
  parameter logic [9:0]  BASE_ADDR = 10'h300,        // I/O base address
  parameter int unsigned ADC_BITS  = ADC_BITS_DEF,   // memory address width
  parameter int unsigned COUNT_W   = COUNT_W_DEF     // count width, at most 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // ISA bus (the data bus split into in, out and enable for the pad buffer)
  input  logic [9:0]          isa_sa,
  input  logic                isa_aen,
  input  logic                isa_ior_n,
  input  logic                isa_iow_n,
  input  logic [15:0]         isa_sd_in,
  output logic [15:0]         isa_sd_out,
  output logic                isa_sd_oe,
  output logic                isa_iocs16_n,
  // control of the state machine
  output logic                acq_en,
  output chan_mode_e          chan_mode,
  input  logic                hist_busy,
  // host side of the SRAM port
  output logic                host_busy,   // host owns the memory port
  output logic [ADC_BITS-1:0] mem_addr,
  output logic [COUNT_W-1:0]  mem_dq_out,
  output logic                mem_dq_oe,
  input  logic [COUNT_W-1:0]  mem_dq_in,
  output logic                mem_rd_n,
  output logic                mem_wr_n
);

  typedef enum logic [2:0] {
    H_IDLE, H_RSETUP, H_READ, H_WSETUP, H_WRITE, H_WHOLD
  } host_state_e;

  initial assert (COUNT_W <= 16) else $error("COUNT_W must fit the 16-bit ISA data bus");

  // ---- address decode (combinational, as the bus requires) ----
  logic      hit;
  host_reg_e bus_reg;
  assign hit     = !isa_aen && (isa_sa[9:3] == BASE_ADDR[9:3]);
  assign bus_reg = host_reg_e'(isa_sa[2:1]);

  // ---- registers ----
  logic [ADC_BITS-1:0] ptr_q;
  logic [COUNT_W-1:0]  rdata_q, wdata_q;
  logic                pend_rd_q, pend_wr_q;
  host_state_e         hs_q, hs_d;
  ctrl_reg_t           status;

  assign status = '{pending: pend_rd_q | pend_wr_q, busy: hist_busy,
                    mode: chan_mode, acq_en: acq_en};

  always_comb begin
    isa_sd_out = '0;
    unique case (bus_reg)
      REG_CTRL: isa_sd_out = 16'(status);
      REG_ADDR: isa_sd_out = 16'(ptr_q);
      REG_DATA: isa_sd_out = 16'(rdata_q);
      default:  isa_sd_out = '0;
    endcase
  end
  assign isa_sd_oe    = hit && !isa_ior_n;
  assign isa_iocs16_n = !hit;

  // ---- strobe synchronizers (active-high after inversion) ----
  logic [2:0] ior_s, iow_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ior_s <= '0;
      iow_s <= '0;
    end else begin
      ior_s <= {ior_s[1:0], !isa_ior_n};
      iow_s <= {iow_s[1:0], !isa_iow_n};
    end
  end
  logic ior_start, ior_end, iow_start;
  assign ior_start = ior_s[1] & ~ior_s[2];
  assign ior_end   = ~ior_s[1] & ior_s[2];
  assign iow_start = iow_s[1] & ~iow_s[2];

  // Offset of the current read cycle, kept until its end.
  logic      rd_hit_q;
  host_reg_e rd_reg_q;

  // ---- host memory sequencer ----
  logic mem_free, start_wr, start_rd, op_done_wr, op_done_rd;
  assign mem_free   = !acq_en && !hist_busy;
  assign start_wr   = (hs_q == H_IDLE) && mem_free && pend_wr_q;
  assign start_rd   = (hs_q == H_IDLE) && mem_free && !pend_wr_q && pend_rd_q;
  assign op_done_wr = (hs_q == H_WHOLD);
  assign op_done_rd = (hs_q == H_READ);

  always_comb begin
    hs_d = hs_q;
    unique case (hs_q)
      H_IDLE:   if (start_wr) hs_d = H_WSETUP;
                else if (start_rd) hs_d = H_RSETUP;
      H_RSETUP: hs_d = H_READ;
      H_READ:   hs_d = H_IDLE;
      H_WSETUP: hs_d = H_WRITE;
      H_WRITE:  hs_d = H_WHOLD;
      H_WHOLD:  hs_d = H_IDLE;
      default:  hs_d = H_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acq_en    <= 1'b0;
      chan_mode <= CH_4096;
      ptr_q     <= '0;
      rdata_q   <= '0;
      wdata_q   <= '0;
      pend_rd_q <= 1'b0;
      pend_wr_q <= 1'b0;
      rd_hit_q  <= 1'b0;
      rd_reg_q  <= REG_NONE;
      hs_q      <= H_IDLE;
      mem_addr  <= '0;
      mem_rd_n  <= 1'b1;
      mem_wr_n  <= 1'b1;
      mem_dq_oe <= 1'b0;
    end else begin
      hs_q <= hs_d;

      // memory accesses (a bus cycle in the same clock overrides below)
      if (start_wr || start_rd) mem_addr <= ptr_q;
      if (op_done_rd) begin
        rdata_q   <= mem_dq_in;   // rising edge of the read strobe
        pend_rd_q <= 1'b0;
      end
      if (op_done_wr) begin
        ptr_q     <= ptr_q + 1'b1;
        pend_wr_q <= 1'b0;
        pend_rd_q <= 1'b1;        // fetch the next channel
      end
      // bus cycles
      if (iow_start && hit) begin
        unique case (bus_reg)
          REG_CTRL: begin
            acq_en    <= isa_sd_in[0];
            chan_mode <= chan_mode_e'(isa_sd_in[2:1]);
          end
          REG_ADDR: begin
            ptr_q     <= isa_sd_in[ADC_BITS-1:0];
            pend_rd_q <= 1'b1;
          end
          REG_DATA: begin
            wdata_q   <= isa_sd_in[COUNT_W-1:0];
            pend_wr_q <= 1'b1;
          end
          default: ;
        endcase
      end
      if (ior_start) begin
        rd_hit_q <= hit;
        rd_reg_q <= bus_reg;
      end
      if (ior_end && rd_hit_q && rd_reg_q == REG_DATA) begin
        ptr_q     <= ptr_q + 1'b1;
        pend_rd_q <= 1'b1;
      end

      mem_rd_n  <= !(hs_d == H_READ);
      mem_wr_n  <= !(hs_d == H_WRITE);
      mem_dq_oe <= (hs_d == H_WSETUP) || (hs_d == H_WRITE) || (hs_d == H_WHOLD);
    end
  end

  assign mem_dq_out = wdata_q;
  assign host_busy  = (hs_q != H_IDLE);

  a_no_host_during_acq: assert property (@(posedge clk) disable iff (!rst_n)
    (hs_q == H_IDLE && hs_d != H_IDLE) |-> !acq_en && !hist_busy);
  a_strobes_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(!mem_rd_n && !mem_wr_n));

endmodule
