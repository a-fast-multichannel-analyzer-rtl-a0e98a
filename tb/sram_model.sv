// sram_model: behavioural model of an asynchronous static RAM chip, used by
// the testbenches as the histogram memory.
//
// Reads are combinational while oe_n is low; a write takes the data on the
// rising edge of we_n, as with a common asynchronous SRAM controlled by its
// write-enable pin. While oe_n is high the model returns all ones, so a read
// sampled at the wrong time is visible. The model counts bus contention (the
// chip and the controller driving at once) in `contention`. Contents start
// at zero.
module sram_model #(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 16
) (
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,      // data driven by the controller
  input  logic          din_oe,   // controller drives the bus
  output logic [DW-1:0] dout,     // data driven by the chip
  input  logic          oe_n,
  input  logic          we_n
);
  logic [DW-1:0] mem [2**AW];
  int unsigned   contention = 0;
  int unsigned   writes = 0;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  assign dout = !oe_n ? mem[addr] : '1;

  always @(posedge we_n) if ($time > 0) begin
    mem[addr] <= din;
    writes++;
  end

  always @(negedge oe_n) if (din_oe) contention++;
  always @(posedge din_oe) if (!oe_n) contention++;
endmodule
