// isa_bus_if: the PC side of the ISA I/O bus, with tasks that perform 16-bit
// I/O read and write cycles as a PC would (address set-up, a 500 ns strobe,
// recovery time). The card drives sd_card when sd_card_oe is high.
interface isa_bus_if;
  logic [9:0]  sa = '0;
  logic        aen = 1'b0;
  logic        ior_n = 1'b1;
  logic        iow_n = 1'b1;
  logic [15:0] sd_host = '0;
  logic [15:0] sd_card;
  logic        sd_card_oe;
  logic        iocs16_n;
  int unsigned cycles_no_response = 0;  // read cycles no card answered

  task automatic io_write(input logic [9:0] a, input logic [15:0] d);
    sa = a; sd_host = d;
    #100 iow_n = 1'b0;
    #500 iow_n = 1'b1;
    #150;
  endtask

  task automatic io_read(input logic [9:0] a, output logic [15:0] d);
    sa = a;
    #100 ior_n = 1'b0;
    #480;
    if (!sd_card_oe || iocs16_n) cycles_no_response++;
    d = sd_card_oe ? sd_card : 16'hFFFF;
    #20 ior_n = 1'b1;
    #150;
  endtask
endinterface
