// pbus_if: single-cycle peripheral register bus between the system bus
// decoder and a peripheral (AIC/TAIC, PIT, performance monitor).
//
// A transfer is one cycle with sel high: a write stores wdata at the word
// offset addr; a read returns rdata combinationally in the same cycle, and a
// read with side effects (for example the AIC vector register) takes effect
// on that clock edge. This bus protocol is this design's choice; the system
// bus of the SoC is only named, not specified.
interface pbus_if;
  logic        sel;
  logic        we;
  logic [11:0] addr;   // byte offset inside the peripheral window
  logic [31:0] wdata;
  logic [31:0] rdata;

  modport master (output sel, we, addr, wdata, input rdata);
  modport slave  (input sel, we, addr, wdata, output rdata);
endinterface
