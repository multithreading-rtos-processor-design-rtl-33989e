// soc_bus_decoder: address decoder of the SoC system bus, with the REMAP
// feature used at boot.
//
// Out of reset the SD-Card occupies 0x0000_0000-0x7FFF_FFFF, so the boot
// loader runs from non-volatile memory, and the 256 MB RAM sits at
// 0x8000_0000-0x8FFF_FFFF. A store of any value to the REMAP window
// (0xFFFF_FD50-0xFFFF_FD5F) swaps them: RAM moves to 0x0000_0000-0x0FFF_FFFF,
// where the exception vectors then live, and the SD-Card to
// 0x1000_0000-0x8FFF_FFFF. The swap lasts until reset; the store takes
// effect at the clock edge, so an instruction already fetched still came
// from the SD-Card. Peripherals: USART 0xFFFB_0000-0xFFFB_3FFF,
// AIC 0xFFFF_F000-0xFFFF_F1FF, PIT 0xFFFF_FD30-0xFFFF_FD3F,
// PM 0xFFFF_FD80-0xFFFF_FD9F; any other address selects nothing. Decoding is
// combinational; offset is the address relative to the selected device.
// Addresses and the swap follow the SoC memory layout; reading the REMAP
// window returns the REMAP state, which is this design's choice.
module soc_bus_decoder
  import rts_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic        we,
  input  logic [31:0] addr,
  output dev_e        dev,
  output logic [31:0] offset,
  output logic        remap
);
  always_comb begin
    dev    = DEV_NONE;
    offset = '0;
    if (!remap && addr <= 32'h7FFF_FFFF) begin
      dev = DEV_SD;  offset = addr;
    end else if (!remap && addr >= 32'h8000_0000 && addr <= 32'h8FFF_FFFF) begin
      dev = DEV_RAM; offset = addr - 32'h8000_0000;
    end else if (remap && addr <= 32'h0FFF_FFFF) begin
      dev = DEV_RAM; offset = addr;
    end else if (remap && addr >= 32'h1000_0000 && addr <= 32'h8FFF_FFFF) begin
      dev = DEV_SD;  offset = addr - 32'h1000_0000;
    end else if (addr >= USART_BASE && addr <= USART_LAST) begin
      dev = DEV_USART; offset = addr - USART_BASE;
    end else if (addr >= AIC_BASE && addr <= AIC_LAST) begin
      dev = DEV_AIC;   offset = addr - AIC_BASE;
    end else if (addr >= PIT_BASE && addr <= PIT_LAST) begin
      dev = DEV_PIT;   offset = addr - PIT_BASE;
    end else if (addr >= REMAP_BASE && addr <= REMAP_LAST) begin
      dev = DEV_REMAP; offset = addr - REMAP_BASE;
    end else if (addr >= PM_BASE && addr <= PM_LAST) begin
      dev = DEV_PM;    offset = addr - PM_BASE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  remap <= 1'b0;
    else if (valid && we && dev == DEV_REMAP)    remap <= 1'b1;
  end
endmodule
