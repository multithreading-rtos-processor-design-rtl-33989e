// cp15_cacheability: the added CP15 register that keeps memory-mapped
// peripherals uncachable when the data cache is on and the MMU is off.
//
// With the MMU off, ARM treats every data access as cachable once the data
// cache is enabled, which would cache peripheral registers. Setting bit 0 of
// this register makes accesses to the peripheral space (addresses from
// 0x9000_0000 up, above SD-Card and RAM in either memory layout) uncachable
// in that situation, while memory stays cachable. With the MMU on, the page
// table's cachable bit decides as usual; with the data cache off nothing is
// cachable. The register is written through the CP15 port (cfg_we) and
// resets to 0, the standard behaviour; only bit 0 of the written word is
// kept. Combinational decision.
// The register's CP15 number and the peripheral address boundary are this
// design's choices.
module cp15_cacheability (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [31:0] cfg_wdata,
  output logic        periph_uncache,
  input  logic        dcache_en,
  input  logic        mmu_en,
  input  logic        pte_cacheable,
  input  logic [31:0] addr,
  output logic        cacheable
);
  localparam logic [31:0] PERIPH_BASE = 32'h9000_0000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      periph_uncache <= 1'b0;
    else if (cfg_we) periph_uncache <= cfg_wdata[0];
  end

  always_comb begin
    if (!dcache_en)  cacheable = 1'b0;
    else if (mmu_en) cacheable = pte_cacheable;
    else             cacheable = !(periph_uncache && addr >= PERIPH_BASE);
  end
endmodule
