// tb_cp15_cacheability: checks the cachable decision over all combinations of
// data cache, MMU, page-table bit and the added register, at memory and
// peripheral addresses, and the register's reset value and write.
module tb_cp15_cacheability;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we, periph_uncache, dcache_en, mmu_en, pte_cacheable, cacheable;
  logic [31:0] cfg_wdata, addr;
  cp15_cacheability dut (.clk, .rst_n, .cfg_we, .cfg_wdata, .periph_uncache, .dcache_en, .mmu_en,
                         .pte_cacheable, .addr, .cacheable);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] addrs [] = '{32'h0, 32'h8000_0000, 32'h8FFF_FFFF, 32'h9000_0000, 32'hFFFF_F000, 32'hFFFB_0000};

  task automatic table_check(input logic u);
    logic exp;
    for (int c = 0; c < 8; c++) foreach (addrs[i]) begin
      {dcache_en, mmu_en, pte_cacheable} = 3'(c); addr = addrs[i];
      #1 exp = !dcache_en ? 1'b0 : mmu_en ? pte_cacheable : !(u && addr >= 32'h9000_0000);
      check(cacheable == exp, $sformatf("d%0d m%0d p%0d u%0d addr %h", dcache_en, mmu_en, pte_cacheable, u, addr));
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_wdata = 0; dcache_en = 0; mmu_en = 0; pte_cacheable = 0; addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    check(!periph_uncache, "reset value 0");
    table_check(0);
    @(negedge clk); cfg_we = 1; cfg_wdata = 1;
    @(posedge clk); #1 cfg_we = 0; check(periph_uncache, "bit set");
    table_check(1);
    @(negedge clk); cfg_we = 1; cfg_wdata = 32'hFFFF_FFFE;
    @(posedge clk); #1 cfg_we = 0; check(!periph_uncache, "bit cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
