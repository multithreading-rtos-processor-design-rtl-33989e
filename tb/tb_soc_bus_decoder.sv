// tb_soc_bus_decoder: checks every region of the memory map before and after
// REMAP against a reference model, with region edges and random addresses;
// also that a read of the REMAP window does not swap, a store does, and the
// swap stays until reset.
module tb_soc_bus_decoder;
  import rts_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic valid, we, remap;
  logic [31:0] addr, offset;
  dev_e dev;
  soc_bus_decoder dut (.clk, .rst_n, .valid, .we, .addr, .dev, .offset, .remap);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic void model(input logic [31:0] a, input logic rm, output dev_e d, output logic [31:0] o);
    d = DEV_NONE; o = 0;
    if (!rm) begin
      if (a < 32'h8000_0000) begin d = DEV_SD; o = a; end
      else if (a < 32'h9000_0000) begin d = DEV_RAM; o = a - 32'h8000_0000; end
    end else begin
      if (a < 32'h1000_0000) begin d = DEV_RAM; o = a; end
      else if (a < 32'h9000_0000) begin d = DEV_SD; o = a - 32'h1000_0000; end
    end
    if (a >= 32'hFFFB_0000 && a < 32'hFFFB_4000) begin d = DEV_USART; o = a - 32'hFFFB_0000; end
    if (a >= 32'hFFFF_F000 && a < 32'hFFFF_F200) begin d = DEV_AIC; o = a - 32'hFFFF_F000; end
    if (a >= 32'hFFFF_FD30 && a < 32'hFFFF_FD40) begin d = DEV_PIT; o = a - 32'hFFFF_FD30; end
    if (a >= 32'hFFFF_FD50 && a < 32'hFFFF_FD60) begin d = DEV_REMAP; o = a - 32'hFFFF_FD50; end
    if (a >= 32'hFFFF_FD80 && a < 32'hFFFF_FDA0) begin d = DEV_PM; o = a - 32'hFFFF_FD80; end
  endfunction

  logic [31:0] edges [] = '{32'h0, 32'h0FFF_FFFF, 32'h1000_0000, 32'h7FFF_FFFF, 32'h8000_0000,
                            32'h8FFF_FFFF, 32'h9000_0000, 32'hFFFA_FFFF, 32'hFFFB_0000, 32'hFFFB_3FFF,
                            32'hFFFB_4000, 32'hFFFF_EFFF, 32'hFFFF_F000, 32'hFFFF_F1FF, 32'hFFFF_F200,
                            32'hFFFF_FD2F, 32'hFFFF_FD30, 32'hFFFF_FD3F, 32'hFFFF_FD40, 32'hFFFF_FD50,
                            32'hFFFF_FD5F, 32'hFFFF_FD60, 32'hFFFF_FD80, 32'hFFFF_FD9F, 32'hFFFF_FDA0,
                            32'hFFFF_FFFF};

  task automatic sweep(input logic rm);
    dev_e d; logic [31:0] o;
    foreach (edges[i]) begin
      addr = edges[i]; #1 model(addr, rm, d, o);
      check(dev == d && offset == o, $sformatf("addr %h remap %0d: dev %0d off %h", addr, rm, dev, offset));
    end
    repeat (500) begin
      addr = $urandom;
      if ($urandom_range(1) != 0) addr = {20'hFFFFF, 12'($urandom)};
      #1 model(addr, rm, d, o);
      check(dev == d && offset == o, $sformatf("rand addr %h remap %0d", addr, rm));
    end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 0; we = 0; addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    check(!remap, "boot layout");
    sweep(0);
    @(negedge clk); valid = 1; we = 0; addr = 32'hFFFF_FD50;
    @(posedge clk); #1 check(!remap, "read of REMAP window does not swap");
    @(negedge clk); we = 1; addr = 32'h1234_0000;
    @(posedge clk); #1 check(!remap, "store elsewhere does not swap");
    @(negedge clk); addr = 32'hFFFF_FD50;
    @(posedge clk); #1 check(remap, "store swaps");
    valid = 0; we = 0;
    sweep(1);
    @(negedge clk); valid = 1; we = 1; addr = 32'hFFFF_FD50;
    @(posedge clk); #1 check(remap, "second store keeps swap");
    valid = 0; rst_n = 0; #1 check(!remap, "reset restores boot layout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
