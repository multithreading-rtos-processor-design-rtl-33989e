// tb_aic: checks the interrupt controller: masking, the highest-priority
// candidate (lowest number on ties), the vector read (IVR) and its
// acknowledge, nesting (only a higher level interrupts a serviced one) and
// end of interrupt (EOICR), edge-triggered sources cleared by the
// acknowledge, the spurious vector, and FIQ on source 0.
module tb_aic;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pbus_if bus ();
  logic [31:0] src;
  logic irq, fiq, cand_valid;
  logic [4:0] cand_src, cur_src;
  aic #(.NSRC(32)) dut (.clk, .rst_n, .bus(bus.slave), .src, .irq, .fiq, .cand_src, .cand_valid, .cur_src);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic bw(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); bus.sel = 1; bus.we = 1; bus.addr = a; bus.wdata = d;
    @(posedge clk); #1 bus.sel = 0;
  endtask
  task automatic br(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); bus.sel = 1; bus.we = 0; bus.addr = a;
    #1 d = bus.rdata;
    @(posedge clk); #1 bus.sel = 0;
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    bus.sel = 0; bus.we = 0; bus.addr = 0; bus.wdata = 0; src = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) bw(12'h080 + 12'(4 * i), 32'h100 + i);   // vectors
    bw(12'h134, 32'hDEAD);                                               // spurious
    bw(12'h004 * 3, 32'd2);       // source 3: level, prio 2
    bw(12'h004 * 5, 32'd6);       // source 5: level, prio 6
    bw(12'h004 * 7, 32'd2);       // source 7: level, prio 2
    bw(12'h004 * 9, 32'h20 | 32'd4); // source 9: edge, prio 4
    src[3] = 1; #1 check(!irq, "masked source gives no IRQ");
    bw(12'h120, 32'h0000_02A9);   // enable 0, 3, 5, 7, 9
    check(irq && cand_src == 3, "source 3 requests");
    src[7] = 1; #1 check(cand_src == 3, "tie: lower number wins");
    br(12'h100, d); check(d == 32'h103, "IVR returns vector 3");
    check(cur_src == 3 && !irq, "in service at level 2; equal level does not nest");
    src[5] = 1; #1 check(irq && cand_src == 5, "higher level 6 nests");
    br(12'h100, d); check(d == 32'h105, "IVR vector 5");
    br(12'h108, d); check(d == 5, "ISR = 5");
    src[5] = 0;
    bw(12'h130, 0);               // end of 5
    br(12'h108, d); check(d == 3, "back to 3");
    src[3] = 0;
    bw(12'h130, 0);               // end of 3
    check(irq && cand_src == 7, "source 7 still pending");
    src[7] = 0; #1 check(!irq, "no request");
    // edge source 9
    src[9] = 1; @(posedge clk); @(posedge clk); src[9] = 0; #1;
    check(irq && cand_src == 9, "edge latched");
    br(12'h10C, d); check(d[9], "IPR shows 9");
    br(12'h100, d); check(d == 32'h109, "IVR vector 9");
    bw(12'h130, 0);
    check(!irq, "edge cleared by acknowledge");
    br(12'h100, d); check(d == 32'hDEAD, "spurious vector without request");
    // disable
    src[7] = 1; bw(12'h124, 32'h80); #1 check(!irq, "disabled by IDCR");
    br(12'h110, d); check(d == 32'h0000_0229, "IMR");
    // FIQ
    src[0] = 1; #1 check(fiq, "FIQ raised");
    br(12'h104, d); check(d == 32'h100, "FVR");
    br(12'h114, d); check(d[0], "CISR nFIQ");
    br(12'h00C, d); check(d == 2, "SMR3 read back");
    br(12'h024, d); check(d == 32'h24, "SMR9 read back edge+prio");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
