// tb_pit: checks the periodic interval timer's period in clock cycles
// ((PIV+1) * PRESCALE), the status bit and interrupt, the overflow counter
// and the acknowledge by reading PIVR.
module tb_pit;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pbus_if bus ();
  logic irq, tick;
  pit #(.PRESCALE(4)) dut (.clk, .rst_n, .bus(bus.slave), .irq, .tick);

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

  int t0, t1, t2;
  int cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    logic [31:0] d;
    bus.sel = 0; bus.we = 0; bus.addr = 0; bus.wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    bw(0, 32'h0300_0009);               // PIV 9, enable, interrupt enable
    br(0, d); check(d == 32'h0300_0009, "MR read back");
    @(posedge tick); t0 = cyc;
    @(posedge tick); t1 = cyc;
    @(posedge tick); t2 = cyc;
    check(t1 - t0 == 40 && t2 - t1 == 40, $sformatf("period 40 cycles (%0d, %0d)", t1 - t0, t2 - t1));
    #2 check(irq, "interrupt raised");
    br(12'hC, d); check(d[31:20] >= 2, "PIIR counts periods");
    br(4, d); check(d == 1, "PITS set");
    br(12'h8, d); check(d[31:20] >= 2, "PIVR returns count");
    br(4, d); check(d == 0, "PIVR read acknowledged");
    check(!irq, "interrupt cleared");
    bw(0, 32'h0000_0009); repeat (100) @(posedge clk);
    br(4, d); check(d == 0, "disabled timer stays silent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
