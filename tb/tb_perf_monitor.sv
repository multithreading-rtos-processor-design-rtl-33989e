// tb_perf_monitor: checks that the monitor counts the cycles from the fetch
// of the start instruction to the write-back of the end instruction, both
// included, ignores other addresses, raises its interrupt when done and
// re-arms when DONE is cleared (a second run of different length).
module tb_perf_monitor;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pbus_if bus ();
  logic if_valid, wb_valid, irq;
  logic [31:0] if_addr, wb_addr;
  perf_monitor dut (.clk, .rst_n, .bus(bus.slave), .if_valid, .if_addr, .wb_valid, .wb_addr, .irq);

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
  // fetch start at one cycle, write-back of end n-1 cycles later
  task automatic run(input int n);
    @(negedge clk); if_valid = 1; if_addr = 32'h200;
    @(negedge clk); if_valid = 1; if_addr = 32'h204;
    @(negedge clk); if_valid = 0;
    repeat (n - 4) begin @(negedge clk); wb_valid = 1; wb_addr = 32'h300; end
    @(negedge clk); wb_valid = 1; wb_addr = 32'h208;
    @(negedge clk); wb_valid = 0;
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    bus.sel = 0; bus.we = 0; bus.addr = 0; bus.wdata = 0;
    if_valid = 0; wb_valid = 0; if_addr = 0; wb_addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    bw(4, 32'h200); bw(8, 32'h208); bw(0, 3);
    run(10);
    br(12'hC, d); check(d == 10, $sformatf("first run 10 cycles (%0d)", d));
    br(12'h10, d); check(d == 1, "done, not busy");
    check(irq, "interrupt raised");
    run(5);
    br(12'hC, d); check(d == 10, "count kept until DONE cleared");
    bw(12'h10, 1); check(!irq, "DONE cleared");
    run(23);
    br(12'hC, d); check(d == 23, $sformatf("second run 23 cycles (%0d)", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
