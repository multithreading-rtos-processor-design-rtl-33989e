// tb_taic: checks the task-aware interrupt controller: a source configured by
// a low-priority thread copies that thread's priority (RTP) into its ITP; its
// interrupt is held back while a higher-priority thread runs and is
// forwarded as soon as RTP drops to the ITP value or below; a source
// configured by a high-priority thread interrupts a lower one; FIQ is never
// held; RTP 0 gives plain AIC behaviour.
module tb_taic;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pbus_if bus ();
  logic [31:0] src;
  logic irq, fiq, irq_held;
  logic [7:0] rtp_o;
  taic #(.NSRC(32)) dut (.clk, .rst_n, .bus(bus.slave), .src, .irq, .fiq, .irq_held, .rtp_o);

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
    // thread T5 with priority 1 configures the serial source 6
    bw(12'h14C, 1); br(12'h14C, d); check(d == 1, "RTP written");
    bw(12'h004 * 6, 32'd3);
    br(12'h180 + 12'h004 * 6, d); check(d == 1, "ITP6 copied from RTP");
    bw(12'h120, 32'h40);
    // high-priority threads (priority 4) run
    bw(12'h14C, 4);
    src[6] = 1; #1;
    check(!irq && irq_held, "low-priority interrupt held back");
    repeat (20) @(posedge clk);
    check(!irq, "still held while priority 4 runs");
    br(12'h10C, d); check(d[6], "still pending in the AIC");
    // a thread of priority 4 configures source 8
    bw(12'h004 * 8, 32'd1); bw(12'h120, 32'h100);
    br(12'h180 + 12'h004 * 8, d); check(d == 4, "ITP8 = 4");
    src[8] = 1; src[6] = 0; #1 check(irq, "equal priority interrupt forwarded");
    src[8] = 0; src[6] = 1;
    // low-priority thread resumes: RTP = 1 -> forwarded
    bw(12'h14C, 1); #1 check(irq && !irq_held, "forwarded when RTP drops to ITP");
    br(12'h100, d); bw(12'h130, 0);
    bw(12'h14C, 0); #1 check(irq, "RTP 0 passes everything");
    src[6] = 0;
    // FIQ never held
    bw(12'h14C, 8'hFF); bw(12'h120, 1); src[0] = 1; #1 check(fiq, "FIQ not gated");
    check(rtp_o == 8'hFF, "RTP output");
    // AIC registers still reachable through the wrapper
    bw(12'h080 + 12'h004 * 6, 32'h1234); br(12'h080 + 12'h004 * 6, d); check(d == 32'h1234, "SVR6 through wrapper");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
