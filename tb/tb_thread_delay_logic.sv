// tb_thread_delay_logic: checks the per-thread delay comparison with the
// worked example of the delay timers (tick counter at 20, delay of 5 ticks:
// time-stamp 25, ready exactly when the counter reaches 25), non-blocked
// states passing through, the "forever" wait and a delay across the wrap of
// the 32-bit tick counter.
module tb_thread_delay_logic;
  import rts_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  thread_state_e si, so; logic [31:0] stamp, tick; logic fw, ex;
  thread_delay_logic dut (.state_in(si), .stamp, .tick, .forever_wait(fw), .state_out(so), .expired(ex));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    si = TS_BLOCKED; fw = 0; stamp = 20 + 5;
    for (int t = 20; t <= 27; t++) begin
      tick = t; #1;
      check(so == ((t >= 25) ? TS_READY : TS_BLOCKED), $sformatf("tick %0d", t));
      check(ex == (t >= 25), $sformatf("expired at tick %0d", t));
    end
    fw = 1; tick = 1000; #1 check(so == TS_BLOCKED && !ex, "forever wait never expires");
    fw = 0;
    si = TS_SUSPENDED; #1 check(so == TS_SUSPENDED, "suspended passes");
    si = TS_RUNNING;   #1 check(so == TS_RUNNING, "running passes");
    si = TS_BLOCKED; stamp = 32'h0000_0003; tick = 32'hFFFF_FFFE;
    #1 check(so == TS_BLOCKED, "before wrap: blocked");
    tick = 32'h0000_0003; #1 check(so == TS_READY, "after wrap: ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
