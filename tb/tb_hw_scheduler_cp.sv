// tb_hw_scheduler_cp: self-checking test of the CP14 hardware scheduler.
//
// Plays the core's part by issuing MCR/MRC commands and checks, against
// values worked out by hand from the register tables: thread creation and
// slot allocation, selection by handler and by the self identifier, context
// switches by priority in both priority orders, round-robin among equal
// priorities, delay by ticks, suspend/resume/delete, mutex and semaphore
// blocking with time-out and with wake-up on give, the preemption request,
// and that every command completes in one cycle.
module tb_hw_scheduler_cp;
  import rts_pkg::*;
  localparam int NT = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cp_req_t     req;
  logic [31:0] rdata, tick_count;
  logic [2:0]  run_thread, ubank_thread;
  logic        ldm_stm_mod, sched_on, preempt_req, cs_evt;
  logic [4:0]  reg_mode;
  logic [7:0]  run_prio;

  hw_scheduler_cp #(.NTHREADS(NT), .NMUTEX(4), .NSEM(4)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic mcr(input int crn, input int op, input logic [31:0] d);
    @(negedge clk);
    req = '{valid: 1'b1, write: 1'b1, crn: 4'(crn), op2: 3'(op), wdata: d};
    @(posedge clk); #1 req.valid = 1'b0;
  endtask
  task automatic mrc(input int crn, input int op, output logic [31:0] d);
    @(negedge clk);
    req = '{valid: 1'b1, write: 1'b0, crn: 4'(crn), op2: 3'(op), wdata: '0};
    #1 d = rdata;
    @(posedge clk); #1 req.valid = 1'b0;
  endtask
  task automatic create(input int prio, input int handler, input int st, output logic [31:0] slot);
    mrc(2, 6, slot);
    mcr(0, 0, 0);
    mcr(0, 1, prio);
    mcr(0, 2, handler);
    mcr(0, 3, st);
    mcr(0, 5, 32'h1000 + handler);
    mcr(0, 7, 0);
  endtask
  task automatic select(input int handler); mcr(1, 0, handler); endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d, s1, s2, s3, s4;
  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reset state
    mrc(2, 7, d); check(d == 0, "scheduler off after reset");
    check(run_thread == 0, "thread 0 runs after reset");
    mrc(0, 0, d); check(d == 0, "no threads after reset");
    mrc(2, 6, d); check(d == 1, "first free slot is 1");
    // configuration registers: FreeRTOS style (larger number = higher)
    mcr(3, 3, 1); mrc(3, 3, d); check(d == 1, "priority order reg");
    mcr(3, 0, 1); check(ldm_stm_mod, "LDM/STM modified");
    mcr(3, 1, 32'h1F); check(reg_mode == 5'h1F, "register mode SYS");
    mcr(3, 2, 0); mrc(3, 2, d); check(d == 0, "self id NULL");
    mcr(3, 4, 1); mcr(3, 5, 1);
    // create threads: handlers 0xA1.. priorities 2, 5, 5, 1 (one suspended)
    create(2, 32'hA1, 4, s1); check(s1 == 1, "slot 1");
    create(5, 32'hA2, 4, s2); check(s2 == 2, "slot 2");
    create(5, 32'hA3, 4, s3); check(s3 == 3, "slot 3");
    create(1, 32'hA4, 2, s4); check(s4 == 4, "slot 4");
    mrc(0, 0, d); check(d == 4, "4 threads created");
    mrc(0, 1, d); check(d == 1, "1 thread suspended");
    select(32'hA2); mrc(1, 0, d); check(d == 32'hA2, "select by handler");
    mrc(1, 1, d); check(d == 5, "priority of A2");
    mrc(1, 3, d); check(d == 32'h10A2, "stack pointer of A2");
    mrc(1, 2, d); check(d == 4, "A2 ready");
    select(32'hBEEF); mrc(1, 0, d); check(d == 32'hFFFF_FFFF, "unknown handler not found");
    mrc(1, 6, d); check(d == 5, "best ready priority 5");
    // start scheduler and switch: highest priority 5 -> threads 2,3; from 0 -> 2
    mcr(2, 7, 1); check(sched_on, "scheduler on");
    mcr(2, 0, 0);
    check(run_thread == 2, "first switch picks thread 2");
    mrc(2, 1, d); check(d == 32'hA2, "running handler A2");
    mrc(2, 2, d); check(d == 5, "running prio 5");
    check(!preempt_req, "an equal-priority peer does not request preemption");
    // round-robin: 2 -> 3 -> 2
    mcr(2, 0, 0); check(run_thread == 3, "round-robin to thread 3");
    select(32'hA2); mrc(1, 2, d); check(d == 4, "thread 2 back to ready");
    mcr(2, 0, 0); check(run_thread == 2, "round-robin back to thread 2");
    // without round-robin the running thread stays
    mcr(3, 4, 0); mcr(2, 0, 0); check(run_thread == 2, "no round-robin keeps thread 2");
    check(!preempt_req, "no preemption request without a better thread");
    // self identifier selects the running thread; delay it by 3 ticks
    select(0); mrc(1, 0, d); check(d == 32'hA2, "self id selects running");
    mcr(1, 7, 3);
    mrc(1, 2, d); check(d == 1, "delayed thread blocked");
    mcr(2, 0, 0); check(run_thread == 3, "switch to 3 while 2 sleeps");
    mcr(2, 6, 0); mcr(2, 6, 0);
    check(tick_count == 2, "two ticks");
    select(32'hA2); mrc(1, 2, d); check(d == 1, "still blocked at tick 2");
    mcr(2, 6, 0);
    @(posedge clk); #1;
    mrc(1, 2, d); check(d == 4, "ready again at tick 3");
    // priority order reversed: 0 is highest -> thread 1 (prio 2) is best
    mcr(3, 3, 0); mcr(2, 0, 0);
    check(run_thread == 1, "reversed order picks lowest number");
    mcr(3, 3, 1);
    // resume the suspended thread 4 and give it priority 9
    select(32'hA4); mcr(1, 2, 4); mcr(1, 1, 9);
    check(preempt_req, "higher-priority ready thread requests preemption");
    mcr(3, 5, 0); check(!preempt_req, "cooperative mode: no preemption request");
    mcr(3, 5, 1);
    mcr(2, 0, 0); check(run_thread == 4, "switch to resumed thread 4");
    // suspend then delete thread 4 (running)
    select(0); mcr(1, 2, 2); mrc(1, 2, d); check(d == 2, "running thread suspended");
    mcr(2, 0, 0); check(run_thread == 2, "after suspend: 2");
    select(32'hA4); mcr(1, 2, 0); mrc(1, 0, d); check(d == 32'hFFFF_FFFF, "deleted thread gone");
    mrc(2, 6, d); check(d == 4, "slot 4 free again");
    // mutex: create, take by 2, thread 3 blocks on it, give wakes 3
    mrc(4, 7, d); check(d == 0, "first free mutex 0");
    mcr(4, 6, 0); mrc(4, 0, d); check(d == 0, "created mutex selected");
    mrc(4, 7, d); check(d == 1, "next free mutex 1");
    mcr(4, 1, 0); mrc(4, 1, d); check(d == 1, "mutex taken by thread 2");
    mcr(3, 4, 1); mcr(2, 0, 0); check(run_thread == 3, "round-robin on: thread 3 runs");
    mcr(4, 0, 0); mcr(4, 5, 32'hFFFF_FFFF);
    select(32'hA3); mrc(1, 2, d); check(d == 1, "thread 3 blocked on mutex");
    mcr(2, 0, 0); check(run_thread == 2, "owner runs again");
    repeat (5) mcr(2, 6, 0);
    mrc(1, 2, d); check(d == 1, "forever wait does not time out");
    mcr(4, 0, 0); mcr(4, 2, 0);
    mrc(4, 1, d); check(d == 0, "mutex given");
    mrc(1, 2, d); check(d == 4, "waiter woken by give");
    // mutex wait with time-out
    mcr(4, 1, 0);                      // thread 2 takes again
    mcr(2, 0, 0); check(run_thread == 3, "round-robin: 3 runs");
    mcr(4, 0, 0); mcr(4, 5, 2);        // 3 waits 2 ticks
    select(32'hA3); mrc(1, 2, d); check(d == 1, "3 blocked with time-out");
    mcr(2, 6, 0); mrc(1, 2, d); check(d == 1, "3 still blocked after 1 tick");
    mcr(2, 6, 0); @(posedge clk); #1;
    mrc(1, 2, d); check(d == 4, "time-out expired: ready");
    // semaphore: initial 1, max 2
    mcr(5, 3, 1); mcr(5, 4, 2); mcr(5, 6, 0);
    mrc(5, 0, d); check(d == 0, "semaphore 0 created");
    mrc(5, 1, d); check(d == 0, "semaphore available");
    mcr(5, 1, 0); mrc(5, 1, d); check(d == 1, "semaphore count now zero");
    mcr(2, 0, 0);
    mcr(5, 0, 0); mcr(5, 5, 100);
    mrc(2, 1, d);
    begin
      logic [31:0] waiter;
      waiter = d;
      select(waiter); mrc(1, 2, d); check(d == 1, "waiter blocked on semaphore");
      mcr(5, 0, 0); mcr(5, 2, 0);
      mrc(1, 2, d); check(d == 4, "semaphore give wakes waiter");
      mrc(5, 1, d); check(d == 0, "count back to one");
    end
    // a waiter is made ready when its semaphore is deleted
    mcr(5, 1, 0);
    mcr(2, 0, 0);
    mcr(5, 0, 0); mcr(5, 5, 32'hFFFF_FFFF);
    mrc(2, 1, d);
    begin
      logic [31:0] waiter;
      waiter = d;
      select(waiter); mrc(1, 2, d); check(d == 1, "second waiter blocked without time-out");
      mcr(5, 0, 0);
      mcr(5, 7, 0);
      select(waiter); mrc(1, 2, d); check(d == 4, "deleting the semaphore wakes its waiter");
    end
    mcr(5, 0, 0); mrc(5, 0, d); check(d == 32'hFFFF_FFFF, "semaphore deleted");
    // fill all thread slots: slots 4..7 free -> 4 more creations, then full
    for (int i = 0; i < 4; i++) create(1, 32'hC0 + i, 2, d);
    mrc(2, 6, d); check(d == 0, "all slots used: 0");
    mrc(0, 0, d); check(d == 7, "7 threads");
    // one-cycle latency: switch visible right after the MCR clock edge
    @(negedge clk);
    req = '{valid: 1'b1, write: 1'b1, crn: 4'd2, op2: 3'd0, wdata: '0};
    s1 = 32'(run_thread);
    @(posedge clk); #1 req.valid = 1'b0;
    #1;
    check(32'(run_thread) != s1, "context switch completes in one cycle");
    check(cs_evt == 1'b0, "cs_evt is a one-cycle pulse");
    // stopped scheduler ignores switches
    mcr(2, 7, 0); s1 = 32'(run_thread); mcr(2, 0, 0);
    check(32'(run_thread) == s1, "switch ignored while stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
