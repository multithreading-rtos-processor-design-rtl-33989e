// tb_rt_shadows_top: end-to-end test of the RT-SHADOWS system at its default
// sizes (8 hardware threads, 8 mutexes, 8 semaphores, 32 interrupt sources,
// PIT prescaler 16).
//
// The testbench plays the part of the ARM core and of the RTOS kernel that
// runs on it: it issues CP14 MCR/MRC commands, loads and stores on the system
// bus, register-file accesses and pipeline hazard queries, in the order real
// kernel code would. One run goes through:
//   boot from the SD-Card and REMAP; a memory wait through the synchronizer;
//   the added CP15 bit that keeps peripherals uncachable; thread creation
//   that fills the new thread's registers through the redirected LDM^ path;
//   preemption request, context switches and round-robin between equal
//   priorities; a mutex block and wake, a semaphore block and wake, a
//   semaphore wait that times out; thread delay; suspend and delete; a serial
//   interrupt configured by a low-priority thread that the TAIC holds back
//   while higher-priority threads run and releases when that thread runs;
//   the PIT tick interrupt serviced by the kernel (vector read, tick
//   increment, context switch, RTP update, end of interrupt) with its period
//   checked in cycles; an interrupt landing in the kernel's register bank;
//   hazard forwarding, a load-use stall and thread isolation; and a
//   performance-monitor measurement.
// Each mechanism has a counter; one that never happened counts a failure.
// Priority order is set to "larger number is more urgent", which the TAIC's
// ITP >= RTP comparison also assumes.
module tb_rt_shadows_top;
  import rts_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------------ DUT
  logic        cp_valid, cp_write;
  logic [3:0]  cp_crn;
  logic [2:0]  cp_op2;
  logic [31:0] cp_wdata, cp_rdata;
  logic [2:0]  run_thread;
  logic [7:0]  run_prio;
  logic        sched_on, preempt_req, cs_evt;
  logic [31:0] tick_count;
  logic        bus_valid, bus_we, bus_ready, bus_cacheable;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [2:0]  ext_dev;
  logic [31:0] ext_offset, ext_rdata;
  logic        mem_ready_async, remap;
  logic        cp15_we, dcache_en, mmu_en, pte_cacheable;
  logic [31:0] cp15_wdata;
  logic [2:0]  rf_rd_th, rf_w_th, rf_cpsr_th;
  logic [4:0]  rf_rd_mode, rf_w_mode, rf_spsr_mode;
  logic [3:0]  rf_ra_addr, rf_rb_addr, rf_w_addr;
  logic        rf_ra_user, rf_rb_user, rf_we, rf_w_user, rf_cpsr_we, rf_spsr_we;
  logic [31:0] rf_ra_data, rf_rb_data, rf_w_data, rf_cpsr, rf_spsr, rf_cpsr_wdata, rf_spsr_wdata;
  logic [2:0]  hz_id_th, hz_ex_th, hz_mem_th;
  logic [3:0]  hz_id_rn, hz_id_rm, hz_ex_rd, hz_mem_rd;
  logic        hz_id_use_rn, hz_id_use_rm, hz_ex_we, hz_ex_load, hz_mem_we;
  logic [1:0]  hz_fwd_rn, hz_fwd_rm;
  logic        hz_stall;
  logic        pm_if_valid, pm_wb_valid;
  logic [31:0] pm_if_addr, pm_wb_addr;
  logic        fiq_src;
  logic [31:2] irq_src;
  logic        irq, fiq, irq_held, pit_tick;

  rt_shadows_top dut (.*);

  // ------------------------------------------------------------ helpers
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // mechanism counters
  typedef enum int {
    M_REMAP, M_SYNC_WAIT, M_UNCACHE, M_CREATE, M_UBANK, M_PREEMPT, M_CS, M_RR,
    M_MUTEX_BLOCK, M_MUTEX_WAKE, M_SEM_WAKE, M_SEM_TIMEOUT, M_DELAY_WAKE,
    M_SUSPEND, M_DELETE, M_IRQ_HELD, M_IRQ_RELEASED, M_TICK, M_KBANK,
    M_FORWARD, M_STALL, M_ISOLATION, M_PM, M_IDLE, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"remap", "memory wait", "peripheral uncachable",
    "thread create", "LDM^/STM^ redirect", "preempt request", "context switch",
    "round robin", "mutex block", "mutex wake", "semaphore wake", "semaphore time-out",
    "delay wake", "suspend", "delete", "interrupt held", "interrupt released",
    "tick interrupt", "kernel bank on interrupt", "forward", "load-use stall",
    "thread isolation", "performance measure", "idle thread 0"};

  always @(posedge clk) if (rst_n && cs_evt) mech[M_CS]++;

  task automatic mcr(input int crn, input int op, input logic [31:0] d);
    @(negedge clk);
    cp_valid = 1; cp_write = 1; cp_crn = 4'(crn); cp_op2 = 3'(op); cp_wdata = d;
    @(posedge clk); #1 cp_valid = 0;
  endtask
  task automatic mrc(input int crn, input int op, output logic [31:0] d);
    @(negedge clk);
    cp_valid = 1; cp_write = 0; cp_crn = 4'(crn); cp_op2 = 3'(op);
    #1 d = cp_rdata;
    @(posedge clk); #1 cp_valid = 0;
  endtask
  task automatic bwr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); bus_valid = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(posedge clk); #1 bus_valid = 0; bus_we = 0;
  endtask
  task automatic brd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); bus_valid = 1; bus_we = 0; bus_addr = a;
    #1 d = bus_rdata;
    @(posedge clk); #1 bus_valid = 0;
  endtask
  task automatic rf_write(input int th, input logic [4:0] m, input int r, input bit u, input logic [31:0] d);
    @(negedge clk); rf_we = 1; rf_w_th = 3'(th); rf_w_mode = m; rf_w_addr = 4'(r); rf_w_user = u; rf_w_data = d;
    @(posedge clk); #1 rf_we = 0;
  endtask
  task automatic rf_read(input int th, input logic [4:0] m, input int r, input bit u, output logic [31:0] d);
    rf_rd_th = 3'(th); rf_rd_mode = m; rf_ra_addr = 4'(r); rf_ra_user = u;
    #1 d = rf_ra_data;
  endtask

  localparam logic [31:0] AIC = 32'hFFFF_F000;
  localparam logic [31:0] PIT = 32'hFFFF_FD30;
  localparam logic [31:0] PM  = 32'hFFFF_FD80;
  localparam logic [31:0] SELF = 32'h5E1F_0000;
  localparam int PIV = 19;

  // kernel: create a thread in the free slot, loading R0-R15 through the
  // redirected user-bank store; returns the slot
  task automatic create_thread(input logic [31:0] h, input logic [7:0] p, input int st, output int slot);
    logic [31:0] d;
    mrc(2, 6, d); slot = int'(d);
    mcr(0, 0, 0);
    mcr(0, 1, 32'(p));
    mcr(0, 2, h);
    mcr(0, 3, 32'(st));
    mcr(0, 5, 32'h8000_0000 | h);
    #1 check(dut.ubank_thread == 3'(slot), "LDM^ target is the thread being created");
    for (int r = 0; r < 16; r++) rf_write(0, 5'h13, r, 1, h | 32'(r));
    mcr(0, 7, 0);
    mech[M_CREATE]++;
    for (int r = 0; r < 16; r++) begin
      rf_read(slot, 5'h1F, r, 0, d);
      check(d == (h | 32'(r)), $sformatf("thread %0d R%0d loaded at creation", slot, r));
    end
    mech[M_UBANK]++;
  endtask

  // kernel: context switch and RTP update
  task automatic switch_ctx();
    logic [31:0] d;
    mcr(2, 0, 0);
    mrc(2, 2, d);
    bwr(AIC + 32'h14C, d);
  endtask

  task automatic expect_run(input int t, input string msg);
    #1 check(int'(run_thread) == t, $sformatf("%s: running %0d, expected %0d", msg, run_thread, t));
  endtask

  task automatic thread_state(input logic [31:0] h, output logic [31:0] s);
    mcr(1, 0, h);
    mrc(1, 2, s);
  endtask

  // --------------------------------------------------------------- watchdog
  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- the run
  int tA, tB, tC, tD;
  int tick_t [$];
  always @(posedge clk) if (pit_tick) tick_t.push_back(int'($time / 10));

  initial begin
    logic [31:0] d, s;
    int ready_cycles, mutex;
    cp_valid = 0; cp_write = 0; cp_crn = 0; cp_op2 = 0; cp_wdata = 0;
    bus_valid = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0; ext_rdata = 32'hE000_0000;
    mem_ready_async = 1; cp15_we = 0; cp15_wdata = 0; dcache_en = 0; mmu_en = 0; pte_cacheable = 0;
    rf_rd_th = 0; rf_w_th = 0; rf_cpsr_th = 0; rf_rd_mode = 5'h13; rf_w_mode = 5'h13; rf_spsr_mode = 5'h13;
    rf_ra_addr = 0; rf_rb_addr = 0; rf_w_addr = 0; rf_ra_user = 0; rf_rb_user = 0; rf_we = 0;
    rf_w_user = 0; rf_cpsr_we = 0; rf_spsr_we = 0; rf_w_data = 0; rf_cpsr_wdata = 0; rf_spsr_wdata = 0;
    hz_id_th = 0; hz_ex_th = 0; hz_mem_th = 0; hz_id_rn = 0; hz_id_rm = 0; hz_ex_rd = 0; hz_mem_rd = 0;
    hz_id_use_rn = 0; hz_id_use_rm = 0; hz_ex_we = 0; hz_ex_load = 0; hz_mem_we = 0;
    pm_if_valid = 0; pm_wb_valid = 0; pm_if_addr = 0; pm_wb_addr = 0;
    fiq_src = 0; irq_src = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---------------------------------------------------- boot and REMAP
    bus_addr = 0; #1 check(ext_dev == 3'(DEV_SD) && !remap, "boot: address 0 is the SD-Card");
    bus_addr = 32'h8000_0010; #1 check(ext_dev == 3'(DEV_RAM) && ext_offset == 32'h10, "boot: RAM at 0x8000_0000");
    bwr(32'hFFFF_FD50, 0);
    bus_addr = 0; #1 check(ext_dev == 3'(DEV_RAM) && remap, "after REMAP: address 0 is RAM");
    bus_addr = 32'h1000_0000; #1 check(ext_dev == 3'(DEV_SD) && ext_offset == 0, "after REMAP: SD-Card at 0x1000_0000");
    brd(32'hFFFF_FD50, d); check(d == 1, "REMAP state readable");
    if (remap) mech[M_REMAP]++;

    // ------------------------------------------- memory wait, synchronized
    @(negedge clk) mem_ready_async = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) bus_valid = 1; bus_addr = 32'h0000_0100;
    #1 check(!bus_ready, "RAM access waits");
    mem_ready_async = 1; ready_cycles = 0;
    while (!bus_ready) begin @(posedge clk); #1 ready_cycles++; end
    check(ready_cycles == 2, $sformatf("ready crosses in 2 cycles (%0d)", ready_cycles));
    if (ready_cycles > 0) mech[M_SYNC_WAIT]++;
    bus_addr = AIC; #1 check(bus_ready, "peripherals never wait");
    @(negedge clk) bus_valid = 0;

    // --------------------------------------------- peripheral cachability
    dcache_en = 1;
    bus_addr = AIC; #1 check(bus_cacheable, "MMU off: everything cachable by default");
    @(negedge clk) cp15_we = 1; cp15_wdata = 1;
    @(posedge clk) #1 cp15_we = 0;
    bus_addr = AIC; #1 check(!bus_cacheable, "peripheral made uncachable");
    bus_addr = 32'h0000_4000; #1 check(bus_cacheable, "RAM stays cachable");
    bus_addr = AIC; #1 if (!bus_cacheable) mech[M_UNCACHE]++;
    mmu_en = 1; pte_cacheable = 1; #1 check(bus_cacheable, "MMU on: page table decides");
    mmu_en = 0; dcache_en = 0; pte_cacheable = 0;

    // ----------------------------------------------------- kernel set-up
    mcr(3, 1, 32'h1F);        // threads run in system mode
    mcr(3, 0, 1);             // LDM^/STM^ reach hardware threads
    mcr(3, 2, SELF);
    mcr(3, 3, 1);             // larger priority number is more urgent
    mcr(3, 4, 1);             // round robin among equals
    rf_write(0, 5'h1F, 0, 0, 32'h0000_C0DE);   // kernel R0
    mrc(2, 6, d); check(d == 1, "first free slot is 1");

    create_thread(32'h4000, 1, 4, tD);
    mrc(0, 0, d); check(d == 1, "one thread created");
    rf_read(0, 5'h1F, 0, 0, d); check(d == 32'h0000_C0DE, "kernel R0 untouched by creation");
    mcr(2, 7, 1);             // scheduler on
    switch_ctx();
    expect_run(tD, "only thread D");
    check(run_prio == 1, "D priority");

    // D configures the serial interrupt (source 5): ITP5 gets D's priority
    bwr(AIC + 32'h014, 32'd2);
    bwr(AIC + 32'h094, 32'h0000_0055);
    bwr(AIC + 32'h120, 32'h20);
    brd(AIC + 32'h194, d); check(d == 1, "ITP5 copied from RTP");

    create_thread(32'hA000, 4, 4, tA);
    #1 check(preempt_req, "a more urgent thread requests preemption");
    if (preempt_req) mech[M_PREEMPT]++;
    create_thread(32'hB000, 4, 4, tB);
    create_thread(32'hC000, 3, 4, tC);
    switch_ctx();
    expect_run(tA, "A preempts D");
    #1 check(!preempt_req, "no request when the best thread runs");

    // serial interrupt while A runs: held back
    irq_src[5] = 1;
    #1 check(!irq && irq_held, "serial interrupt held while priority 4 runs");
    if (irq_held && !irq) mech[M_IRQ_HELD]++;

    // round robin between A and B
    switch_ctx(); expect_run(tB, "round robin to B");
    switch_ctx(); expect_run(tA, "round robin back to A");
    if (int'(run_thread) == tA) mech[M_RR]++;
    check(!irq, "still held");

    // ------------------------------------------------- mutex: block, wake
    mrc(4, 7, d); mutex = int'(d); check(d == 0, "first mutex slot");
    mcr(4, 6, 0);
    mcr(4, 1, 0);                               // A takes it
    mrc(4, 1, d); check(d == 1, "mutex taken");
    switch_ctx(); expect_run(tB, "B runs");
    mcr(4, 0, 32'(mutex));
    mrc(4, 1, d); check(d == 1, "B finds the mutex taken");
    mcr(4, 5, 32'hFFFF_FFFF);                   // B blocks, no time-out
    thread_state(32'hB000, s); check(s == 1, "B blocked on mutex");
    if (s == 1) mech[M_MUTEX_BLOCK]++;
    switch_ctx(); expect_run(tA, "A runs while B waits");
    mcr(4, 0, 32'(mutex));
    mcr(4, 2, 0);                               // A gives
    thread_state(32'hB000, s); check(s == 4, "give wakes B");
    if (s == 4) mech[M_MUTEX_WAKE]++;
    mcr(4, 0, 32'(mutex)); mrc(4, 1, d); check(d == 0, "mutex free");

    // ------------------------------------------- semaphore: block, wake
    mcr(5, 3, 0); mcr(5, 4, 4); mcr(5, 6, 0);   // count 0, max 4
    mrc(5, 1, d); check(d == 1, "semaphore empty");
    mcr(5, 5, 32'hFFFF_FFFF);                   // A waits
    switch_ctx(); expect_run(tB, "B runs while A waits");
    mcr(5, 0, 0); mcr(5, 2, 0);                 // B gives
    thread_state(32'hA000, s); check(s == 4, "semaphore give wakes A");
    if (s == 4) mech[M_SEM_WAKE]++;
    switch_ctx(); expect_run(tA, "A back");
    mcr(5, 0, 0); mcr(5, 1, 0);                 // A takes: count 0 again
    mrc(5, 1, d); check(d == 1, "semaphore empty after take");

    // ---------------------------- waits that end by time: set them up
    switch_ctx(); expect_run(tB, "B");
    mcr(5, 0, 0); mcr(5, 5, 2);                 // B waits 2 ticks at most
    switch_ctx(); expect_run(tA, "A alone at priority 4");
    mcr(1, 7, 3);                               // A sleeps 3 ticks
    switch_ctx(); expect_run(tC, "C next");
    check(!irq, "held while priority 3 runs");
    mcr(1, 0, SELF); mrc(1, 0, d); check(d == 32'hC000, "self identifier selects C");
    mcr(1, 7, 10);                              // C sleeps 10 ticks
    switch_ctx(); expect_run(tD, "D, the least urgent");
    #1 check(irq && !irq_held, "serial interrupt released when D runs");
    if (irq) mech[M_IRQ_RELEASED]++;

    // kernel services the serial interrupt in IRQ mode
    rf_write(tD, 5'h1F, 0, 0, 32'h0000_DDDD);
    rf_read(tD, 5'h12, 0, 0, d); check(d == 32'h0000_C0DE, "IRQ mode uses the kernel bank");
    rf_read(tD, 5'h1F, 0, 0, d); check(d == 32'h0000_DDDD, "thread register kept");
    if (d == 32'h0000_DDDD) mech[M_KBANK]++;
    brd(AIC + 32'h100, d); check(d == 32'h55, "serial vector");
    irq_src[5] = 0;
    bwr(AIC + 32'h130, 0);
    #1 check(!irq, "serviced");

    // ----------------------------------------------- PIT tick interrupts
    bwr(AIC + 32'h14C, 32'hFF);                 // kernel configures the tick
    bwr(AIC + 32'h004, 32'd7);
    bwr(AIC + 32'h084, 32'h0000_0011);
    bwr(AIC + 32'h120, 32'h2);
    mrc(2, 2, d); bwr(AIC + 32'h14C, d);
    bwr(PIT, 32'h0300_0000 | PIV);
    for (int k = 1; k <= 5; k++) begin
      while (!irq) @(posedge clk);
      brd(AIC + 32'h100, d); check(d == 32'h11, "tick vector");
      brd(PIT + 32'h8, d);                      // acknowledge the PIT
      mcr(2, 6, 0);                             // tick
      switch_ctx();
      bwr(AIC + 32'h130, 0);
      mech[M_TICK]++;
      check(tick_count == 32'(k), "tick count");
      case (k)
        1: expect_run(tD, "tick 1: A, B, C still waiting");
        2: begin
          expect_run(tB, "tick 2: B's semaphore wait timed out");
          if (int'(run_thread) == tB) mech[M_SEM_TIMEOUT]++;
        end
        3: begin
          expect_run(tA, "tick 3: A's delay ended, round robin from B");
          if (int'(run_thread) == tA) mech[M_DELAY_WAKE]++;
        end
        4: expect_run(tB, "tick 4: B");
        5: expect_run(tA, "tick 5: A");
      endcase
    end
    bwr(PIT, 32'h0);
    check(tick_t.size() >= 5, "five PIT periods");
    for (int i = 1; i < tick_t.size(); i++)
      check(tick_t[i] - tick_t[i-1] == (PIV + 1) * 16, $sformatf("PIT period %0d cycles", tick_t[i] - tick_t[i-1]));

    // ------------------------------------------- suspend and delete
    mcr(1, 0, 32'hC000); mcr(1, 2, 0);          // delete C
    mrc(0, 0, d); check(d == 3, "three threads left");
    mrc(2, 6, d); check(d == tC, "C's slot free again");
    if (d == tC) mech[M_DELETE]++;
    mcr(1, 0, 32'hB000); mcr(1, 2, 2);          // suspend B
    mrc(0, 1, d); check(d == 1, "one suspended");
    switch_ctx(); expect_run(tA, "A (B suspended)");
    switch_ctx(); expect_run(tA, "A again");
    if (d == 1 && int'(run_thread) == tA) mech[M_SUSPEND]++;
    mcr(1, 0, 32'hA000); mcr(1, 2, 2);
    mcr(1, 0, 32'h4000); mcr(1, 2, 2);
    switch_ctx(); expect_run(0, "nothing ready: kernel thread 0");
    if (run_thread == 0) mech[M_IDLE]++;
    mrc(2, 1, d); check(d == 32'hFFFF_FFFF, "no running handler");

    // context save of the running thread through the user-bank path
    mcr(1, 0, 32'hA000); mcr(1, 2, 4);
    switch_ctx(); expect_run(tA, "A resumed");
    rf_read(0, 5'h13, 3, 1, d); check(d == 32'hA003, "STM^ reads the running thread's R3");

    // ----------------------------------------------------- hazard unit
    hz_id_th = 3'(tA); hz_id_rn = 4; hz_id_use_rn = 1; hz_id_rm = 5; hz_id_use_rm = 1;
    hz_ex_th = 3'(tA); hz_ex_rd = 4; hz_ex_we = 1; hz_ex_load = 0;
    hz_mem_th = 3'(tA); hz_mem_rd = 5; hz_mem_we = 1;
    #1 check(hz_fwd_rn == 1 && hz_fwd_rm == 2 && !hz_stall, "forward from EX and MEM");
    if (hz_fwd_rn == 1 && hz_fwd_rm == 2) mech[M_FORWARD]++;
    hz_ex_load = 1;
    #1 check(hz_stall, "load-use stall");
    if (hz_stall) mech[M_STALL]++;
    hz_ex_th = 3'(tB); hz_mem_th = 3'(tB);
    #1 check(!hz_stall && hz_fwd_rn == 0 && hz_fwd_rm == 0, "other thread: no hazard");
    if (!hz_stall) mech[M_ISOLATION]++;
    hz_id_use_rn = 0; hz_id_use_rm = 0; hz_ex_we = 0; hz_mem_we = 0; hz_ex_load = 0;

    // -------------------------------------------- performance monitor
    bwr(PM + 32'h4, 32'h0000_0200);
    bwr(PM + 32'h8, 32'h0000_0210);
    bwr(PM + 32'h0, 32'h1);
    @(negedge clk) pm_if_valid = 1; pm_if_addr = 32'h200;
    for (int i = 1; i < 12; i++) begin
      @(negedge clk) pm_if_addr = 32'h200 + 32'(4 * i);
      pm_wb_valid = (i >= 4); pm_wb_addr = 32'h200 + 32'(4 * (i - 4));
    end
    @(negedge clk) pm_if_valid = 0; pm_wb_valid = 0;
    brd(PM + 32'hC, d);
    check(d == 9, $sformatf("fetch of 0x200 to write-back of 0x210: %0d cycles", d));
    brd(PM + 32'h10, d); check(d == 1, "measurement done");
    if (d == 1) mech[M_PM]++;

    // ------------------------------------------------------- summary
    foreach (mech[i]) begin
      $display("mechanism %-26s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism '%s' never happened", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
