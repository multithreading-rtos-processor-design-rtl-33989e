// tb_thread_metric: the scheduling and interrupt patterns of the
// Thread-Metric RTOS benchmark suite, run on the whole system at its default
// sizes with the hardware API (CP14 commands and the interrupt controller).
//
// The testbench is the CPU and the kernel. Each pattern runs for a fixed
// window of WINDOW cycles from reset, like a benchmark's measuring interval,
// and its score is the number of loop iterations the threads completed:
//   cooperative      - five threads of equal priority in cooperative mode;
//                      each counts and relinquishes (context switch). A more
//                      urgent thread resumed afterwards may not preempt.
//   preemptive       - five threads of priorities 1..5 (larger is more
//                      urgent); each resumes the next more urgent one, which
//                      preempts it at once; the most urgent suspends itself,
//                      and so on back down.
//   interrupt        - a thread sets a software interrupt; its handler gives
//                      a semaphore that the thread then takes.
//   interrupt preemption - the handler resumes a more urgent thread, which
//                      runs as soon as the handler ends and then suspends
//                      itself.
//   synchronization  - one thread takes and gives a semaphore.
// The message and memory-allocation benchmarks use software queues and pools
// only and are not repeated here.
// Checks: the exact thread order of every switch, preemption requested only
// where the mode allows it, balanced counters, handler and thread counts
// equal, semaphore counts, and a non-zero score for every pattern.
module tb_thread_metric;
  import rts_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int WINDOW = 3000;

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

  localparam logic [31:0] AIC  = 32'hFFFF_F000;
  localparam logic [31:0] SELF = 32'h5E1F_0000;

  int cyc;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

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

  // kernel pieces
  task automatic switch_ctx();
    logic [31:0] d;
    mcr(2, 0, 0);
    mrc(2, 2, d);
    bwr(AIC + 32'h14C, d);
  endtask
  task automatic create(input logic [31:0] h, input int p, input int st, output int slot);
    logic [31:0] d;
    mrc(2, 6, d); slot = int'(d);
    mcr(0, 0, 0); mcr(0, 1, 32'(p)); mcr(0, 2, h); mcr(0, 3, 32'(st));
    mcr(0, 5, 32'h8000_0000 | h); mcr(0, 7, 0);
  endtask
  task automatic set_state(input logic [31:0] h, input int st);
    mcr(1, 0, h); mcr(1, 2, 32'(st));
  endtask
  task automatic expect_run(input int slot, input string msg);
    #1 check(int'(run_thread) == slot, $sformatf("%s: running %0d, expected %0d", msg, run_thread, slot));
  endtask

  // reset the system and boot the kernel; larger priority number is more
  // urgent
  task automatic boot(input bit rr, input bit preemptive);
    @(negedge clk) rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    mcr(3, 1, 32'h1F); mcr(3, 0, 1); mcr(3, 2, SELF); mcr(3, 3, 1);
    mcr(3, 4, 32'(rr)); mcr(3, 5, 32'(preemptive));
  endtask

  int score [5];

  // ------------------------------------------------------------ cooperative
  task automatic cooperative();
    int slot [6], cnt [6], t, t0, mx, mn, next, pre_seen;
    boot(1, 0);
    for (int i = 0; i < 5; i++) create(32'h100 * (i + 1), 3, 4, slot[i]);
    create(32'h900, 5, 2, slot[5]);              // more urgent, suspended
    mcr(2, 7, 1);
    switch_ctx();
    expect_run(slot[0], "cooperative start");
    foreach (cnt[i]) cnt[i] = 0;
    t0 = cyc; next = 0; pre_seen = 0;
    while (cyc - t0 < WINDOW) begin
      t = int'(run_thread);
      check(t == slot[next], $sformatf("cooperative order: %0d, expected %0d", t, slot[next]));
      cnt[next]++;
      #1 if (preempt_req) pre_seen++;
      next = (next + 1) % 5;
      mcr(2, 0, 0);                              // relinquish
    end
    // a more urgent thread made ready waits for the next relinquish
    set_state(32'h900, 4);
    repeat (3) begin @(posedge clk); #1 if (preempt_req) pre_seen++; end
    expect_run(slot[next], "no preemption in cooperative mode");
    mcr(2, 0, 0);
    expect_run(slot[5], "urgent thread runs at the relinquish");
    cnt[5]++;
    mx = 0; mn = 1 << 30;
    for (int i = 0; i < 5; i++) begin
      if (cnt[i] > mx) mx = cnt[i];
      if (cnt[i] < mn) mn = cnt[i];
    end
    check(pre_seen == 0, "cooperative mode: no preemption request");
    check(cnt[5] == 1, "urgent thread ran once");
    check(mx - mn <= 1, $sformatf("cooperative counters balanced (%0d..%0d)", mn, mx));
    score[0] = 0;
    for (int i = 0; i < 5; i++) score[0] += cnt[i];
  endtask

  // ------------------------------------------------------------- preemptive
  task automatic preemptive();
    int slot [6], cnt [6], k, t0, pre_cnt, resumes;
    bit returning [6];
    boot(0, 1);
    for (int i = 1; i <= 5; i++) create(32'h1000 * i, i, i == 1 ? 4 : 2, slot[i]);
    mcr(2, 7, 1);
    switch_ctx();
    foreach (cnt[i]) begin cnt[i] = 0; returning[i] = 0; end
    t0 = cyc; pre_cnt = 0; resumes = 0;
    forever begin
      k = int'(run_prio);
      check(int'(run_thread) == slot[k], "thread of that priority runs");
      if (!returning[k]) begin
        cnt[k]++;
        if (k < 5) begin
          returning[k] = 1;
          set_state(32'h1000 * (k + 1), 4);      // resume the next one
          resumes++;
          #1 if (preempt_req) pre_cnt++;
          switch_ctx();
          expect_run(slot[k + 1], "resumed thread preempts");
        end else begin
          set_state(SELF, 2);
          switch_ctx();
          expect_run(slot[4], "back to priority 4");
        end
      end else begin
        returning[k] = 0;
        if (k > 1) begin
          set_state(SELF, 2);
          switch_ctx();
          expect_run(slot[k - 1], "back down one level");
        end else if (cyc - t0 >= WINDOW) break;
      end
    end
    check(pre_cnt == resumes, $sformatf("preemption requested on every resume (%0d of %0d)", pre_cnt, resumes));
    for (int i = 2; i <= 5; i++) check(cnt[i] == cnt[1], $sformatf("preemptive counter %0d balanced", i));
    score[1] = cnt[1];
  endtask

  // ---------------------------------------------------- interrupt handlers
  // software interrupt on source 6 (edge mode so the set register applies)
  task automatic config_swi();
    bwr(AIC + 32'h018, 32'h27); bwr(AIC + 32'h098, 32'h66); bwr(AIC + 32'h120, 32'h40);
  endtask

  task automatic interrupt_processing();
    int slot, t0, isr_cnt, thr_cnt, lat;
    logic [31:0] d;
    boot(0, 1);
    create(32'h2000, 2, 4, slot);
    mcr(2, 7, 1);
    switch_ctx();
    config_swi();
    mrc(5, 7, d); mcr(5, 3, 0); mcr(5, 4, 1); mcr(5, 6, 0);
    isr_cnt = 0; thr_cnt = 0;
    t0 = cyc;
    while (cyc - t0 < WINDOW) begin
      bwr(AIC + 32'h12C, 32'h40);                // thread raises the interrupt
      lat = 0;
      while (!irq && lat < 10) begin @(posedge clk); #1 lat++; end
      check(irq, "software interrupt reaches the core");
      brd(AIC + 32'h100, d); check(d == 32'h66, "software interrupt vector");
      isr_cnt++;
      mcr(5, 0, 0); mcr(5, 2, 0);                // handler gives the semaphore
      bwr(AIC + 32'h130, 0);
      mcr(5, 0, 0); mrc(5, 1, d);
      check(d == 0, "semaphore available to the thread");
      mcr(5, 1, 0);                              // thread takes it
      thr_cnt++;
      expect_run(slot, "interrupted thread resumes");
    end
    check(isr_cnt == thr_cnt && thr_cnt > 0, "one take per handler run");
    score[2] = thr_cnt;
  endtask

  task automatic interrupt_preemption();
    int lo, hi, t0, lo_cnt, hi_cnt;
    logic [31:0] d;
    boot(0, 1);
    create(32'h3000, 1, 4, lo);
    create(32'h3100, 4, 2, hi);
    mcr(2, 7, 1);
    switch_ctx();
    config_swi();
    lo_cnt = 0; hi_cnt = 0;
    t0 = cyc;
    while (cyc - t0 < WINDOW) begin
      expect_run(lo, "low thread runs");
      lo_cnt++;
      bwr(AIC + 32'h12C, 32'h40);
      while (!irq) @(posedge clk);
      brd(AIC + 32'h100, d);
      set_state(32'h3100, 4);                    // handler resumes the high one
      #1 check(preempt_req, "handler's resume requests preemption");
      switch_ctx();                              // scheduling point at exit
      bwr(AIC + 32'h130, 0);
      expect_run(hi, "high thread runs after the handler");
      hi_cnt++;
      set_state(SELF, 2);
      switch_ctx();
    end
    check(lo_cnt == hi_cnt && hi_cnt > 0, "one high-thread run per interrupt");
    score[3] = hi_cnt;
  endtask

  // -------------------------------------------------------- synchronization
  task automatic synchronization();
    int slot, t0, cnt;
    logic [31:0] d;
    boot(0, 1);
    create(32'h4000, 2, 4, slot);
    mcr(2, 7, 1);
    switch_ctx();
    mrc(5, 7, d); mcr(5, 3, 1); mcr(5, 4, 1); mcr(5, 6, 0);
    cnt = 0;
    t0 = cyc;
    while (cyc - t0 < WINDOW) begin
      mcr(5, 0, 0); mrc(5, 1, d); check(d == 0, "semaphore free before the get");
      mcr(5, 1, 0);
      mrc(5, 1, d); check(d == 1, "semaphore empty after the get");
      mcr(5, 2, 0);
      cnt++;
    end
    mrc(5, 1, d); check(d == 0, "semaphore given back");
    expect_run(slot, "thread never blocked");
    score[4] = cnt;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cp_valid = 0; cp_write = 0; cp_crn = 0; cp_op2 = 0; cp_wdata = 0;
    bus_valid = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0; ext_rdata = 0;
    mem_ready_async = 1; cp15_we = 0; cp15_wdata = 0; dcache_en = 0; mmu_en = 0; pte_cacheable = 0;
    rf_rd_th = 0; rf_w_th = 0; rf_cpsr_th = 0; rf_rd_mode = 5'h13; rf_w_mode = 5'h13; rf_spsr_mode = 5'h13;
    rf_ra_addr = 0; rf_rb_addr = 0; rf_w_addr = 0; rf_ra_user = 0; rf_rb_user = 0; rf_we = 0;
    rf_w_user = 0; rf_cpsr_we = 0; rf_spsr_we = 0; rf_w_data = 0; rf_cpsr_wdata = 0; rf_spsr_wdata = 0;
    hz_id_th = 0; hz_ex_th = 0; hz_mem_th = 0; hz_id_rn = 0; hz_id_rm = 0; hz_ex_rd = 0; hz_mem_rd = 0;
    hz_id_use_rn = 0; hz_id_use_rm = 0; hz_ex_we = 0; hz_ex_load = 0; hz_mem_we = 0;
    pm_if_valid = 0; pm_wb_valid = 0; pm_if_addr = 0; pm_wb_addr = 0;
    fiq_src = 0; irq_src = '0; cyc = 0;

    cooperative();
    preemptive();
    interrupt_processing();
    interrupt_preemption();
    synchronization();
    $display("scores over %0d cycles: cooperative %0d, preemptive %0d, interrupt %0d, interrupt preemption %0d, synchronization %0d",
             WINDOW, score[0], score[1], score[2], score[3], score[4]);
    foreach (score[i]) check(score[i] > 0, $sformatf("benchmark %0d made progress", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
