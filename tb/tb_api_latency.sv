// tb_api_latency: latency and jitter of the hardware thread, mutex and
// semaphore services, run on the whole system at its default sizes.
//
// Each round draws a random configuration from the parameters a software
// scheduler is sensitive to: the number of created threads (1..7), their
// priorities and the gaps between them, the priority order, round-robin on
// or off, and whether a call causes a context switch. It then exercises
// create, priority get/set, suspend, resume, yield, delay, and mutex and
// semaphore take/give through the CP14 commands. After each command the
// testbench reads the effect back (MRC data is combinational) and counts the
// extra cycles, beyond the command's own, until the expected value appears; the expected values come from a
// reference model of the scheduling rules kept here (best priority in the
// chosen order, round-robin after the running thread, ready time-outs). The
// result is, per service, the minimum latency and its variation over all
// rounds; the check is that the model always agrees and that no service
// latency varies.
module tb_api_latency;
  import rts_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int ROUNDS = 40;
  localparam int NT = 8;

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

  localparam logic [31:0] SELF = 32'h5E1F_0000;

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

  // ------------------------------------------------ latency bookkeeping
  typedef enum int {A_CREATE, A_PRIO_GET, A_PRIO_SET, A_SUSPEND, A_RESUME,
                    A_YIELD, A_DELAY, A_MUTEX_TAKE, A_MUTEX_GIVE, A_SEM_TAKE,
                    A_SEM_GIVE, A_N} api_e;
  string api_name [A_N] = '{"create", "priority get", "priority set", "suspend",
                            "resume", "yield", "delay", "mutex take",
                            "mutex give", "semaphore take", "semaphore give"};
  int lat_min [A_N], lat_max [A_N], lat_n [A_N];

  // read (crn, op) until it shows expv, up to 4 extra cycles; the latency
  // counts the cycles from the command to the first read showing it
  task automatic settle(input api_e api, input int crn, input int op,
                        input logic [31:0] expv, input string msg);
    logic [31:0] d;
    int n;
    n = 0;
    mrc(crn, op, d);
    while (d != expv && n < 4) begin n++; mrc(crn, op, d); end
    check(d == expv, $sformatf("%s: %s read %h expected %h", api_name[api], msg, d, expv));
    if (d == expv) begin
      if (n < lat_min[api]) lat_min[api] = n;
      if (n > lat_max[api]) lat_max[api] = n;
      lat_n[api]++;
    end
  endtask

  // ------------------------------------------------------ reference model
  int    m_state [NT];
  int    m_prio  [NT];
  int    m_wake  [NT];            // tick at which a delayed thread is ready
  int    m_run, m_tick;
  bit    m_order, m_rr;

  function automatic bit better(input int a, input int b);   // a more urgent than b
    return m_order ? (a > b) : (a < b);
  endfunction

  function automatic int best_prio();
    int b;
    b = -1;
    for (int i = 1; i < NT; i++)
      if (m_state[i] inside {4, 8} && (b < 0 || better(m_prio[i], b))) b = m_prio[i];
    return b;
  endfunction

  function automatic int pick();
    int b, j;
    b = best_prio();
    if (b < 0) return 0;
    if (!m_rr && m_run != 0 && m_state[m_run] inside {4, 8} && m_prio[m_run] == b) return m_run;
    for (int k = 1; k <= NT; k++) begin
      j = m_rr ? (m_run + k) % NT : k % NT;
      if (j != 0 && m_state[j] inside {4, 8} && m_prio[j] == b) return j;
    end
    return 0;
  endfunction

  function automatic void m_switch();
    int n;
    n = pick();
    if (m_run != 0 && m_state[m_run] == 8) m_state[m_run] = 4;
    if (n != 0) m_state[n] = 8;
    m_run = n;
  endfunction

  function automatic logic [31:0] hnd(input int slot);
    return 32'h7000 + 32'(slot) * 32'h10;
  endfunction

  // -------------------------------------------------------------- a round
  task automatic one_round();
    int nthr, p, t, d, gap;
    logic [31:0] v;
    @(negedge clk) rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    m_order = 1'($urandom_range(1));
    m_rr = 1'($urandom_range(1));
    mcr(3, 1, 32'h1F); mcr(3, 2, SELF); mcr(3, 3, 32'(m_order)); mcr(3, 4, 32'(m_rr));
    foreach (m_state[i]) begin m_state[i] = 0; m_prio[i] = 0; m_wake[i] = 0; end
    m_run = 0; m_tick = 0;
    nthr = $urandom_range(7, 1);
    gap = ($urandom_range(1) != 0) ? 1 : 60;     // close or wide priority gaps
    p = $urandom_range(40);
    // create
    for (int i = 1; i <= nthr; i++) begin
      p = (p + gap * int'($urandom_range(2))) % 256;
      mcr(0, 0, 0); mcr(0, 1, 32'(p)); mcr(0, 2, hnd(i)); mcr(0, 3, 4);
      mcr(0, 5, 32'h8000_0000); mcr(0, 7, 0);
      m_state[i] = 4; m_prio[i] = p;
      settle(A_CREATE, 0, 0, 32'(i), "created count");
    end
    mcr(2, 7, 1);
    mcr(2, 0, 0); m_switch();
    settle(A_YIELD, 2, 1, (m_run != 0) ? hnd(m_run) : 32'hFFFF_FFFF, "first dispatch");
    // priority get and set on a random thread
    t = $urandom_range(nthr, 1);
    mcr(1, 0, hnd(t));
    settle(A_PRIO_GET, 1, 1, 32'(m_prio[t]), "priority");
    p = $urandom_range(255);
    mcr(1, 1, 32'(p)); m_prio[t] = p;
    settle(A_PRIO_SET, 1, 6, best_prio() < 0 ? 32'hFFFF_FFFF : 32'(best_prio()), "best ready priority");
    // suspend and resume a random thread, with or without a switch
    t = $urandom_range(nthr, 1);
    mcr(1, 0, hnd(t)); mcr(1, 2, 2); m_state[t] = 2;
    settle(A_SUSPEND, 1, 2, 32'd2, "state suspended");
    if (t == m_run) begin mcr(2, 0, 0); m_switch(); end
    mcr(1, 0, hnd(t)); mcr(1, 2, 4); m_state[t] = 4;
    settle(A_RESUME, 1, 2, 32'd4, "state ready");
    #1 check(preempt_req == (best_prio() >= 0 && (m_run == 0 || m_prio[m_run] != best_prio())),
             "preemption requested exactly when a more urgent thread is ready");
    // yields, checking the round-robin rotation
    repeat (3) begin
      mcr(2, 0, 0); m_switch();
      settle(A_YIELD, 2, 1, (m_run != 0) ? hnd(m_run) : 32'hFFFF_FFFF, "running handler after yield");
    end
    // delay the running thread, then tick until it is ready again
    if (m_run != 0) begin
      t = m_run;
      d = $urandom_range(3, 1);
      mcr(1, 7, 32'(d)); m_state[t] = 1; m_wake[t] = m_tick + d;
      mcr(1, 0, hnd(t));
      settle(A_DELAY, 1, 2, 32'd1, "state blocked");
      mcr(2, 0, 0); m_switch();
      for (int k = 0; k < d; k++) begin
        mcr(2, 6, 0); m_tick++;
        if (m_tick == m_wake[t]) m_state[t] = 4;
        mcr(1, 0, hnd(t));
        settle(A_DELAY, 1, 2, 32'(m_state[t]), "delay time-out");
      end
    end
    // a mutex and a semaphore, taken and given by the running thread
    mcr(4, 6, 0); mcr(4, 1, 0);
    settle(A_MUTEX_TAKE, 4, 1, 32'd1, "mutex taken");
    mcr(4, 2, 0);
    settle(A_MUTEX_GIVE, 4, 1, 32'd0, "mutex free");
    v = 32'($urandom_range(3, 1));
    mcr(5, 3, v); mcr(5, 4, 4); mcr(5, 6, 0);
    for (int k = 0; k < int'(v); k++) begin
      mcr(5, 1, 0);
      settle(A_SEM_TAKE, 5, 1, (k == int'(v) - 1) ? 32'd1 : 32'd0, "semaphore empty flag");
    end
    mcr(5, 2, 0);
    settle(A_SEM_GIVE, 5, 1, 32'd0, "semaphore available");
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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
    fiq_src = 0; irq_src = '0;
    foreach (lat_min[i]) begin lat_min[i] = 1 << 30; lat_max[i] = -1; lat_n[i] = 0; end

    repeat (ROUNDS) one_round();

    for (int i = 0; i < A_N; i++) begin
      $display("%-15s  samples %4d  cycles after the command: min %0d, variation %0d", api_name[i], lat_n[i],
               lat_min[i], lat_max[i] - lat_min[i]);
      check(lat_n[i] > 0, $sformatf("%s measured", api_name[i]));
      check(lat_max[i] == lat_min[i], $sformatf("%s latency does not vary", api_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
