// tb_taic_experiment: the unified-priority-space experiment, run on the whole
// system at its default sizes.
//
// Thread set: four compute threads T1-T4 at the most urgent priority (4),
// created suspended, and a low-priority thread T5 (priority 1) that
// configures the serial-receive interrupt, resumes T1 and then only echoes
// characters. Each of T1-T3 resumes the next one when it starts, so the four
// share the CPU round-robin on the PIT tick; each finishes after WORK cycles
// of its own execution and deletes itself. Serial characters arrive every
// RATE cycles; their handler occupies the CPU for ISR_LEN cycles.
//
// The testbench is the CPU: every cycle it either services a pending IRQ
// (vector read, handler, end of interrupt; the tick handler advances the
// tick, switches context and updates RTP) or gives one cycle of execution to
// the running thread. The run is done twice, from reset:
//   dual priority space   - the kernel never writes RTP, so the controller
//                           behaves as a plain AIC and every serial interrupt
//                           halts T1-T4;
//   unified (TAIC)        - the kernel writes RTP on every switch; the
//                           serial interrupt, which inherited T5's priority,
//                           waits until T1-T4 are finished.
// Checks: with the TAIC no serial handler runs while T1-T4 run, they finish
// sooner than in the dual case by the handler time, the held characters are
// handled once T5 runs, and in the dual case handlers do interrupt T1-T4.
module tb_taic_experiment;
  import rts_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int WORK    = 2500;   // execution cycles of each of T1-T4
  localparam int RATE    = 700;    // cycles between received characters
  localparam int ISR_LEN = 120;    // cycles of the serial handler
  localparam int PIV     = 39;     // tick every (39+1)*16 = 640 cycles

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

  localparam logic [31:0] AIC  = 32'hFFFF_F000;
  localparam logic [31:0] PIT  = 32'hFFFF_FD30;
  localparam logic [31:0] SELF = 32'h5E1F_0000;

  bit unified;                     // kernel keeps RTP up to date
  int cyc;
  always @(posedge clk) cyc++;

  // serial receiver: a character every RATE cycles into a receive buffer;
  // the line stays high until the handler has emptied the buffer
  int rx_arrived, rx_handled;
  bit rx_run;
  always @(posedge clk) begin
    if (!rx_run) rx_arrived <= 0;
    else if (cyc % RATE == 0) begin
      irq_src[5] <= 1'b1;
      rx_arrived <= rx_arrived + 1;
    end
  end

  task automatic switch_ctx();
    logic [31:0] d;
    mcr(2, 0, 0);
    if (unified) begin
      mrc(2, 2, d);
      bwr(AIC + 32'h14C, d);
    end
  endtask

  task automatic create(input logic [31:0] h, input int p, input int st);
    mcr(0, 0, 0); mcr(0, 1, 32'(p)); mcr(0, 2, h); mcr(0, 3, 32'(st));
    mcr(0, 5, 32'h8000_0000 | h); mcr(0, 7, 0);
  endtask

  task automatic resume(input logic [31:0] h);
    mcr(1, 0, h); mcr(1, 2, 4);
  endtask

  // one experiment; returns the cycles T1-T4 took and the serial handlers
  // that ran while one of them was the running thread
  task automatic run_experiment(output int t14, output int disturbed, output int held_after);
    logic [31:0] d;
    int work [8];
    bit started [8];
    int slot_of [logic [31:0]];
    int t_start, t_end, done_cnt;
    bit t5_configured;
    logic [31:0] hnd [5] = '{32'hA1, 32'hA2, 32'hA3, 32'hA4, 32'hA5};
    disturbed = 0; held_after = 0; done_cnt = 0; t5_configured = 0; t_start = 0; t_end = 0;
    foreach (work[i]) begin work[i] = 0; started[i] = 0; end
    // reset the system
    @(negedge clk) rst_n = 0; rx_run = 0; irq_src = '0; rx_handled = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // kernel boot: configuration, tick interrupt, threads
    mcr(3, 1, 32'h1F); mcr(3, 0, 1); mcr(3, 2, SELF); mcr(3, 3, 1); mcr(3, 4, 1);
    bwr(AIC + 32'h14C, 32'hFF);
    bwr(AIC + 32'h004, 32'd7); bwr(AIC + 32'h084, 32'h11); bwr(AIC + 32'h120, 32'h2);
    bwr(AIC + 32'h14C, 32'h0);
    for (int i = 0; i < 4; i++) begin
      mrc(2, 6, d); slot_of[hnd[i]] = int'(d);
      create(hnd[i], 4, 2);                      // suspended
    end
    mrc(2, 6, d); slot_of[hnd[4]] = int'(d);
    create(hnd[4], 1, 4);
    mcr(2, 7, 1);
    switch_ctx();
    bwr(PIT, 32'h0300_0000 | PIV);
    rx_run = 1;
    // CPU loop
    while (done_cnt < 4 || rx_handled < rx_arrived || !t5_configured) begin
      if (cyc > 200000) break;
      if (irq) begin
        brd(AIC + 32'h100, d);
        if (d == 32'h11) begin                   // tick
          brd(PIT + 32'h8, d);
          mcr(2, 6, 0);
          switch_ctx();
        end else if (d == 32'h55) begin          // serial character
          if (int'(run_thread) inside {slot_of[hnd[0]], slot_of[hnd[1]], slot_of[hnd[2]], slot_of[hnd[3]]})
            disturbed++;
          irq_src[5] = 0;
          repeat (ISR_LEN) @(posedge clk);
          rx_handled = rx_arrived;               // drains the receive buffer
        end
        bwr(AIC + 32'h130, 0);
      end else begin
        int t;
        t = int'(run_thread);
        if (t == slot_of[hnd[4]] && !t5_configured) begin
          // T5: configure the serial interrupt, then release T1
          bwr(AIC + 32'h014, 32'd2); bwr(AIC + 32'h094, 32'h55); bwr(AIC + 32'h120, 32'h20);
          t5_configured = 1;
          t_start = cyc;
          resume(hnd[0]);
          switch_ctx();
        end else if (t != 0 && t != slot_of[hnd[4]]) begin
          if (!started[t]) begin
            started[t] = 1;
            for (int i = 0; i < 3; i++) if (slot_of[hnd[i]] == t) resume(hnd[i + 1]);
          end else begin
            @(posedge clk); #1 work[t]++;
            if (work[t] == WORK) begin
              done_cnt++;
              if (done_cnt == 4) begin
                t_end = cyc;
                held_after = rx_arrived - rx_handled;
              end
              mcr(1, 0, SELF); mcr(1, 2, 0);     // delete itself
              switch_ctx();
            end
          end
        end else begin
          @(posedge clk); #1;                    // T5 echo loop or idle
        end
      end
    end
    check(done_cnt == 4, "T1-T4 completed");
    check(rx_handled == rx_arrived, "every character handled in the end");
    rx_run = 0;
    bwr(PIT, 0);
    t14 = t_end - t_start;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_dual, t_uni, dist_dual, dist_uni, held_dual, held_uni;
    cp_valid = 0; cp_write = 0; cp_crn = 0; cp_op2 = 0; cp_wdata = 0;
    bus_valid = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0; ext_rdata = 0;
    mem_ready_async = 1; cp15_we = 0; cp15_wdata = 0; dcache_en = 0; mmu_en = 0; pte_cacheable = 0;
    rf_rd_th = 0; rf_w_th = 0; rf_cpsr_th = 0; rf_rd_mode = 5'h13; rf_w_mode = 5'h13; rf_spsr_mode = 5'h13;
    rf_ra_addr = 0; rf_rb_addr = 0; rf_w_addr = 0; rf_ra_user = 0; rf_rb_user = 0; rf_we = 0;
    rf_w_user = 0; rf_cpsr_we = 0; rf_spsr_we = 0; rf_w_data = 0; rf_cpsr_wdata = 0; rf_spsr_wdata = 0;
    hz_id_th = 0; hz_ex_th = 0; hz_mem_th = 0; hz_id_rn = 0; hz_id_rm = 0; hz_ex_rd = 0; hz_mem_rd = 0;
    hz_id_use_rn = 0; hz_id_use_rm = 0; hz_ex_we = 0; hz_ex_load = 0; hz_mem_we = 0;
    pm_if_valid = 0; pm_wb_valid = 0; pm_if_addr = 0; pm_wb_addr = 0;
    fiq_src = 0; irq_src = '0; cyc = 0; rx_run = 0;

    unified = 0; run_experiment(t_dual, dist_dual, held_dual);
    unified = 1; run_experiment(t_uni, dist_uni, held_uni);
    $display("dual priority space: T1-4 took %0d cycles, %0d serial handlers interrupted them", t_dual, dist_dual);
    $display("unified (TAIC):      T1-4 took %0d cycles, %0d serial handlers interrupted them, %0d held to the end",
             t_uni, dist_uni, held_uni);
    check(dist_dual > 0, "dual space: low-priority handlers halt T1-T4");
    check(dist_uni == 0, "TAIC: no low-priority handler while T1-T4 run");
    check(held_uni > 0, "TAIC: characters held until T5 runs");
    check(t_uni < t_dual, "TAIC: T1-T4 finish sooner");
    check(t_dual - t_uni >= (dist_dual - 1) * ISR_LEN,
          $sformatf("saving covers the handler time (%0d vs %0d)", t_dual - t_uni, dist_dual * ISR_LEN));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
