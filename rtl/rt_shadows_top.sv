// rt_shadows_top: the RT-SHADOWS real-time multithreading support around an
// ARMv5TE core, as one SoC-level block.
//
// RT-SHADOWS moves the RTOS scheduler into a CP14 coprocessor that is tightly
// coupled to a multithreaded core, so that thread creation, context switches,
// delays, mutexes and semaphores are single MCR/MRC instructions, and gives
// every hardware thread its own registers so a context switch or an interrupt
// needs no register save. This top holds everything of that system except the
// processor pipeline, caches, MMU and the SD, DDR and USART controllers,
// whose connections are brought out as ports:
//   - hw_scheduler_cp (CP14): driven by the cp_* port, as the core would on
//     MCR/MRC; its running thread, user-bank thread, register mode and
//     LDM/STM setting drive the register file.
//   - mt_regfile + mt_hazard_unit: the per-thread register files and the
//     thread-tagged hazard logic of the pipeline, ports rf_* and hz_*.
//   - soc_bus_decoder: decodes the core's data bus (bus_*) with REMAP, feeding
//     taic, pit and perf_monitor through pbus_if; SD, RAM and USART accesses
//     leave on ext_* and wait for the memory controller's ready, which
//     crosses clock domains through sync_2ff.
//   - taic: interrupt sources are fiq_src (source 0), the system peripherals
//     PIT and performance monitor (source 1, as on the cloned SoC) and
//     irq_src[31:2].
//   - cp15_cacheability: says whether the current data access may be cached.
// Bus reads are combinational and writes take effect at the clock edge.
// Module choices and interconnect follow the SoC and RT-SHADOWS block
// diagrams; the source-1 sharing and the port-level split are this design's.
module rt_shadows_top
  import rts_pkg::*;
#(
  parameter int unsigned NTHREADS = 8,
  parameter int unsigned NMUTEX   = 8,
  parameter int unsigned NSEM     = 8,
  parameter int unsigned NSRC     = 32,
  parameter int unsigned PIT_PRESCALE = 16,
  localparam int unsigned TW = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // CP14 coprocessor port (MCR/MRC)
  input  logic            cp_valid,
  input  logic            cp_write,
  input  logic [3:0]      cp_crn,
  input  logic [2:0]      cp_op2,
  input  logic [31:0]     cp_wdata,
  output logic [31:0]     cp_rdata,
  // scheduler status
  output logic [TW-1:0]   run_thread,
  output logic [7:0]      run_prio,
  output logic            sched_on,
  output logic            preempt_req,
  output logic            cs_evt,
  output logic [31:0]     tick_count,
  // data bus from the core
  input  logic            bus_valid,
  input  logic            bus_we,
  input  logic [31:0]     bus_addr,
  input  logic [31:0]     bus_wdata,
  output logic [31:0]     bus_rdata,
  output logic            bus_ready,
  output logic            bus_cacheable,
  // toward the SD, RAM (DDR) and USART controllers
  output logic [2:0]      ext_dev,
  output logic [31:0]     ext_offset,
  input  logic [31:0]     ext_rdata,
  input  logic            mem_ready_async,
  output logic            remap,
  // CP15 peripheral-cacheability register and cache/MMU state
  input  logic            cp15_we,
  input  logic [31:0]     cp15_wdata,
  input  logic            dcache_en,
  input  logic            mmu_en,
  input  logic            pte_cacheable,
  // register file (decode reads, write-back writes, status registers)
  input  logic [TW-1:0]   rf_rd_th,
  input  logic [4:0]      rf_rd_mode,
  input  logic [3:0]      rf_ra_addr,
  input  logic            rf_ra_user,
  output logic [31:0]     rf_ra_data,
  input  logic [3:0]      rf_rb_addr,
  input  logic            rf_rb_user,
  output logic [31:0]     rf_rb_data,
  input  logic            rf_we,
  input  logic [TW-1:0]   rf_w_th,
  input  logic [4:0]      rf_w_mode,
  input  logic [3:0]      rf_w_addr,
  input  logic            rf_w_user,
  input  logic [31:0]     rf_w_data,
  output logic [31:0]     rf_cpsr,
  output logic [31:0]     rf_spsr,
  input  logic            rf_cpsr_we,
  input  logic [TW-1:0]   rf_cpsr_th,
  input  logic [31:0]     rf_cpsr_wdata,
  input  logic            rf_spsr_we,
  input  logic [4:0]      rf_spsr_mode,
  input  logic [31:0]     rf_spsr_wdata,
  // hazard detection (thread tags and registers of decode, execute, memory)
  input  logic [TW-1:0]   hz_id_th,
  input  logic [3:0]      hz_id_rn,
  input  logic            hz_id_use_rn,
  input  logic [3:0]      hz_id_rm,
  input  logic            hz_id_use_rm,
  input  logic [TW-1:0]   hz_ex_th,
  input  logic [3:0]      hz_ex_rd,
  input  logic            hz_ex_we,
  input  logic            hz_ex_load,
  input  logic [TW-1:0]   hz_mem_th,
  input  logic [3:0]      hz_mem_rd,
  input  logic            hz_mem_we,
  output logic [1:0]      hz_fwd_rn,
  output logic [1:0]      hz_fwd_rm,
  output logic            hz_stall,
  // pipeline events watched by the performance monitor
  input  logic            pm_if_valid,
  input  logic [31:0]     pm_if_addr,
  input  logic            pm_wb_valid,
  input  logic [31:0]     pm_wb_addr,
  // interrupts
  input  logic            fiq_src,
  input  logic [NSRC-1:2] irq_src,
  output logic            irq,
  output logic            fiq,
  output logic            irq_held,
  output logic            pit_tick
);
  // ------------------------------------------------------------- CP14
  cp_req_t       cp_req;
  logic [TW-1:0] ubank_thread;
  logic          ldm_stm_mod;
  logic [4:0]    reg_mode;
  assign cp_req = '{valid: cp_valid, write: cp_write, crn: cp_crn, op2: cp_op2, wdata: cp_wdata};

  hw_scheduler_cp #(.NTHREADS(NTHREADS), .NMUTEX(NMUTEX), .NSEM(NSEM), .PRIO_W(8)) u_sched (
    .clk, .rst_n, .req(cp_req), .rdata(cp_rdata),
    .run_thread, .ubank_thread, .ldm_stm_mod, .reg_mode,
    .run_prio, .sched_on, .preempt_req, .cs_evt, .tick_count
  );

  // ---------------------------------------------------- register file
  mt_regfile #(.NTHREADS(NTHREADS)) u_rf (
    .clk, .rst_n, .reg_mode, .ldm_stm_mod, .ubank_thread,
    .rd_th(rf_rd_th), .rd_mode(rf_rd_mode),
    .ra_addr(rf_ra_addr), .ra_user(rf_ra_user), .ra_data(rf_ra_data),
    .rb_addr(rf_rb_addr), .rb_user(rf_rb_user), .rb_data(rf_rb_data),
    .we(rf_we), .w_th(rf_w_th), .w_mode(rf_w_mode), .w_addr(rf_w_addr),
    .w_user(rf_w_user), .w_data(rf_w_data),
    .cpsr(rf_cpsr), .spsr(rf_spsr),
    .cpsr_we(rf_cpsr_we), .cpsr_th(rf_cpsr_th), .cpsr_wdata(rf_cpsr_wdata),
    .spsr_we(rf_spsr_we), .spsr_mode(rf_spsr_mode), .spsr_wdata(rf_spsr_wdata)
  );

  mt_hazard_unit #(.TID_W(TW)) u_hz (
    .id_th(hz_id_th), .id_rn(hz_id_rn), .id_use_rn(hz_id_use_rn),
    .id_rm(hz_id_rm), .id_use_rm(hz_id_use_rm),
    .ex_th(hz_ex_th), .ex_rd(hz_ex_rd), .ex_we(hz_ex_we), .ex_load(hz_ex_load),
    .mem_th(hz_mem_th), .mem_rd(hz_mem_rd), .mem_we(hz_mem_we),
    .fwd_rn(hz_fwd_rn), .fwd_rm(hz_fwd_rm), .stall(hz_stall)
  );

  // ------------------------------------------------------- system bus
  dev_e        dev;
  logic [31:0] offset;
  soc_bus_decoder u_dec (
    .clk, .rst_n, .valid(bus_valid), .we(bus_we), .addr(bus_addr),
    .dev, .offset, .remap
  );
  assign ext_dev    = dev;
  assign ext_offset = offset;

  pbus_if aic_bus ();
  pbus_if pit_bus ();
  pbus_if pm_bus ();
  assign aic_bus.sel = bus_valid && dev == DEV_AIC;
  assign pit_bus.sel = bus_valid && dev == DEV_PIT;
  assign pm_bus.sel  = bus_valid && dev == DEV_PM;
  assign {aic_bus.we, pit_bus.we, pm_bus.we} = {3{bus_we}};
  assign aic_bus.addr = offset[11:0];
  assign pit_bus.addr = offset[11:0];
  assign pm_bus.addr  = offset[11:0];
  assign aic_bus.wdata = bus_wdata;
  assign pit_bus.wdata = bus_wdata;
  assign pm_bus.wdata  = bus_wdata;

  always_comb begin
    case (dev)
      DEV_AIC:   bus_rdata = aic_bus.rdata;
      DEV_PIT:   bus_rdata = pit_bus.rdata;
      DEV_PM:    bus_rdata = pm_bus.rdata;
      DEV_REMAP: bus_rdata = {31'b0, remap};
      DEV_SD, DEV_RAM, DEV_USART: bus_rdata = ext_rdata;
      default:   bus_rdata = '0;
    endcase
  end

  logic mem_ready;
  sync_2ff #(.W(1)) u_sync (.clk, .rst_n, .d(mem_ready_async), .q(mem_ready));
  assign bus_ready = (dev == DEV_SD || dev == DEV_RAM) ? mem_ready : 1'b1;

  cp15_cacheability u_c15 (
    .clk, .rst_n, .cfg_we(cp15_we), .cfg_wdata(cp15_wdata), .periph_uncache(),
    .dcache_en, .mmu_en, .pte_cacheable, .addr(bus_addr), .cacheable(bus_cacheable)
  );

  // ------------------------------------------------------- peripherals
  logic pit_irq, pm_irq;
  pit #(.PRESCALE(PIT_PRESCALE)) u_pit (.clk, .rst_n, .bus(pit_bus), .irq(pit_irq), .tick(pit_tick));
  perf_monitor u_pm (
    .clk, .rst_n, .bus(pm_bus),
    .if_valid(pm_if_valid), .if_addr(pm_if_addr),
    .wb_valid(pm_wb_valid), .wb_addr(pm_wb_addr), .irq(pm_irq)
  );

  logic [NSRC-1:0] src;
  assign src = {irq_src, pit_irq | pm_irq, fiq_src};
  taic #(.NSRC(NSRC)) u_taic (
    .clk, .rst_n, .bus(aic_bus), .src, .irq, .fiq, .irq_held, .rtp_o()
  );
endmodule
