// hw_scheduler_cp: the RT-SHADOWS hardware scheduler, an ARM coprocessor
// (CP14) tightly coupled to the multithreaded core.
//
// The core talks to it only through MCR (write) and MRC (read) instructions,
// decoded here as (CRn, opcode2) pairs; an MRC returns its data in the same
// cycle, an MCR takes effect at the next clock edge. Every command therefore
// completes in one cycle, whatever the number of threads or their
// priorities. Register map (CRn, op2):
//   C0 thread creation:  w0 start, w1 priority, w2 handler, w3 initial state,
//                        w5 initial stack pointer, w7 commit into a free slot;
//                        r0 number of created threads, r1 number suspended
//   C1 selected thread:  w0 select by handler (the self identifier selects the
//                        running thread), r0 handler or 0xFFFFFFFF; w/r1
//                        priority; w/r2 state; w/r3 stack pointer; w5 new
//                        handler; r6 best ready priority; w7 delay the
//                        running thread by wdata ticks
//   C2 scheduler:        w0 context switch; r1 running handler; r2 running
//                        priority; w/r5 running stack pointer; w6 tick
//                        increment; r6 lowest free thread slot or 0 if full;
//                        w/r7 scheduler on/off
//   C3 configuration:    0 modified LDM/STM, 1 thread register mode, 2 self
//                        identifier, 3 priority order (0: priority 0 highest),
//                        4 round-robin enable, 5 preemptive (1)/cooperative (0)
//   C4 mutexes:          w0 select, r0 handler or 0xFFFFFFFF; w1 take, r1
//                        taken; w2 give; w5 block the running thread for
//                        wdata ticks (0xFFFFFFFF: forever); w6 create; w7
//                        delete, r7 next free slot or 0xFFFFFFFF
//   C5 semaphores:       as C4, plus w3 initial count, w4 maximum count;
//                        r1 reads 1 when the count is zero
// Unlisted pairs write nothing and read zero.
//
// Each thread slot holds state, priority, handler, stack pointer and a delay
// time-stamp. Thread 0 is reserved for the kernel and is never scheduled;
// when no hardware thread is ready the running thread becomes 0. A context
// switch feeds every ready or running thread's priority to a balanced binary
// tree (prio_tree), marks the threads that hold the winning value
// (top-priority vector) and lets a fair arbiter pick one relative to the
// running thread. A single tick counter and per-thread delay logic wake
// delayed threads; the same time-stamps give mutex and semaphore waits a
// time-out, and a give wakes every thread waiting on that object (the
// software retries the take, so the highest-priority waiter wins); deleting
// a mutex or semaphore also makes its waiters ready.
// preempt_req tells the kernel, in preemptive mode, that a thread more
// urgent than the running one is ready (equal-priority peers wait for the
// next tick's round-robin switch instead).
//
// Follows the coprocessor register tables and the thread-management software;
// where the two disagree (C0 op3 and C2 op6) the software's use is followed.
// The C3 op4/op5 scheduling-mode registers, the state codes for blocked and
// running, wake-all on give and the one-cycle timing are this design's choices.
module hw_scheduler_cp
  import rts_pkg::*;
#(
  parameter int unsigned NTHREADS = 8,
  parameter int unsigned NMUTEX   = 8,
  parameter int unsigned NSEM     = 8,
  parameter int unsigned PRIO_W   = 8,
  localparam int unsigned TW = (NTHREADS > 1) ? $clog2(NTHREADS) : 1,
  localparam int unsigned MW = (NMUTEX > 1) ? $clog2(NMUTEX) : 1,
  localparam int unsigned SW = (NSEM > 1) ? $clog2(NSEM) : 1,
  localparam int unsigned OW = (MW > SW) ? MW : SW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cp_req_t           req,
  output logic [31:0]       rdata,
  // to the multithreaded datapath
  output logic [TW-1:0]     run_thread,
  output logic [TW-1:0]     ubank_thread,
  output logic              ldm_stm_mod,
  output logic [4:0]        reg_mode,
  // status
  output logic [PRIO_W-1:0] run_prio,
  output logic              sched_on,
  output logic              preempt_req,
  output logic              cs_evt,       // a context switch was executed
  output logic [31:0]       tick_count
);
  // ---------------------------------------------------------------- storage
  thread_state_e [NTHREADS-1:0]   state;
  logic [NTHREADS-1:0][PRIO_W-1:0] prio;
  logic [NTHREADS-1:0][31:0]       handler, sp, stamp;
  logic [NTHREADS-1:0]             fwait;
  wait_kind_e [NTHREADS-1:0]      wkind;
  logic [NTHREADS-1:0][OW-1:0]     widx;

  logic [31:0] tick_q, self_id;
  logic        order_q, rr_q, preempt_q, sched_q, mod_q;
  logic [4:0]  mode_q;
  logic [TW-1:0] run_q;

  logic          creating;
  logic [TW-1:0] new_slot;
  logic [PRIO_W-1:0] new_prio;
  logic [31:0]   new_handler, new_sp;
  thread_state_e new_state;

  logic          sel_v;
  logic [TW-1:0] sel_q;

  // ---------------------------------------------------------------- decode
  logic wr, rd;
  assign wr = req.valid && req.write;
  assign rd = req.valid && !req.write;
  function automatic logic hit(input logic [3:0] crn, input logic [2:0] op);
    return req.crn == crn && req.op2 == op;
  endfunction

  // ---------------------------------------------------------- delay logic
  thread_state_e [NTHREADS-1:0] state_eff;
  logic [NTHREADS-1:0]          expired;
  for (genvar t = 0; t < NTHREADS; t++) begin : g_dly
    thread_delay_logic u_dly (
      .state_in(state[t]), .stamp(stamp[t]), .tick(tick_q),
      .forever_wait(fwait[t]), .state_out(state_eff[t]), .expired(expired[t])
    );
  end

  // --------------------------------------------------------- scheduling
  logic [NTHREADS-1:0] cand, tpv;
  logic [PRIO_W-1:0]   best;
  logic                any_cand;
  logic [TW-1:0]       grant;
  logic                grant_v;

  always_comb begin
    for (int t = 0; t < NTHREADS; t++)
      cand[t] = (t != 0) && (state_eff[t] == TS_READY || state_eff[t] == TS_RUNNING);
  end

  prio_tree #(.N(NTHREADS), .W(PRIO_W)) u_tree (
    .prio(prio), .cand(cand), .lo_is_high(!order_q), .best(best), .any(any_cand)
  );

  always_comb begin
    for (int t = 0; t < NTHREADS; t++) tpv[t] = cand[t] && (prio[t] == best);
  end

  fair_arbiter #(.N(NTHREADS)) u_arb (
    .req(tpv), .last(run_q), .rr_en(rr_q), .grant(grant), .grant_valid(grant_v)
  );

  // ------------------------------------------------- free slot / counters
  logic [TW-1:0] free_slot;
  logic          free_v;
  logic [31:0]   n_created, n_susp;
  always_comb begin
    free_slot = '0;
    free_v    = 1'b0;
    n_created = '0;
    n_susp    = '0;
    for (int t = NTHREADS - 1; t >= 1; t--) begin
      if (state[t] == TS_VOID) begin
        free_slot = TW'(t);
        free_v    = 1'b1;
      end
      if (state[t] != TS_VOID)      n_created = n_created + 1;
      if (state[t] == TS_SUSPENDED) n_susp    = n_susp + 1;
    end
  end

  // ------------------------------------------------ thread select (C1 op0)
  logic          find_v;
  logic [TW-1:0] find_idx;
  always_comb begin
    find_v   = 1'b0;
    find_idx = '0;
    if (req.wdata == self_id && run_q != '0) begin
      find_v   = 1'b1;
      find_idx = run_q;
    end else begin
      for (int t = NTHREADS - 1; t >= 1; t--) begin
        if (state[t] != TS_VOID && handler[t] == req.wdata) begin
          find_v   = 1'b1;
          find_idx = TW'(t);
        end
      end
    end
  end
  logic sel_found;
  assign sel_found = sel_v && state[sel_q] != TS_VOID;

  // ------------------------------------------------- mutexes, semaphores
  logic          m_found, m_taken, m_free_v, m_give;
  logic [MW-1:0] m_idx, m_free, m_give_idx;
  logic [TW-1:0] m_owner;
  hw_mutex_bank #(.NMUTEX(NMUTEX), .TIDW(TW)) u_mutex (
    .clk, .rst_n,
    .select(wr && hit(4, 0)), .sel_handler(req.wdata),
    .create(wr && hit(4, 6)), .destroy(wr && hit(4, 7)),
    .take(wr && hit(4, 1)), .give(wr && hit(4, 2)), .owner_in(run_q),
    .sel_found(m_found), .sel_idx(m_idx), .sel_taken(m_taken), .sel_owner(m_owner),
    .next_free(m_free), .free_avail(m_free_v), .give_evt(m_give), .give_idx(m_give_idx)
  );

  logic          s_found, s_empty, s_free_v, s_give;
  logic [SW-1:0] s_idx, s_free, s_give_idx;
  hw_semaphore_bank #(.NSEM(NSEM)) u_sem (
    .clk, .rst_n,
    .set_init(wr && hit(5, 3)), .set_max(wr && hit(5, 4)), .wdata(req.wdata),
    .select(wr && hit(5, 0)), .sel_handler(req.wdata),
    .create(wr && hit(5, 6)), .destroy(wr && hit(5, 7)),
    .take(wr && hit(5, 1)), .give(wr && hit(5, 2)),
    .sel_found(s_found), .sel_idx(s_idx), .sel_empty(s_empty), .sel_count(),
    .next_free(s_free), .free_avail(s_free_v), .give_evt(s_give), .give_idx(s_give_idx)
  );

  logic m_del, s_del;
  assign m_del = wr && hit(4, 7) && m_found;
  assign s_del = wr && hit(5, 7) && s_found;

  // ----------------------------------------------------------- read mux
  always_comb begin
    rdata = '0;
    if (rd) begin
      unique case ({req.crn, req.op2})
        {4'd0, 3'd0}: rdata = n_created;
        {4'd0, 3'd1}: rdata = n_susp;
        {4'd1, 3'd0}: rdata = sel_found ? handler[sel_q] : NOT_FOUND;
        {4'd1, 3'd1}: rdata = sel_found ? 32'(prio[sel_q]) : '0;
        {4'd1, 3'd2}: rdata = sel_found ? 32'(state_eff[sel_q]) : '0;
        {4'd1, 3'd3}: rdata = sel_found ? sp[sel_q] : '0;
        {4'd1, 3'd6}: rdata = any_cand ? 32'(best) : NOT_FOUND;
        {4'd2, 3'd1}: rdata = (run_q != '0) ? handler[run_q] : NOT_FOUND;
        {4'd2, 3'd2}: rdata = 32'(prio[run_q]);
        {4'd2, 3'd5}: rdata = sp[run_q];
        {4'd2, 3'd6}: rdata = free_v ? 32'(free_slot) : '0;
        {4'd2, 3'd7}: rdata = 32'(sched_q);
        {4'd3, 3'd0}: rdata = 32'(mod_q);
        {4'd3, 3'd1}: rdata = 32'(mode_q);
        {4'd3, 3'd2}: rdata = self_id;
        {4'd3, 3'd3}: rdata = 32'(order_q);
        {4'd3, 3'd4}: rdata = 32'(rr_q);
        {4'd3, 3'd5}: rdata = 32'(preempt_q);
        {4'd4, 3'd0}: rdata = m_found ? 32'(m_idx) : NOT_FOUND;
        {4'd4, 3'd1}: rdata = 32'(m_taken);
        {4'd4, 3'd7}: rdata = m_free_v ? 32'(m_free) : NOT_FOUND;
        {4'd5, 3'd0}: rdata = s_found ? 32'(s_idx) : NOT_FOUND;
        {4'd5, 3'd1}: rdata = 32'(s_empty);
        {4'd5, 3'd7}: rdata = s_free_v ? 32'(s_free) : NOT_FOUND;
        default:      rdata = '0;
      endcase
    end
  end

  // ------------------------------------------------------ state update
  logic do_cs;
  assign do_cs = wr && hit(2, 0) && sched_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTHREADS; t++) begin
        state[t] <= TS_VOID;
        wkind[t] <= WAIT_NONE;
      end
      prio <= '0; handler <= '0; sp <= '0; stamp <= '0; fwait <= '0; widx <= '0;
      tick_q <= '0; self_id <= '0; order_q <= 1'b0; rr_q <= 1'b0; preempt_q <= 1'b1;
      sched_q <= 1'b0; mod_q <= 1'b0; mode_q <= M_SYS; run_q <= '0;
      creating <= 1'b0; new_slot <= '0; new_prio <= '0; new_handler <= '0;
      new_sp <= '0; new_state <= TS_READY; sel_v <= 1'b0; sel_q <= '0;
    end else begin
      // delay logic: expired threads become ready, their wait ends
      for (int t = 0; t < NTHREADS; t++) begin
        state[t] <= state_eff[t];
        if (expired[t]) wkind[t] <= WAIT_NONE;
      end
      // a give, or deleting the object, wakes the threads waiting on it
      for (int t = 0; t < NTHREADS; t++) begin
        if (state[t] == TS_BLOCKED &&
            ((m_give && wkind[t] == WAIT_MUTEX && widx[t] == OW'(m_give_idx)) ||
             (m_del  && wkind[t] == WAIT_MUTEX && widx[t] == OW'(m_idx)) ||
             (s_give && wkind[t] == WAIT_SEM   && widx[t] == OW'(s_give_idx)) ||
             (s_del  && wkind[t] == WAIT_SEM   && widx[t] == OW'(s_idx)))) begin
          state[t] <= TS_READY;
          wkind[t] <= WAIT_NONE;
        end
      end

      if (wr) begin
        unique case ({req.crn, req.op2})
          // C0: creation
          {4'd0, 3'd0}: begin
            creating  <= free_v;
            new_slot  <= free_slot;
            new_state <= TS_READY;
          end
          {4'd0, 3'd1}: new_prio    <= req.wdata[PRIO_W-1:0];
          {4'd0, 3'd2}: new_handler <= req.wdata;
          {4'd0, 3'd3}: new_state   <= (req.wdata[3:0] == 4'(TS_SUSPENDED)) ? TS_SUSPENDED : TS_READY;
          {4'd0, 3'd5}: new_sp      <= req.wdata;
          {4'd0, 3'd7}: if (creating && state[new_slot] == TS_VOID) begin
            state[new_slot]   <= new_state;
            prio[new_slot]    <= new_prio;
            handler[new_slot] <= new_handler;
            sp[new_slot]      <= new_sp;
            wkind[new_slot]   <= WAIT_NONE;
            fwait[new_slot]   <= 1'b0;
            creating          <= 1'b0;
          end
          // C1: selected thread
          {4'd1, 3'd0}: begin
            sel_v <= find_v;
            sel_q <= find_idx;
          end
          {4'd1, 3'd1}: if (sel_found) prio[sel_q] <= req.wdata[PRIO_W-1:0];
          {4'd1, 3'd2}: if (sel_found) begin
            state[sel_q] <= thread_state_e'(req.wdata[3:0]);
            wkind[sel_q] <= WAIT_NONE;
            fwait[sel_q] <= 1'b1;   // a blocked state set here has no time-out
          end
          {4'd1, 3'd3}: if (sel_found) sp[sel_q] <= req.wdata;
          {4'd1, 3'd5}: if (sel_found) handler[sel_q] <= req.wdata;
          {4'd1, 3'd7}: if (run_q != '0 && req.wdata != '0) begin
            state[run_q] <= TS_BLOCKED;
            stamp[run_q] <= tick_q + req.wdata;
            fwait[run_q] <= 1'b0;
            wkind[run_q] <= WAIT_DELAY;
          end
          // C2: scheduler
          {4'd2, 3'd0}: if (do_cs) begin
            if (run_q != '0 && state_eff[run_q] == TS_RUNNING && !(grant_v && grant == run_q))
              state[run_q] <= TS_READY;
            if (grant_v) begin
              state[grant] <= TS_RUNNING;
              run_q        <= grant;
            end else begin
              run_q        <= '0;
            end
          end
          {4'd2, 3'd5}: if (run_q != '0) sp[run_q] <= req.wdata;
          {4'd2, 3'd6}: tick_q  <= tick_q + 1;
          {4'd2, 3'd7}: sched_q <= req.wdata[0];
          // C3: configuration
          {4'd3, 3'd0}: mod_q     <= req.wdata[0];
          {4'd3, 3'd1}: mode_q    <= req.wdata[4:0];
          {4'd3, 3'd2}: self_id   <= req.wdata;
          {4'd3, 3'd3}: order_q   <= req.wdata[0];
          {4'd3, 3'd4}: rr_q      <= req.wdata[0];
          {4'd3, 3'd5}: preempt_q <= req.wdata[0];
          // C4/C5: block the running thread on the selected object
          {4'd4, 3'd5}: if (run_q != '0 && m_found) begin
            state[run_q] <= TS_BLOCKED;
            stamp[run_q] <= tick_q + req.wdata;
            fwait[run_q] <= (req.wdata == NOT_FOUND);
            wkind[run_q] <= WAIT_MUTEX;
            widx[run_q]  <= OW'(m_idx);
          end
          {4'd5, 3'd5}: if (run_q != '0 && s_found) begin
            state[run_q] <= TS_BLOCKED;
            stamp[run_q] <= tick_q + req.wdata;
            fwait[run_q] <= (req.wdata == NOT_FOUND);
            wkind[run_q] <= WAIT_SEM;
            widx[run_q]  <= OW'(s_idx);
          end
          default: ;
        endcase
      end
    end
  end

  // --------------------------------------------------------------- outputs
  assign run_thread   = run_q;
  assign ubank_thread = creating ? new_slot : run_q;
  assign ldm_stm_mod  = mod_q;
  assign reg_mode     = mode_q;
  assign run_prio     = prio[run_q];
  assign sched_on     = sched_q;
  assign tick_count   = tick_q;
  assign cs_evt       = do_cs;
  assign preempt_req  = sched_q && preempt_q && grant_v && !(run_q != '0 && tpv[run_q]);

  // unused here, kept for debug visibility of who owns the selected mutex
  logic unused_ok;
  assign unused_ok = ^m_owner;
endmodule
