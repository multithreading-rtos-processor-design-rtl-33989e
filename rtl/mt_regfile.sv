// mt_regfile: register file and status registers of the multithreaded ARM
// core.
//
// Thread 0 is the kernel thread and keeps the full ARM register view: R0-R15
// shared by user and system mode, R8-R14 banked for FIQ, R13-R14 banked for
// supervisor, abort, undefined and IRQ, and one SPSR per exception mode.
// Every other hardware thread owns a private R0-R15 and CPSR. An access made
// by thread th in processor mode reg_mode (the software-configured mode in
// which the RTOS runs its threads, e.g. system for one RTOS, supervisor for
// another) goes to that thread's private registers; in any other mode, or for
// thread 0, it goes to thread 0's banked registers. This is how an interrupt,
// which changes the mode, lands in the kernel thread without saving the
// interrupted thread's registers.
//
// The user-bank forms LDM^/STM^ (the *_user inputs) normally reach thread 0's
// user registers. When ldm_stm_mod is set they reach thread ubank_thread
// instead, which the scheduler points at the thread being created or at the
// running thread, so a context switch or thread creation fills or saves the
// right thread's registers.
//
// Two combinational read ports, one write port and one CPSR/SPSR write port,
// written at the clock edge. The register storage is not reset (as in a
// processor register file); CPSRs reset to supervisor mode with IRQ and FIQ
// masked. Port counts and reset values are this design's choices.
module mt_regfile
  import rts_pkg::*;
#(
  parameter int unsigned NTHREADS = 8,
  localparam int unsigned TW = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration from the CP14 scheduler
  input  logic [4:0]    reg_mode,
  input  logic          ldm_stm_mod,
  input  logic [TW-1:0] ubank_thread,
  // read ports: thread tag and mode of the instruction in decode
  input  logic [TW-1:0] rd_th,
  input  logic [4:0]    rd_mode,
  input  logic [3:0]    ra_addr,
  input  logic          ra_user,
  output logic [31:0]   ra_data,
  input  logic [3:0]    rb_addr,
  input  logic          rb_user,
  output logic [31:0]   rb_data,
  // write port: thread tag and mode of the instruction in write-back
  input  logic          we,
  input  logic [TW-1:0] w_th,
  input  logic [4:0]    w_mode,
  input  logic [3:0]    w_addr,
  input  logic          w_user,
  input  logic [31:0]   w_data,
  // status registers
  output logic [31:0]   cpsr,        // CPSR of thread rd_th
  output logic [31:0]   spsr,        // SPSR of thread 0 for rd_mode
  input  logic          cpsr_we,
  input  logic [TW-1:0] cpsr_th,
  input  logic [31:0]   cpsr_wdata,
  input  logic          spsr_we,
  input  logic [4:0]    spsr_mode,
  input  logic [31:0]   spsr_wdata
);
  // physical index: thread t register r at t*16+r (thread 0 = user/system
  // bank); then R8-R12 of FIQ; then R13,R14 of SVC, ABT, UND, IRQ, FIQ.
  localparam int unsigned NBASE = NTHREADS * 16;
  localparam int unsigned NREGS = NBASE + 15;
  localparam int unsigned PW    = $clog2(NREGS);

  logic [31:0] regs [NREGS];
  logic [NTHREADS-1:0][31:0] cpsr_q;
  logic [4:0][31:0]          spsr_q;   // SVC, ABT, UND, IRQ, FIQ

  function automatic int unsigned bank_of(input logic [4:0] m);
    case (m)
      M_SVC:   return 0;
      M_ABT:   return 1;
      M_UND:   return 2;
      M_IRQ:   return 3;
      M_FIQ:   return 4;
      default: return 5;   // user/system: no banking
    endcase
  endfunction

  function automatic logic [PW-1:0] phys(input logic [TW-1:0] th, input logic [4:0] m,
                                         input logic [3:0] r, input logic user);
    int unsigned t, b;
    if (user) t = ldm_stm_mod ? int'(ubank_thread) : 0;
    else      t = (th != '0 && m == reg_mode) ? int'(th) : 0;
    b = bank_of(m);
    if (t != 0 || user || b == 5)            return PW'(t * 16 + int'(r));
    if (b == 4 && r >= 4'd8 && r <= 4'd12)   return PW'(NBASE + int'(r) - 8);
    if (r == 4'd13 || r == 4'd14)            return PW'(NBASE + 5 + 2 * b + int'(r) - 13);
    return PW'(int'(r));
  endfunction

  assign ra_data = regs[phys(rd_th, rd_mode, ra_addr, ra_user)];
  assign rb_data = regs[phys(rd_th, rd_mode, rb_addr, rb_user)];
  assign cpsr    = cpsr_q[rd_th];
  always_comb begin
    spsr = '0;
    if (bank_of(rd_mode) < 5) spsr = spsr_q[bank_of(rd_mode)];
  end

  always_ff @(posedge clk) begin
    if (we) regs[phys(w_th, w_mode, w_addr, w_user)] <= w_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTHREADS; t++) cpsr_q[t] <= 32'h0000_00D3;
      spsr_q <= '0;
    end else begin
      if (cpsr_we) cpsr_q[cpsr_th] <= cpsr_wdata;
      if (spsr_we && bank_of(spsr_mode) < 5) spsr_q[bank_of(spsr_mode)] <= spsr_wdata;
    end
  end
endmodule
