// rts_pkg: types and constants shared by the RT-SHADOWS hardware.
//
// Holds the hardware-thread state encoding used by the CP14 scheduler, the
// MCR/MRC request bundle between core and coprocessor, the ARM processor
// modes seen by the multithreaded register file, and the SoC memory map.
//
// Thread state codes follow the values the thread-management software writes
// to the state register (0 deletes, 2 suspends, 4 makes ready); the codes for
// blocked (1) and running (8) are this design's choice. Memory map addresses
// follow the SoC address layout; register offsets inside each peripheral are
// given in that peripheral's module.
package rts_pkg;

  // Hardware thread states (Fig. "hardware threads state machine").
  typedef enum logic [3:0] {
    TS_VOID      = 4'h0,
    TS_BLOCKED   = 4'h1,
    TS_SUSPENDED = 4'h2,
    TS_READY     = 4'h4,
    TS_RUNNING   = 4'h8
  } thread_state_e;

  // What a blocked thread is waiting for.
  typedef enum logic [1:0] {
    WAIT_NONE  = 2'd0,
    WAIT_DELAY = 2'd1,
    WAIT_MUTEX = 2'd2,
    WAIT_SEM   = 2'd3
  } wait_kind_e;

  // One coprocessor access: MCR (write) or MRC (read) to CRn with opcode2.
  typedef struct packed {
    logic        valid;
    logic        write;   // 1: MCR, 0: MRC
    logic [3:0]  crn;
    logic [2:0]  op2;
    logic [31:0] wdata;
  } cp_req_t;

  localparam logic [31:0] NOT_FOUND = 32'hFFFF_FFFF;

  // ARM processor modes (CPSR[4:0]).
  typedef enum logic [4:0] {
    M_USR = 5'h10,
    M_FIQ = 5'h11,
    M_IRQ = 5'h12,
    M_SVC = 5'h13,
    M_ABT = 5'h17,
    M_UND = 5'h1B,
    M_SYS = 5'h1F
  } arm_mode_e;

  // System bus targets.
  typedef enum logic [2:0] {
    DEV_NONE  = 3'd0,
    DEV_SD    = 3'd1,
    DEV_RAM   = 3'd2,
    DEV_USART = 3'd3,
    DEV_AIC   = 3'd4,
    DEV_PIT   = 3'd5,
    DEV_REMAP = 3'd6,
    DEV_PM    = 3'd7
  } dev_e;

  localparam logic [31:0] USART_BASE = 32'hFFFB_0000;
  localparam logic [31:0] USART_LAST = 32'hFFFB_3FFF;
  localparam logic [31:0] AIC_BASE   = 32'hFFFF_F000;
  localparam logic [31:0] AIC_LAST   = 32'hFFFF_F1FF;
  localparam logic [31:0] PIT_BASE   = 32'hFFFF_FD30;
  localparam logic [31:0] PIT_LAST   = 32'hFFFF_FD3F;
  localparam logic [31:0] REMAP_BASE = 32'hFFFF_FD50;
  localparam logic [31:0] REMAP_LAST = 32'hFFFF_FD5F;
  localparam logic [31:0] PM_BASE    = 32'hFFFF_FD80;
  localparam logic [31:0] PM_LAST    = 32'hFFFF_FD9F;

endpackage
