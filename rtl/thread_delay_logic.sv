// thread_delay_logic: the per-thread part of the hardware delay timers.
//
// Instead of one down-counter per thread there is a single OS tick counter
// shared by all threads; each thread keeps a time-stamp, the tick value at
// which its delay or its blocking time ends. This block compares the two and
// selects the thread state seen by the scheduler: a blocked thread whose
// time-stamp has been reached comes out as ready, any other thread's state
// passes through. A thread waiting "forever" (for a mutex or semaphore with
// an infinite blocking time) never times out. Combinational.
//
// The comparison uses the difference tick - stamp read as a signed number, so
// a delay survives the wrap of the 32-bit tick counter as long as it is shorter
// than 2^31 ticks; this and the "reached" (>=) reading of the comparison are
// this design's choices.
module thread_delay_logic
  import rts_pkg::*;
(
  input  thread_state_e state_in,
  input  logic [31:0]   stamp,
  input  logic [31:0]   tick,
  input  logic          forever_wait,
  output thread_state_e state_out,
  output logic          expired
);
  logic reached;
  assign reached = $signed(tick - stamp) >= 0;
  assign expired = (state_in == TS_BLOCKED) && !forever_wait && reached;
  assign state_out = expired ? TS_READY : state_in;
endmodule
