// hw_semaphore_bank: the hardware-supported counting semaphores of the CP14
// scheduler.
//
// Besides a "created" bit, each slot holds its current count and its maximum
// count; two staging registers hold the initial and maximum count that the
// next create will use. A semaphore's handler is its slot number. Commands,
// one per cycle, act on the selected slot:
//   set_init/set_max - load the staging registers from wdata
//   select  - select the slot whose handler is sel_handler (if created)
//   create  - create a semaphore in the lowest free slot with the staged
//             counts (count clipped to max) and select it
//   destroy - free the selected slot (delete command)
//   take    - decrement the count if it is above zero
//   give    - increment the count if it is below the maximum; give_evt pulses
//             in the same cycle with give_idx so blocked waiters can be woken
// sel_empty says the selected semaphore cannot be taken now (count 0).
// Counts are CW bits wide; writes of the initial and maximum count keep the
// low CW bits of wdata. Clipping, lowest-free allocation and the width are
// this design's choices.
module hw_semaphore_bank #(
  parameter int unsigned NSEM = 8,
  parameter int unsigned CW   = 16,
  localparam int unsigned SW = (NSEM > 1) ? $clog2(NSEM) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          set_init,
  input  logic          set_max,
  input  logic [31:0]   wdata,
  input  logic          select,
  input  logic [31:0]   sel_handler,
  input  logic          create,
  input  logic          destroy,
  input  logic          take,
  input  logic          give,
  output logic          sel_found,
  output logic [SW-1:0] sel_idx,
  output logic          sel_empty,
  output logic [CW-1:0] sel_count,
  output logic [SW-1:0] next_free,
  output logic          free_avail,
  output logic          give_evt,
  output logic [SW-1:0] give_idx
);
  logic [NSEM-1:0]         created;
  logic [NSEM-1:0][CW-1:0] count, maxc;
  logic [CW-1:0]           init_q, max_q;
  logic                    sel_v;
  logic [SW-1:0]           sel_q;

  always_comb begin
    next_free  = '0;
    free_avail = 1'b0;
    for (int i = NSEM - 1; i >= 0; i--) begin
      if (!created[i]) begin
        next_free  = SW'(i);
        free_avail = 1'b1;
      end
    end
  end

  assign sel_found = sel_v && created[sel_q];
  assign sel_idx   = sel_q;
  assign sel_count = count[sel_q];
  assign sel_empty = sel_found && (count[sel_q] == '0);
  assign give_evt  = give && sel_found && (count[sel_q] < maxc[sel_q]);
  assign give_idx  = sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      created <= '0;
      count   <= '0;
      maxc    <= '0;
      init_q  <= '0;
      max_q   <= '0;
      sel_v   <= 1'b0;
      sel_q   <= '0;
    end else begin
      if (set_init) init_q <= wdata[CW-1:0];
      if (set_max)  max_q  <= wdata[CW-1:0];
      if (select) begin
        sel_v <= (sel_handler < NSEM) && created[sel_handler[SW-1:0]];
        sel_q <= sel_handler[SW-1:0];
      end else if (create) begin
        if (free_avail) begin
          created[next_free] <= 1'b1;
          count[next_free]   <= (init_q > max_q) ? max_q : init_q;
          maxc[next_free]    <= max_q;
          sel_v <= 1'b1;
          sel_q <= next_free;
        end
      end else if (sel_found) begin
        if (destroy) begin
          created[sel_q] <= 1'b0;
          sel_v          <= 1'b0;
        end else if (take && count[sel_q] != '0) begin
          count[sel_q] <= count[sel_q] - 1'b1;
        end else if (give_evt) begin
          count[sel_q] <= count[sel_q] + 1'b1;
        end
      end
    end
  end
endmodule
