// hw_mutex_bank: the hardware-supported mutex slots of the CP14 scheduler.
//
// Each slot needs two state bits, "created" and "taken"; this design also
// records the owner thread so software can ask who holds a mutex. A mutex's
// handler is its slot number. Commands arrive one per cycle from the CP14
// register decoder and act on the selected slot:
//   select  - select the slot whose handler is sel_handler (found only if
//             that slot is created)
//   create  - create a mutex in the lowest free slot and select it
//   destroy - free the selected slot (delete command)
//   take    - mark the selected mutex taken by owner_in, if it is free
//   give    - mark the selected mutex free; give_evt pulses in the same
//             cycle with give_idx so the scheduler can wake blocked waiters
// next_free/free_avail report the slot a create would use. Outputs about the
// selected slot are combinational from registers. Reset clears every slot.
// Owner tracking, lowest-free-slot allocation and the absence of priority
// inheritance (the software interface states it has none) define behaviour.
module hw_mutex_bank #(
  parameter int unsigned NMUTEX = 8,
  parameter int unsigned TIDW   = 3,
  localparam int unsigned MW = (NMUTEX > 1) ? $clog2(NMUTEX) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            select,
  input  logic [31:0]     sel_handler,
  input  logic            create,
  input  logic            destroy,
  input  logic            take,
  input  logic            give,
  input  logic [TIDW-1:0] owner_in,
  output logic            sel_found,
  output logic [MW-1:0]   sel_idx,
  output logic            sel_taken,
  output logic [TIDW-1:0] sel_owner,
  output logic [MW-1:0]   next_free,
  output logic            free_avail,
  output logic            give_evt,
  output logic [MW-1:0]   give_idx
);
  logic [NMUTEX-1:0]           created, taken;
  logic [NMUTEX-1:0][TIDW-1:0] owner;
  logic                        sel_v;
  logic [MW-1:0]               sel_q;

  always_comb begin
    next_free  = '0;
    free_avail = 1'b0;
    for (int i = NMUTEX - 1; i >= 0; i--) begin
      if (!created[i]) begin
        next_free  = MW'(i);
        free_avail = 1'b1;
      end
    end
  end

  assign sel_found = sel_v && created[sel_q];
  assign sel_idx   = sel_q;
  assign sel_taken = sel_found && taken[sel_q];
  assign sel_owner = owner[sel_q];
  assign give_evt  = give && sel_found && taken[sel_q];
  assign give_idx  = sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      created <= '0;
      taken   <= '0;
      owner   <= '0;
      sel_v   <= 1'b0;
      sel_q   <= '0;
    end else begin
      if (select) begin
        sel_v <= (sel_handler < NMUTEX) && created[sel_handler[MW-1:0]];
        sel_q <= sel_handler[MW-1:0];
      end else if (create) begin
        if (free_avail) begin
          created[next_free] <= 1'b1;
          taken[next_free]   <= 1'b0;
          sel_v <= 1'b1;
          sel_q <= next_free;
        end
      end else if (sel_found) begin
        if (destroy) begin
          created[sel_q] <= 1'b0;
          taken[sel_q]   <= 1'b0;
          sel_v          <= 1'b0;
        end else if (take && !taken[sel_q]) begin
          taken[sel_q] <= 1'b1;
          owner[sel_q] <= owner_in;
        end else if (give) begin
          taken[sel_q] <= 1'b0;
        end
      end
    end
  end
endmodule
