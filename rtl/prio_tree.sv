// prio_tree: balanced binary comparator tree that finds the best priority
// value among the candidate hardware threads.
//
// Every leaf holds one thread's priority and a flag saying whether the thread
// takes part (ready or running). Each internal node keeps the better of its
// two children, so the root holds the winning priority value after
// log2(N) comparator levels, all combinational. "Better" depends on the
// software-selected priority order: with lo_is_high = 1 the smaller number wins
// (priority 0 is the highest), with lo_is_high = 0 the larger number wins.
// A leaf that does not take part always loses; if no leaf takes part, any is 0.
// The tree only yields the value: the caller compares it with every thread's
// priority to build the top-priority vector. Following the scheduler
// description, the tree is balanced; padding leaves up to a power of two
// is this design's choice.
module prio_tree #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 8
) (
  input  logic [N-1:0][W-1:0] prio,
  input  logic [N-1:0]        cand,
  input  logic                lo_is_high,
  output logic [W-1:0]        best,
  output logic                any
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP     = 1 << LEVELS;

  // node[1] is the root, node[NP .. 2*NP-1] are the leaves.
  logic [2*NP-1:1]        nval;
  logic [2*NP-1:1][W-1:0] npri;

  for (genvar l = 0; l < NP; l++) begin : g_leaf
    if (l < N) begin : g_used
      assign nval[NP+l] = cand[l];
      assign npri[NP+l] = prio[l];
    end else begin : g_pad
      assign nval[NP+l] = 1'b0;
      assign npri[NP+l] = '0;
    end
  end

  for (genvar i = 1; i < NP; i++) begin : g_node
    logic right_wins;
    always_comb begin
      if (!nval[2*i])          right_wins = nval[2*i+1];
      else if (!nval[2*i+1])   right_wins = 1'b0;
      else if (lo_is_high)     right_wins = npri[2*i+1] < npri[2*i];
      else                     right_wins = npri[2*i+1] > npri[2*i];
    end
    assign nval[i] = nval[2*i] | nval[2*i+1];
    assign npri[i] = right_wins ? npri[2*i+1] : npri[2*i];
  end

  assign best = npri[1];
  assign any  = nval[1];
endmodule
