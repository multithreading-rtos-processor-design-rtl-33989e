// fair_arbiter: picks the next thread to run from the top-priority vector.
//
// req has one bit per hardware thread that is ready (or running) and holds the
// current top priority. With round-robin enabled the arbiter grants the first
// requesting thread after the running one, wrapping around, so threads that
// share the top priority take turns; the running thread is granted again only
// when it is the sole requester. With round-robin disabled the running thread
// keeps the processor while it still requests, otherwise the lowest-numbered
// requester wins. The result is combinational. The fairness scheme follows
// the rotating-priority idea the scheduler borrows from a vendor arbiter; the
// exact search order is this design's choice.
module fair_arbiter #(
  parameter int unsigned N = 8,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  input  logic [IW-1:0] last,      // running thread
  input  logic          rr_en,
  output logic [IW-1:0] grant,
  output logic          grant_valid
);
  logic found;
  always_comb begin
    found       = 1'b0;
    grant       = last;
    grant_valid = |req;
    if (rr_en) begin
      // search last+1, last+2, ... last+N (last itself comes last)
      for (int k = 1; k <= N; k++) begin
        if (!found && req[(int'(last) + k) % N]) begin
          found = 1'b1;
          grant = IW'((int'(last) + k) % N);
        end
      end
    end else if (!req[last]) begin
      for (int k = 0; k < N; k++) begin
        if (!found && req[k]) begin
          found = 1'b1;
          grant = IW'(k);
        end
      end
    end
  end
endmodule
