// tb_fair_arbiter: checks the fair arbiter against a reference that measures
// the circular distance from the running thread, with and without
// round-robin, plus the figure example (threads 1 and 3 at top priority,
// thread 1 running: thread 3 is chosen) and a fairness run where three equal
// requesters must each be granted in turn.
module tb_fair_arbiter;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] req; logic [2:0] last, grant; logic rr, gv;
  fair_arbiter #(.N(8)) dut (.req, .last, .rr_en(rr), .grant, .grant_valid(gv));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp, bestd;
    int seen[8];
    req = 8'b0000_1010; last = 1; rr = 1;
    #1 check(gv && grant == 3, "figure example: thread 3 after thread 1");
    rr = 0; #1 check(grant == 1, "no round-robin keeps thread 1");
    for (int it = 0; it < 2000; it++) begin
      req = 8'($urandom); last = 3'($urandom); rr = 1'($urandom);
      #1;
      exp = -1;
      if (rr) begin
        bestd = 99;
        for (int i = 0; i < 8; i++)
          if (req[i]) begin
            int dd; dd = (i - int'(last) + 8) % 8; if (dd == 0) dd = 8;
            if (dd < bestd) begin bestd = dd; exp = i; end
          end
      end else if (req[last]) exp = last;
      else for (int i = 7; i >= 0; i--) if (req[i]) exp = i;
      check(gv == (req != 0), "grant_valid");
      if (req != 0) check(int'(grant) == exp, $sformatf("it %0d req=%b last=%0d rr=%0d", it, req, last, rr));
      @(posedge clk);
    end
    // fairness: 3 equal requesters served in turn
    req = 8'b0100_0101; rr = 1; last = 0;
    for (int i = 0; i < 8; i++) seen[i] = 0;
    for (int k = 0; k < 9; k++) begin #1 seen[grant]++; last = grant; end
    check(seen[0] == 3 && seen[2] == 3 && seen[6] == 3, "each requester granted 3 of 9");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
