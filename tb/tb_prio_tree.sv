// tb_prio_tree: checks the priority tree against a linear reference search,
// for a power-of-two and a padded (non-power-of-two) size, in both priority
// orders, with random priorities and candidate sets, plus the example of the
// scheduling-logic figure (priorities 5, 2, 5, 1 give top priority 5).
module tb_prio_tree;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0][7:0] p8;  logic [7:0] c8;  logic [7:0] b8;  logic a8;
  logic [4:0][7:0] p5;  logic [4:0] c5;  logic [7:0] b5;  logic a5;
  logic ord;
  prio_tree #(.N(8), .W(8)) dut8 (.prio(p8), .cand(c8), .lo_is_high(ord), .best(b8), .any(a8));
  prio_tree #(.N(5), .W(8)) dut5 (.prio(p5), .cand(c5), .lo_is_high(ord), .best(b5), .any(a5));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic void ref_best(input int n, input logic [7:0] p[], input logic c[],
                                   input logic lo, output logic [7:0] best, output logic any);
    any = 0; best = 0;
    for (int i = 0; i < n; i++)
      if (c[i] && (!any || (lo ? p[i] < best : p[i] > best))) begin any = 1; best = p[i]; end
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] rb; logic ra;
    logic [7:0] pa[]; logic ca[];
    // figure example: TCB1=5, TCB2=2, TCB3=5, TCBn=1, larger is higher
    p8 = '0; c8 = 8'b0000_1111; ord = 0;
    p8[0] = 5; p8[1] = 2; p8[2] = 5; p8[3] = 1;
    #1 check(a8 && b8 == 5, "figure example: top priority 5");
    ord = 1; #1 check(b8 == 1, "reversed order: 1");
    c8 = '0; #1 check(!a8, "no candidate");
    for (int it = 0; it < 2000; it++) begin
      ord = 1'($urandom);
      for (int i = 0; i < 8; i++) begin p8[i] = 8'($urandom); c8[i] = 1'($urandom); end
      for (int i = 0; i < 5; i++) begin p5[i] = 8'($urandom_range(0, 7)); c5[i] = 1'($urandom); end
      #1;
      pa = new[8]; ca = new[8];
      for (int i = 0; i < 8; i++) begin pa[i] = p8[i]; ca[i] = c8[i]; end
      ref_best(8, pa, ca, ord, rb, ra);
      check(a8 == ra && (!ra || b8 == rb), $sformatf("N=8 it %0d", it));
      pa = new[5]; ca = new[5];
      for (int i = 0; i < 5; i++) begin pa[i] = p5[i]; ca[i] = c5[i]; end
      ref_best(5, pa, ca, ord, rb, ra);
      check(a5 == ra && (!ra || b5 == rb), $sformatf("N=5 it %0d", it));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
