// tb_hw_mutex_bank: checks mutex slot allocation (lowest free first, full
// when all are created), selection by handler, take/give with owner, the
// give event used to wake waiters, that a taken mutex cannot be taken again,
// and deletion.
module tb_hw_mutex_bank;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic select, create, destroy, take, give;
  logic [31:0] sel_handler;
  logic [2:0] owner_in, sel_owner;
  logic sel_found, sel_taken, free_avail, give_evt;
  logic [1:0] sel_idx, next_free, give_idx;
  hw_mutex_bank #(.NMUTEX(4), .TIDW(3)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic cmd(input int c, input logic [31:0] h = 0, input int own = 0);
    @(negedge clk);
    {select, create, destroy, take, give} = 5'b10000 >> c;
    sel_handler = h; owner_in = 3'(own);
    @(posedge clk); #1 {select, create, destroy, take, give} = '0;
  endtask
  localparam int SEL = 0, CRE = 1, DEL = 2, TAKE = 3, GIVE = 4;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {select, create, destroy, take, give} = '0; sel_handler = 0; owner_in = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    #1 check(free_avail && next_free == 0, "slot 0 free");
    cmd(SEL, 0); check(!sel_found, "uncreated mutex not found");
    for (int i = 0; i < 4; i++) begin
      cmd(CRE);
      check(sel_found && sel_idx == 2'(i), $sformatf("create %0d selected", i));
    end
    check(!free_avail, "all mutexes used");
    cmd(SEL, 2); check(sel_found && sel_idx == 2 && !sel_taken, "select 2, free");
    cmd(TAKE, 0, 5); check(sel_taken && sel_owner == 5, "taken by thread 5");
    cmd(TAKE, 0, 6); check(sel_owner == 5, "second take ignored");
    @(negedge clk); give = 1; #1 check(give_evt && give_idx == 2, "give event for mutex 2");
    @(posedge clk); #1 give = 0;
    check(!sel_taken, "given");
    @(negedge clk); give = 1; #1 check(!give_evt, "no give event for a free mutex");
    @(posedge clk); #1 give = 0;
    cmd(DEL); check(!sel_found && free_avail && next_free == 2, "deleted, slot 2 free");
    cmd(SEL, 7); check(!sel_found, "out-of-range handler");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
