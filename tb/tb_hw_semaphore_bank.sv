// tb_hw_semaphore_bank: checks counting semaphores: creation with staged
// initial and maximum counts, take down to zero (further takes refused),
// give up to the maximum (further gives refused, no wake event), the give
// event, selection, clipping of an initial count above the maximum, deletion.
module tb_hw_semaphore_bank;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic set_init, set_max, select, create, destroy, take, give;
  logic [31:0] wdata, sel_handler;
  logic sel_found, sel_empty, free_avail, give_evt;
  logic [1:0] sel_idx, next_free, give_idx;
  logic [15:0] sel_count;
  hw_semaphore_bank #(.NSEM(4)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic cmd(input int c, input logic [31:0] v = 0);
    @(negedge clk);
    {set_init, set_max, select, create, destroy, take, give} = 7'b1000000 >> c;
    wdata = v; sel_handler = v;
    @(posedge clk); #1 {set_init, set_max, select, create, destroy, take, give} = '0;
  endtask
  localparam int INI = 0, MAX = 1, SEL = 2, CRE = 3, DEL = 4, TAKE = 5, GIVE = 6;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {set_init, set_max, select, create, destroy, take, give} = '0; wdata = 0; sel_handler = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    cmd(INI, 2); cmd(MAX, 3); cmd(CRE);
    check(sel_found && sel_idx == 0 && sel_count == 2, "created with count 2");
    cmd(TAKE); cmd(TAKE);
    check(sel_count == 0 && sel_empty, "taken twice: empty");
    cmd(TAKE); check(sel_count == 0, "take on empty refused");
    @(negedge clk); give = 1; #1 check(give_evt && give_idx == 0, "give event");
    @(posedge clk); #1 give = 0;
    cmd(GIVE); cmd(GIVE); check(sel_count == 3, "given up to max 3");
    @(negedge clk); give = 1; #1 check(!give_evt, "give at max refused");
    @(posedge clk); #1 give = 0;
    check(sel_count == 3, "count stays at max");
    cmd(INI, 9); cmd(MAX, 4); cmd(CRE);
    check(sel_idx == 1 && sel_count == 4, "initial count clipped to max");
    cmd(SEL, 0); check(sel_found && sel_count == 3, "reselect 0");
    cmd(DEL); check(!sel_found && next_free == 0, "deleted");
    cmd(SEL, 3); check(!sel_found, "uncreated semaphore not found");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
