// tb_mt_hazard_unit: checks thread-tagged hazard detection against a
// reference: same register in a different thread is no hazard; a producer in
// execute is forwarded from execute (or stalls decode if it is a load); one
// in memory access is forwarded from there; the newer producer wins.
module tb_mt_hazard_unit;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0] id_th, ex_th, mem_th;
  logic [3:0] id_rn, id_rm, ex_rd, mem_rd;
  logic id_use_rn, id_use_rm, ex_we, ex_load, mem_we, stall;
  logic [1:0] fwd_rn, fwd_rm;
  mt_hazard_unit #(.TID_W(3)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // same register, other thread: no hazard
    id_th = 1; id_rn = 4; id_use_rn = 1; id_rm = 0; id_use_rm = 0;
    ex_th = 2; ex_rd = 4; ex_we = 1; ex_load = 1; mem_th = 3; mem_rd = 4; mem_we = 1;
    #1 check(fwd_rn == 0 && !stall, "different threads: no hazard");
    ex_th = 1; #1 check(stall && fwd_rn == 1, "same thread load-use stalls");
    for (int it = 0; it < 3000; it++) begin
      bit e, m, e2, m2;
      id_th = 3'($urandom_range(0, 2)); ex_th = 3'($urandom_range(0, 2)); mem_th = 3'($urandom_range(0, 2));
      id_rn = 4'($urandom_range(0, 3)); id_rm = 4'($urandom_range(0, 3));
      ex_rd = 4'($urandom_range(0, 3)); mem_rd = 4'($urandom_range(0, 3));
      {id_use_rn, id_use_rm, ex_we, ex_load, mem_we} = 5'($urandom);
      #1;
      e  = id_use_rn && ex_we && ex_th == id_th && ex_rd == id_rn;
      m  = id_use_rn && mem_we && mem_th == id_th && mem_rd == id_rn;
      e2 = id_use_rm && ex_we && ex_th == id_th && ex_rd == id_rm;
      m2 = id_use_rm && mem_we && mem_th == id_th && mem_rd == id_rm;
      check(fwd_rn == (e ? 2'd1 : m ? 2'd2 : 2'd0), $sformatf("fwd_rn it %0d", it));
      check(fwd_rm == (e2 ? 2'd1 : m2 ? 2'd2 : 2'd0), $sformatf("fwd_rm it %0d", it));
      check(stall == (ex_load && (e || e2)), $sformatf("stall it %0d", it));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
