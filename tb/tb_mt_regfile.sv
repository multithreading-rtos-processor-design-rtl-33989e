// tb_mt_regfile: checks the multithreaded register view: thread 0's ARM mode
// banking (FIQ banks R8-R14, other exception modes bank R13-R14, user and
// system share), private R0-R15 of each other thread in the configured
// thread mode, fallback to thread 0 in other modes (an interrupt lands in the
// kernel thread), the LDM^/STM^ user-bank redirection to the scheduler's
// user-bank thread when enabled, and per-thread CPSR and SPSR banking.
module tb_mt_regfile;
  import rts_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] reg_mode, rd_mode, w_mode, spsr_mode;
  logic ldm_stm_mod, ra_user, rb_user, we, w_user, cpsr_we, spsr_we;
  logic [1:0] ubank_thread, rd_th, w_th, cpsr_th;
  logic [3:0] ra_addr, rb_addr, w_addr;
  logic [31:0] ra_data, rb_data, w_data, cpsr, spsr, cpsr_wdata, spsr_wdata;
  mt_regfile #(.NTHREADS(4)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wr(input int th, input logic [4:0] m, input int r, input logic [31:0] v, input bit u = 0);
    @(negedge clk);
    we = 1; w_th = 2'(th); w_mode = m; w_addr = 4'(r); w_data = v; w_user = u;
    @(posedge clk); #1 we = 0;
  endtask
  task automatic chk_rd(input int th, input logic [4:0] m, input int r, input bit u,
                        input logic [31:0] exp, input string msg);
    rd_th = 2'(th); rd_mode = m; ra_addr = 4'(r); ra_user = u;
    #1 check(ra_data == exp, msg);
  endtask
  // a unique value for (thread, bank, register)
  function automatic logic [31:0] val(input int th, input int b, input int r);
    return 32'h1000_0000 * (th + 1) + 32'h100 * b + r;
  endfunction

  localparam logic [4:0] MODES [7] = '{M_USR, M_SYS, M_SVC, M_ABT, M_UND, M_IRQ, M_FIQ};

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {we, cpsr_we, spsr_we, ldm_stm_mod, ra_user, rb_user, w_user} = '0;
    reg_mode = M_SYS; ubank_thread = 0; rb_addr = 0; rd_th = 0; rd_mode = M_SYS; ra_addr = 0;
    w_th = 0; w_mode = M_SYS; w_addr = 0; w_data = 0; cpsr_th = 0; cpsr_wdata = 0;
    spsr_mode = M_SVC; spsr_wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // thread 0: write every register in every mode (later writes to shared
    // registers overwrite earlier ones, so write user first)
    for (int m = 0; m < 7; m++)
      for (int r = 0; r < 16; r++) wr(0, MODES[m], r, val(0, m, r));
    // expected: R0-R7, R15 shared -> last writer FIQ (m=6);
    // R8-R12 shared by all but FIQ -> last non-FIQ writer IRQ (m=5)
    // R13/R14: USR/SYS share (m=1), others own
    for (int m = 0; m < 7; m++)
      for (int r = 0; r < 16; r++) begin
        int e;
        if (r < 8 || r == 15) e = 6;
        else if (r <= 12) e = (m == 6) ? 6 : 5;
        else e = (m <= 1) ? 1 : m;
        chk_rd(0, MODES[m], r, 0, val(0, e, r), $sformatf("thread0 mode %0d r%0d", m, r));
      end
    // threads 1..3 in the thread mode (SYS) own R0-R15
    for (int t = 1; t < 4; t++)
      for (int r = 0; r < 16; r++) wr(t, M_SYS, r, val(t, 0, r));
    for (int t = 1; t < 4; t++)
      for (int r = 0; r < 16; r++)
        chk_rd(t, M_SYS, r, 0, val(t, 0, r), $sformatf("thread %0d r%0d", t, r));
    chk_rd(0, M_SYS, 3, 0, val(0, 6, 3), "thread 0 untouched by thread writes");
    // thread 2 interrupted: IRQ mode reaches thread 0's IRQ bank
    chk_rd(2, M_IRQ, 13, 0, val(0, 5, 13), "IRQ mode uses kernel thread bank");
    // thread mode SVC: SYS accesses of thread 2 now go to thread 0
    reg_mode = M_SVC;
    chk_rd(2, M_SVC, 4, 0, val(2, 0, 4), "SVC thread mode reaches thread 2");
    chk_rd(2, M_SYS, 4, 0, val(0, 6, 4), "SYS now kernel");
    reg_mode = M_SYS;
    // user-bank access without modification: thread 0 user registers
    chk_rd(0, M_SVC, 13, 1, val(0, 1, 13), "STM^ reads user R13 of thread 0");
    // with modification: the user-bank thread
    ldm_stm_mod = 1; ubank_thread = 3;
    chk_rd(0, M_SVC, 13, 1, val(3, 0, 13), "STM^ reads thread 3 R13");
    wr(0, M_SVC, 0, 32'hCAFE_0000, 1);
    wr(0, M_SVC, 13, 32'hCAFE_0013, 1);
    chk_rd(3, M_SYS, 0, 0, 32'hCAFE_0000, "LDM^ loaded thread 3 R0");
    chk_rd(3, M_SYS, 13, 0, 32'hCAFE_0013, "LDM^ loaded thread 3 R13");
    chk_rd(0, M_SYS, 13, 0, val(0, 1, 13), "thread 0 R13 unchanged");
    // status registers
    rd_th = 1; #1 check(cpsr == 32'hD3, "CPSR reset value");
    @(negedge clk); cpsr_we = 1; cpsr_th = 1; cpsr_wdata = 32'h1F;
    @(posedge clk); #1 cpsr_we = 0;
    rd_th = 1; #1 check(cpsr == 32'h1F, "thread 1 CPSR written");
    rd_th = 2; #1 check(cpsr == 32'hD3, "thread 2 CPSR separate");
    @(negedge clk); spsr_we = 1; spsr_mode = M_IRQ; spsr_wdata = 32'h6000_001F;
    @(posedge clk); #1 spsr_we = 0;
    rd_mode = M_IRQ; #1 check(spsr == 32'h6000_001F, "SPSR_irq");
    rd_mode = M_SVC; #1 check(spsr == 32'h0, "SPSR_svc separate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
