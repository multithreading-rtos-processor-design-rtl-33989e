// tb_sync_2ff: checks that random input changes applied between clock edges
// appear at the output exactly two rising edges later, bit by bit, and that
// reset clears the stages.
module tb_sync_2ff;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] d, q;
  logic [3:0] h1, h2;
  sync_2ff #(.W(4)) dut (.clk, .rst_n, .d, .q);

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
    d = 4'hF; h1 = 0; h2 = 0;
    repeat (2) @(posedge clk);
    check(q == 0, "reset holds output low");
    @(negedge clk); rst_n = 1;
    repeat (1000) begin
      @(posedge clk); h2 = h1; h1 = d;
      #1 check(q == h2, $sformatf("q %h expected %h", q, h2));
      #($urandom_range(7)) d = 4'($urandom);
    end
    rst_n = 0; #1 check(q == 0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
