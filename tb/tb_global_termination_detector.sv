// tb_global_termination_detector: done must not rise while any AU is busy or when all are idle
// for only one cycle, must rise exactly CONFIRM cycles into an all-idle stretch, stay high, and
// clear on the next start.
module tb_global_termination_detector;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic idle [N];
  logic done;
  global_termination_detector #(.NUM_AU(N), .CONFIRM(2)) dut (.clk, .rst_n, .start, .au_idle(idle), .done);
  int checks = 0, failures = 0;
  task automatic set_idle(bit v, int busy_au);
    @(negedge clk);
    for (int i = 0; i < N; i++) idle[i] = v || (i != busy_au);
  endtask
  task automatic expect_done(bit e, string what);
    #1; checks++;
    if (done !== e) begin failures++; $display("FAIL: %s: done=%0b", what, done); end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < N; i++) idle[i] = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int k = 0; k < 50; k++) begin
      set_idle(0, k % N); @(posedge clk); expect_done(0, "one AU busy");
    end
    set_idle(1, 0); @(posedge clk); expect_done(0, "idle one cycle");
    set_idle(0, 2); @(posedge clk); expect_done(0, "busy again");
    set_idle(1, 0); @(posedge clk); expect_done(0, "first idle cycle");
    @(posedge clk); expect_done(1, "second idle cycle");
    set_idle(0, 1); @(posedge clk); expect_done(1, "done holds");
    @(negedge clk); start = 1; @(posedge clk); #1; @(negedge clk); start = 0;
    expect_done(0, "start clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
