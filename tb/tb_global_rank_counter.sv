// tb_global_rank_counter: random rank assignments by four AUs; the increment must be high in
// exactly the cycles where at least one AU assigns, and the issued count must equal the total
// number of assignments.
module tb_global_rank_counter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic a [N];
  logic inc;
  logic [31:0] issued;
  global_rank_counter #(.NUM_AU(N)) dut (.clk, .rst_n, .assign_rank(a), .inc, .issued);
  int checks = 0, failures = 0, total = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < N; i++) a[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      automatic bit any = 0;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin a[i] = ($urandom_range(3) == 0); any |= a[i]; total += a[i]; end
      #1;
      checks++;
      if (inc != any) begin failures++; $display("FAIL: inc %0b expected %0b", inc, any); end
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) a[i] = 0;
    @(posedge clk); #1;
    checks++;
    if (issued != total) begin failures++; $display("FAIL: issued %0d expected %0d", issued, total); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
