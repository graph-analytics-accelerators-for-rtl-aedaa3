// tb_object_cache: random reads over a small address range through the cache to a memory
// model with latency 10. Checks every returned word and tag, checks that a repeated read hits
// and returns one cycle after the request, and that a write invalidates the line so the next
// read fetches the new value.
module tb_object_cache;
  import gas_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     cv, cr, crv;
  mem_req_t cq;
  mem_rsp_t cp;
  logic     mv [1], mr [1], mrv [1];
  mem_req_t mq [1];
  mem_rsp_t mp [1];
  logic     hit, miss;

  object_cache #(.LINES(64)) dut (.clk, .rst_n, .cl_valid(cv), .cl_ready(cr), .cl_req(cq),
    .cl_rsp_valid(crv), .cl_rsp(cp), .mem_valid(mv[0]), .mem_ready(mr[0]), .mem_req(mq[0]),
    .mem_rsp_valid(mrv[0]), .mem_rsp(mp[0]), .hit_pulse(hit), .miss_pulse(miss));
  dram_model #(.NP(1), .WORDS(4096), .LAT(10), .READY_PCT(90)) u_mem (
    .clk, .rst_n, .req_valid(mv), .req_ready(mr), .req(mq), .rsp_valid(mrv), .rsp(mp));

  int checks = 0, failures = 0, hits = 0, misses = 0;
  int unsigned ref_mem [4096];
  int outstanding = 0;
  int unsigned pend_tag [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (hit) hits++;
    if (miss) misses++;
    if (crv) begin
      checks++;
      if (cp.rdata != ref_mem[cp.addr]) begin
        failures++; $display("FAIL: addr %0d data %0h expected %0h", cp.addr, cp.rdata, ref_mem[cp.addr]);
      end
      if (cp.tag != tag_t'(cp.addr)) begin failures++; $display("FAIL: tag mismatch"); end
      outstanding--;
    end
  end

  task automatic rd(int unsigned a);
    @(negedge clk);
    cv = 1; cq = '0; cq.addr = a; cq.tag = tag_t'(a);
    @(posedge clk);
    while (!cr) @(posedge clk);
    outstanding++;
    @(negedge clk); cv = 0;
  endtask

  initial begin
    int t0;
    cv = 0; cq = '0;
    for (int a = 0; a < 4096; a++) begin ref_mem[a] = $urandom; u_mem.mem[a] = ref_mem[a]; end
    repeat (3) @(posedge clk); rst_n = 1;
    // random traffic, 256 addresses over 64 lines: hits, misses and conflicts
    for (int k = 0; k < 2000; k++) rd($urandom_range(255) + 1000);
    wait (outstanding == 0);
    // repeated read: hit, answered the cycle after acceptance
    rd(1234);
    wait (outstanding == 0);
    @(negedge clk);
    cv = 1; cq = '0; cq.addr = 1234; cq.tag = tag_t'(1234);
    @(posedge clk);
    t0 = 0;
    checks++;
    if (!(cr && hit)) begin failures++; $display("FAIL: repeated read did not hit"); end
    outstanding++;
    @(negedge clk); cv = 0;
    @(posedge clk);
    checks++;
    if (!crv) begin failures++; $display("FAIL: hit latency is not one cycle"); end
    wait (outstanding == 0);
    // write invalidates
    @(negedge clk);
    cv = 1; cq = '0; cq.addr = 1234; cq.we = 1; cq.wdata = 32'hCAFE_0001;
    @(posedge clk); while (!cr) @(posedge clk);
    ref_mem[1234] = 32'hCAFE_0001;
    @(negedge clk); cv = 0;
    rd(1234);
    wait (outstanding == 0);
    checks++;
    if (hits < 100 || misses < 100) begin failures++; $display("FAIL: hits %0d misses %0d", hits, misses); end
    $display("hits %0d misses %0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
