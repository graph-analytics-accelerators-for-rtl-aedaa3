// tb_mem_arb: three clients with random requests share one port of a fixed-latency memory
// model. Every client must get exactly the responses to its own reads, with its own tags and
// the data at the requested address, and the grant must rotate (no client waits more than
// N-1 grants while it keeps requesting).
module tb_mem_arb;
  import gas_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     iv [N], ir [N], irv [N];
  mem_req_t iq [N];
  mem_rsp_t ip [N];
  logic     ov, orr, orv;
  mem_req_t oq;
  mem_rsp_t op;
  logic     dv [1], dr [1], drv [1];
  mem_req_t dq [1];
  mem_rsp_t dp [1];

  mem_arb #(.N(N)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_req(iq),
    .in_rsp_valid(irv), .in_rsp(ip), .out_valid(ov), .out_ready(orr), .out_req(oq),
    .out_rsp_valid(orv), .out_rsp(op));
  assign dv[0] = ov; assign dq[0] = oq; assign orr = dr[0]; assign orv = drv[0]; assign op = dp[0];
  dram_model #(.NP(1), .WORDS(1024), .LAT(5), .READY_PCT(70)) u_mem (
    .clk, .rst_n, .req_valid(dv), .req_ready(dr), .req(dq), .rsp_valid(drv), .rsp(dp));

  int checks = 0, failures = 0;
  int sent [N], got [N], waitc [N];
  int unsigned exp_addr [N][$];
  int unsigned exp_tag  [N][$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) u_mem.mem[a] = a * 7 + 3;
    for (int c = 0; c < N; c++) begin iv[c] = 0; iq[c] = '0; sent[c] = 0; got[c] = 0; waitc[c] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    fork
      for (int c0 = 0; c0 < N; c0++) begin
        automatic int c = c0;
        fork
          for (int k = 0; k < 200; k++) begin
            @(negedge clk);
            iv[c] = 1;
            iq[c].addr = $urandom_range(1023);
            iq[c].we = 0;
            iq[c].tag = tag_t'(k & 8'hFF);
            @(posedge clk);
            while (!ir[c]) @(posedge clk);
            exp_addr[c].push_back(iq[c].addr);
            exp_tag[c].push_back(iq[c].tag);
            sent[c]++;
            @(negedge clk); iv[c] = 0;
          end
        join_none
      end
    join_none
    wait (got[0] == 200 && got[1] == 200 && got[2] == 200);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // responses: right client, right order, right tag and data
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < N; c++)
      if (irv[c]) begin
        checks++;
        if (exp_addr[c].size() == 0) begin failures++; $display("FAIL: unexpected response to %0d", c); end
        else begin
          automatic int unsigned a = exp_addr[c].pop_front();
          automatic int unsigned t = exp_tag[c].pop_front();
          if (ip[c].addr != a || ip[c].tag != t || ip[c].rdata != a * 7 + 3) begin
            failures++;
            $display("FAIL: client %0d got addr %0d tag %0d data %0d, expected %0d %0d", c,
                     ip[c].addr, ip[c].tag, ip[c].rdata, a, t);
          end
        end
        got[c]++;
      end

  // fairness: a requesting client is granted within N grants
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < N; c++) begin
      if (iv[c] && !ir[c] && ov && orr) begin
        waitc[c]++;
        if (waitc[c] >= N) begin failures++; $display("FAIL: client %0d starved", c); end
      end
      if (iv[c] && ir[c]) begin checks++; waitc[c] = 0; end
    end
endmodule
