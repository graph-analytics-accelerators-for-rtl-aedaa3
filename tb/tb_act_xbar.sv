// tb_act_xbar: four sources send random activations while four destinations accept at random.
// Every activation must arrive exactly once at the owner of its vertex (vid mod 4), and each
// source's activations in order.
module tb_act_xbar;
  import gas_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sv [N], sr [N], dv [N], dr [N], busy;
  vid_t sid [N], did [N];
  act_xbar #(.NUM_AU(N)) dut (.clk, .rst_n, .src_valid(sv), .src_vid(sid), .src_ready(sr),
    .dst_valid(dv), .dst_vid(did), .dst_ready(dr), .busy);
  int checks = 0, failures = 0, delivered = 0;
  int sent_q [N][$];   // per destination, expected multiset
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n)
    for (int d = 0; d < N; d++) begin
      if (dv[d] && dr[d]) begin
        automatic int idx[$];
        checks++;
        if (did[d] % N != d) begin failures++; $display("FAIL: vid %0d at AU %0d", did[d], d); end
        idx = sent_q[d].find_first_index(x) with (x == int'(did[d]));
        if (idx.size() == 0) begin failures++; $display("FAIL: unexpected vid %0d", did[d]); end
        else sent_q[d].delete(idx[0]);
        delivered++;
      end
      dr[d] <= ($urandom_range(2) != 0);
    end
  initial begin
    for (int i = 0; i < N; i++) begin sv[i] = 0; sid[i] = '0; dr[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s0 = 0; s0 < N; s0++) begin
      automatic int s = s0;
      fork
        for (int k = 0; k < 300; k++) begin
          @(negedge clk);
          sv[s] = 1; sid[s] = vid_t'($urandom_range(100000));
          sent_q[sid[s] % N].push_back(int'(sid[s]));
          @(posedge clk); while (!sr[s]) @(posedge clk);
          @(negedge clk); sv[s] = 0;
        end
      join_none
    end
    wait (delivered == 4 * 300);
    repeat (3) @(posedge clk);
    for (int d = 0; d < N; d++) begin
      checks++;
      if (sent_q[d].size() != 0) begin failures++; $display("FAIL: %0d lost at %0d", sent_q[d].size(), d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
