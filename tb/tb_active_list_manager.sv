// tb_active_list_manager: the active list of AU 1 in a two-AU system (local index l is vertex
// 2l+1), 700 local vertices in three 256-bit segments. The host marks a random third of them
// active; the testbench then plays the runtime (takes offered vertices, acknowledges their
// registration after a random delay) and the sync unit (sends random activations of owned
// vertices). Checks:
//   - only owned vertices are offered, and only ones that were activated and not yet offered
//     (no duplicates);
//   - every activation is honoured: unless the vertex was offered but not yet acknowledged
//     (then it is absorbed), the vertex is offered again later;
//   - activations hit both the locally held segment and the in-memory bit vector and queue;
//   - at the end the list is empty and the bit vector and queued-bit words in memory are zero.
module tb_active_list_manager;
  import gas_pkg::*;
  localparam int L = 700, NSEG = 3;
  localparam int BV = 100, Q = 200, QF = 300;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  al_cfg_t cfg;
  logic v_valid, v_ready, ack_valid, act_valid, act_ready, empty, lhit, mact;
  vid_t v_vid, ack_vid, act_vid;
  logic mv [1], mr [1], mrv [1];
  mem_req_t mq [1];
  mem_rsp_t mp [1];
  active_list_manager #(.NUM_AU(2), .AU_ID(1)) dut (.clk, .rst_n, .start, .cfg,
    .v_valid, .v_vid, .v_ready, .ack_valid, .ack_vid, .act_valid, .act_vid, .act_ready,
    .mem_valid(mv[0]), .mem_ready(mr[0]), .mem_req(mq[0]), .mem_rsp_valid(mrv[0]), .mem_rsp(mp[0]),
    .empty, .local_hit(lhit), .mem_act(mact));
  dram_model #(.NP(1), .WORDS(1024), .LAT(8), .READY_PCT(75)) u_mem (
    .clk, .rst_n, .req_valid(mv), .req_ready(mr), .req(mq), .rsp_valid(mrv), .rsp(mp));

  int checks = 0, failures = 0;
  bit needs [L];
  bit pending [L];
  int pend_q [$];
  int n_lhit = 0, n_mact = 0, offered = 0, acts = 0;
  bit acting = 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // runtime side
  always @(posedge clk) if (rst_n) begin
    if (ack_valid) pending[ack_vid >> 1] = 0;
    if (act_valid && act_ready) begin
      if (lhit) n_lhit++;
      if (mact) n_mact++;
      if (!pending[act_vid >> 1]) needs[act_vid >> 1] = 1;
    end
    if (v_valid && v_ready) begin
      automatic int l = int'(v_vid >> 1);
      checks++;
      if (v_vid[0] != 1'b1 || l >= L) begin failures++; $display("FAIL: offered vertex %0d not owned", v_vid); end
      else if (!needs[l]) begin failures++; $display("FAIL: offered vertex %0d not active", v_vid); end
      else begin needs[l] = 0; pending[l] = 1; pend_q.push_back(l); end
      offered++;
    end
  end

  always @(negedge clk) begin
    v_ready = ($urandom_range(2) == 0);
    ack_valid = 0;
    if (pend_q.size() > 0 && $urandom_range(3) == 0) begin
      ack_valid = 1; ack_vid = vid_t'(pend_q.pop_front() * 2 + 1);
    end
    if (!act_valid || act_ready) begin
      act_valid = acting && ($urandom_range(5) == 0);
      act_vid = vid_t'($urandom_range(L - 1) * 2 + 1);
      if (act_valid) acts++;
    end
  end

  initial begin
    int unsigned w;
    v_ready = 0; ack_valid = 0; ack_vid = 0; act_valid = 0; act_vid = 0;
    for (int a = 0; a < 1024; a++) u_mem.mem[a] = 0;
    for (int l = 0; l < L; l++) if ($urandom_range(2) == 0) begin
      needs[l] = 1;
      u_mem.mem[BV + l / 32] |= (32'd1 << (l % 32));
    end
    for (int s = 0; s < NSEG; s++) u_mem.mem[Q + s] = s;
    u_mem.mem[QF] = 32'h7;
    cfg.bv_base = BV; cfg.q_base = Q; cfg.qf_base = QF; cfg.q_size = NSEG; cfg.q_count = NSEG;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (20000) @(posedge clk);
    acting = 0;
    @(negedge clk); while (act_valid) @(negedge clk);
    repeat (50) @(posedge clk);
    while (!(empty && pend_q.size() == 0)) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int l = 0; l < L; l++) begin
      checks++;
      if (needs[l]) begin failures++; $display("FAIL: activated vertex %0d never offered", 2 * l + 1); end
    end
    for (int a = 0; a < NSEG * 8; a++) begin
      checks++;
      if (u_mem.mem[BV + a] != 0) begin failures++; $display("FAIL: bit vector word %0d left %h", a, u_mem.mem[BV + a]); end
    end
    checks++;
    if (u_mem.mem[QF] != 0) begin failures++; $display("FAIL: queued bits left"); end
    checks++;
    if (n_lhit == 0 || n_mact == 0) begin failures++; $display("FAIL: local %0d memory %0d activations", n_lhit, n_mact); end
    $display("offered %0d, activations %0d (local %0d, memory %0d)", offered, acts, n_lhit, n_mact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
