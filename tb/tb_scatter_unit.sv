// tb_scatter_unit: the scatter unit fed with apply results for every vertex of a directed test
// graph, half of them changed, with a sync unit stand-in that withholds WAR acknowledgements
// and activation acceptance at random. Checks: a changed vertex activates exactly its
// out-neighbours (as a multiset) with its own rank, each only after its WAR acknowledgement;
// its new value is written to Vertex Data only after all its edges were acknowledged, and
// scatter done follows the write; an unchanged vertex writes nothing, activates nobody and is
// done.
module tb_scatter_unit;
  import gas_pkg::*;
  import tb_graph_pkg::*;
  localparam int NV = 8, NE = 32, N = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  graph_cfg_t cfg;
  logic in_valid, in_ready;
  apply_out_t id;
  logic     mv [2], mr [2], mrv [2];
  mem_req_t mq [2];
  mem_rsp_t mp [2];
  logic war_valid, war_ack, act_valid, act_ready, sdone_valid;
  vid_t war_vid, act_vid, sdone_vid;
  rank_t war_rank, act_rank;
  scatter_unit #(.NV(NV), .NE(NE)) dut (.clk, .rst_n, .cfg, .in_valid, .in_ready, .in_data(id),
    .ei_valid(mv[0]), .ei_ready(mr[0]), .ei_req(mq[0]), .ei_rsp_valid(mrv[0]), .ei_rsp(mp[0]),
    .vd_valid(mv[1]), .vd_ready(mr[1]), .vd_req(mq[1]),
    .war_valid, .war_vid, .war_rank, .war_ack, .act_valid, .act_vid, .act_rank, .act_ready,
    .sdone_valid, .sdone_vid);
  dram_model #(.NP(2), .WORDS(16384), .LAT(12), .READY_PCT(80)) u_mem (
    .clk, .rst_n, .req_valid(mv), .req_ready(mr), .req(mq), .rsp_valid(mrv), .rsp(mp));

  int checks = 0, failures = 0, ndone = 0, war_holds = 0;
  graph_gen g;
  bit changed [N];
  int unsigned newv [N];
  int war_cnt [N], act_cnt [N];
  bit written [N];
  int exp_act [N][$];

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    war_ack   = war_valid && ($urandom_range(2) != 0);
    act_ready = ($urandom_range(3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (war_valid && !war_ack) war_holds++;
    if (war_valid && war_ack) war_cnt[war_rank]++;
    if (act_valid && act_ready) begin
      automatic int u = int'(act_rank);
      automatic int idx[$] = exp_act[u].find_first_index(x) with (x == int'(act_vid));
      checks++;
      if (!changed[u] || idx.size() == 0) begin failures++; $display("FAIL: activation %0d->%0d", u, act_vid); end
      else exp_act[u].delete(idx[0]);
      act_cnt[u]++;
      if (act_cnt[u] > war_cnt[u]) begin failures++; $display("FAIL: activation before WAR ack (%0d)", u); end
    end
    if (mv[1] && mr[1]) begin
      automatic int u = int'(mq[1].addr - g.vd_base);
      checks++;
      if (!mq[1].we || !changed[u] || mq[1].wdata != newv[u] || war_cnt[u] != g.ooff[u + 1] - g.ooff[u]) begin
        failures++; $display("FAIL: write of vertex %0d (changed %0b, %0d acks)", u, changed[u], war_cnt[u]);
      end
      written[u] = 1;
    end
    if (sdone_valid) begin
      automatic int u = int'(sdone_vid);
      checks++;
      if (written[u] != changed[u] || exp_act[u].size() != 0) begin
        failures++; $display("FAIL: scatter done for %0d: written %0b, %0d activations missing", u, written[u], exp_act[u].size());
      end
      ndone++;
    end
  end

  initial begin
    g = new();
    g.build(N, 3, 7, 120, 50);
    g.layout(1, 0);
    for (int i = 0; i < g.img_addr.size(); i++) u_mem.mem[g.img_addr[i]] = g.img_data[i];
    cfg = g.gcfg();
    for (int v = 0; v < N; v++) begin
      changed[v] = $urandom_range(1);
      newv[v] = $urandom;
      if (changed[v]) for (int e = g.ooff[v]; e < g.ooff[v + 1]; e++) exp_act[v].push_back(g.ocol[e]);
    end
    in_valid = 0; id = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int v = 0; v < N; v++) begin
      @(negedge clk); in_valid = 1;
      id.vid = v; id.rank = v; id.off_lo = g.ooff[v]; id.off_hi = g.ooff[v + 1];
      id.new_val = newv[v]; id.changed = changed[v];
      @(posedge clk); while (!in_ready) @(posedge clk);
      @(negedge clk); in_valid = 0;
    end
    wait (ndone == N);
    checks++;
    if (war_holds == 0) begin failures++; $display("FAIL: no WAR hold exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
