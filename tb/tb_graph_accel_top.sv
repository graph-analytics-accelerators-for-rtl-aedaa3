// tb_graph_accel_top: end-to-end test of the four-AU accelerator at its default sizes.
//
// The host side writes a skewed random graph (N vertices, one hub of degree HUB_DEG) and four
// full active lists into the memory model, pulses start and waits for done. It then compares
// every vertex's distance with a Bellman-Ford reference, checks that done came only once all
// units were idle, and counts how often each mechanism of the design fired: RAW holds, WAR
// holds, filtered activations, activations absorbed by a local active-list segment, activations
// written to the in-memory active list, activations crossing AUs, cache hits and misses, edge
// slots shared by several vertices, and one vertex holding every gather edge slot.
// A mechanism that never fired is a failure.
module tb_graph_accel_top;
  import gas_pkg::*;
  import tb_graph_pkg::*;

  localparam int N       = 2048;
  localparam int DEG     = 4;
  localparam int HUB     = 5;
  localparam int HUB_DEG = 400;
  localparam int NAU     = 4;
  localparam int WD      = 65536;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  graph_cfg_t gcfg;
  al_cfg_t    acfg [NAU];
  logic       mv [NAU], mr [NAU], mrv [NAU];
  mem_req_t   mq [NAU];
  mem_rsp_t   mp [NAU];
  logic       done;
  logic [31:0] rank_issued;

  graph_accel_top dut (
    .clk, .rst_n, .start, .gcfg, .acfg,
    .mem_valid(mv), .mem_ready(mr), .mem_req(mq), .mem_rsp_valid(mrv), .mem_rsp(mp),
    .done, .rank_issued);

  dram_model #(.NP(NAU), .WORDS(WD), .LAT(20), .READY_PCT(80)) u_mem (
    .clk, .rst_n, .req_valid(mv), .req_ready(mr), .req(mq), .rsp_valid(mrv), .rsp(mp));

  int checks = 0, failures = 0;
  longint cycles = 0;

  // mechanism counters
  longint n_raw[NAU], n_war[NAU], n_filt[NAU], n_lhit[NAU], n_mact[NAU], n_chit[NAU], n_cmiss[NAU];
  longint n_share[NAU], n_hub_all[NAU];
  longint n_cross = 0;

  for (genvar i = 0; i < NAU; i++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_au[i].u_au.u_syu.raw_stall)    n_raw[i]++;
      if (dut.g_au[i].u_au.u_syu.war_stall)    n_war[i]++;
      if (dut.g_au[i].u_au.u_syu.act_filtered) n_filt[i]++;
      if (dut.g_au[i].u_au.u_alm.local_hit)    n_lhit[i]++;
      if (dut.g_au[i].u_au.u_alm.mem_act)      n_mact[i]++;
      if (dut.g_au[i].u_au.vi_hit || dut.g_au[i].u_au.ei_hit || dut.g_au[i].u_au.ed_hit) n_chit[i]++;
      if (dut.g_au[i].u_au.vi_miss || dut.g_au[i].u_au.ei_miss || dut.g_au[i].u_au.ed_miss) n_cmiss[i]++;
      if (dut.g_au[i].u_au.gu_slot_owners > 1) n_share[i]++;
      if (dut.g_au[i].u_au.gu_slot_owners == 1 && dut.g_au[i].u_au.gu_busy_slots == 128) n_hub_all[i]++;
      if (dut.ao_valid[i] && dut.ao_ready[i] && (dut.ao_vid[i] % NAU) != i) n_cross++;
    end
  end

  function automatic longint sum(longint a[NAU]);
    longint s = 0;
    for (int i = 0; i < NAU; i++) s += a[i];
    return s;
  endfunction

  task automatic mech(string name, longint cnt);
    checks++;
    $display("  %-34s %0d", name, cnt);
    if (cnt == 0) begin
      failures++;
      $display("FAIL: mechanism '%s' never happened", name);
    end
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;

  initial begin : main
    graph_gen g;
    longint t0;
    for (int i = 0; i < NAU; i++) begin
      n_raw[i] = 0; n_war[i] = 0; n_filt[i] = 0; n_lhit[i] = 0; n_mact[i] = 0;
      n_chit[i] = 0; n_cmiss[i] = 0; n_share[i] = 0; n_hub_all[i] = 0;
    end
    g = new();
    g.build(N, DEG, HUB, HUB_DEG, 20);
    g.reference(0);
    g.layout(NAU, 0);
    if (g.words > WD) $fatal(1, "graph does not fit the memory model");
    $display("graph: %0d vertices, %0d directed edges, %0d memory words", g.n, g.m, g.words);
    for (int i = 0; i < g.img_addr.size(); i++) u_mem.mem[g.img_addr[i]] = g.img_data[i];
    gcfg = g.gcfg();
    for (int i = 0; i < NAU; i++) acfg[i] = g.acfg(i);

    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    start = 1;
    @(posedge clk);
    start = 0;
    t0 = cycles;
    while (!done) @(posedge clk);
    $display("done after %0d cycles, %0d vertex executions", cycles - t0, rank_issued);

    checks++;
    if (!(dut.au_idle[0] && dut.au_idle[1] && dut.au_idle[2] && dut.au_idle[3])) begin
      failures++; $display("FAIL: done while a unit is busy");
    end

    for (int v = 0; v < g.n; v++) begin
      checks++;
      if (u_mem.mem[g.vd_base + v] != g.ref_dist[v]) begin
        failures++;
        if (failures < 10) $display("FAIL: vertex %0d distance %0d expected %0d", v,
                                    u_mem.mem[g.vd_base + v], g.ref_dist[v]);
      end
    end
    // at least one execution per vertex, and the asynchronous schedule should not need
    // more than a few rounds of the graph
    checks++;
    if (rank_issued < g.n) begin failures++; $display("FAIL: fewer executions than vertices"); end

    $display("mechanisms:");
    mech("RAW hold (neighbour read waits)", sum(n_raw));
    mech("WAR hold (scatter write waits)", sum(n_war));
    mech("activation filtered by SYU", sum(n_filt));
    mech("activation absorbed locally", sum(n_lhit));
    mech("activation written to AL memory", sum(n_mact));
    mech("activation crossing AUs", n_cross);
    mech("cache hit", sum(n_chit));
    mech("cache miss", sum(n_cmiss));
    mech("edge slots shared by vertices", sum(n_share));
    mech("one vertex holds all gather slots", sum(n_hub_all));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
