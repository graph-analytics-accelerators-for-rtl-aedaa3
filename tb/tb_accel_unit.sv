// tb_accel_unit: one accelerator unit working alone (NUM_AU=1: its activations loop back to its
// own active list and it sees only its own vertex table) on single-source shortest paths over
// a directed random graph of 600 vertices. The host writes the graph and an all-active list,
// starts the unit and waits for it to go idle; every distance is then compared with a
// Bellman-Ford reference. RAW and WAR holds inside the unit must both have happened.
module tb_accel_unit;
  import gas_pkg::*;
  import tb_graph_pkg::*;
  localparam int N = 600, WD = 16384;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  graph_cfg_t gcfg;
  al_cfg_t acfg;
  logic mv [1], mr [1], mrv [1];
  mem_req_t mq [1];
  mem_rsp_t mp [1];
  logic grc_assign, idle;
  syu_entry_t tbl [32];
  syu_entry_t ext [1][32];
  logic aov, aor, aiv, air;
  vid_t aovid, aivid;
  assign ext[0] = tbl;
  assign aiv = aov; assign aivid = aovid; assign aor = air;

  accel_unit #(.NUM_AU(1), .AU_ID(0)) dut (.clk, .rst_n, .start, .gcfg, .acfg,
    .mem_valid(mv[0]), .mem_ready(mr[0]), .mem_req(mq[0]), .mem_rsp_valid(mrv[0]), .mem_rsp(mp[0]),
    .grc_assign, .grc_inc(grc_assign), .tbl_out(tbl), .ext_tbl(ext),
    .act_out_valid(aov), .act_out_vid(aovid), .act_out_ready(aor),
    .act_in_valid(aiv), .act_in_vid(aivid), .act_in_ready(air), .idle);
  dram_model #(.NP(1), .WORDS(WD), .LAT(20), .READY_PCT(80)) u_mem (
    .clk, .rst_n, .req_valid(mv), .req_ready(mr), .req(mq), .rsp_valid(mrv), .rsp(mp));

  int checks = 0, failures = 0, raw = 0, war = 0, execs = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.raw_stall) raw++;
    if (dut.war_stall) war++;
    if (grc_assign) execs++;
  end
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    graph_gen g;
    g = new();
    g.build(N, 4, 3, 200, 20);
    g.reference(0);
    g.layout(1, 0);
    for (int i = 0; i < g.img_addr.size(); i++) u_mem.mem[g.img_addr[i]] = g.img_data[i];
    gcfg = g.gcfg();
    acfg = g.acfg(0);
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (3) @(posedge clk);
    while (!idle) @(posedge clk);
    repeat (2) @(posedge clk);
    checks++;
    if (!idle) begin failures++; $display("FAIL: idle dropped"); end
    for (int v = 0; v < N; v++) begin
      checks++;
      if (u_mem.mem[g.vd_base + v] != g.ref_dist[v]) begin
        failures++;
        if (failures < 10) $display("FAIL: vertex %0d distance %0d expected %0d", v, u_mem.mem[g.vd_base + v], g.ref_dist[v]);
      end
    end
    checks++;
    if (raw == 0 || war == 0) begin failures++; $display("FAIL: RAW holds %0d WAR holds %0d", raw, war); end
    $display("%0d vertex executions, RAW holds %0d, WAR holds %0d", execs, raw, war);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
