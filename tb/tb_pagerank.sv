// tb_pagerank: PageRank end to end on the four-AU accelerator at its default sizes.
//
// The same skewed random directed graph as the SSSP test is laid out, its Edge Data replaced
// by 1/outdeg of each edge's source (0.16 fixed point) and every rank set to 1.0 (16.16), with
// all vertices active. The run uses graph_cfg_t.app = APP_PAGERANK. After done, every rank is
// compared with a floating-point reference computed to convergence with the same quantised
// weights. The accelerator stops updating a vertex whose rank moves by less than the
// threshold and truncates each product, so a rank must match within 0.01 + 1% of the
// reference. The test also checks that done came with all units idle, that every vertex ran
// at least once, and that WAR holds and filtered activations happened (PageRank touches all
// vertices repeatedly, so both should).
module tb_pagerank;
  import gas_pkg::*;
  import tb_graph_pkg::*;

  localparam int N       = 1024;
  localparam int DEG     = 4;
  localparam int HUB     = 5;
  localparam int HUB_DEG = 200;
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
  longint cycles = 0, n_war = 0, n_filt = 0;

  for (genvar i = 0; i < NAU; i++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_au[i].u_au.u_syu.war_stall)    n_war++;
      if (dut.g_au[i].u_au.u_syu.act_filtered) n_filt++;
    end
  end

  initial begin : watchdog
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;

  initial begin : main
    graph_gen g;
    longint t0;
    real got, err, worst;
    g = new();
    g.build(N, DEG, HUB, HUB_DEG, 20);
    g.layout(NAU, 0);
    g.pagerank();
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
    checks++;
    if (rank_issued < g.n) begin failures++; $display("FAIL: fewer executions than vertices"); end

    worst = 0.0;
    for (int v = 0; v < g.n; v++) begin
      checks++;
      got = real'(u_mem.mem[g.vd_base + v]) / 65536.0;
      err = (got > g.ref_pr[v]) ? got - g.ref_pr[v] : g.ref_pr[v] - got;
      if (err > worst) worst = err;
      if (err > 0.01 + 0.01 * g.ref_pr[v]) begin
        failures++;
        if (failures < 10) $display("FAIL: vertex %0d rank %f expected %f", v, got, g.ref_pr[v]);
      end
    end
    $display("largest rank error %f, hub rank %f", worst, g.ref_pr[HUB]);

    checks++;
    $display("WAR holds %0d, filtered activations %0d", n_war, n_filt);
    if (n_war == 0 || n_filt == 0) begin
      failures++; $display("FAIL: WAR holds or activation filtering never happened");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
