// tb_gather_unit: the gather unit against a memory model holding a directed test graph whose
// vertices carry random distances, with a sync unit stand-in that refuses neighbour reads at
// random (RAW holds). Every vertex of the graph is sent through once, in rank order. Checks
// per vertex: the gather result equals min over in-edges of (neighbour + weight) computed
// here, the old value and out-edge offsets are passed on, gather done is reported exactly
// once and before the vertex leaves. Also checks that a high-degree vertex came to hold all
// edge slots and that several vertices shared the slots at some point.
module tb_gather_unit;
  import gas_pkg::*;
  import tb_graph_pkg::*;
  localparam int NV = 8, NE = 32, N = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  graph_cfg_t cfg;
  logic in_valid, in_ready;
  vid_t in_vid;
  rank_t in_rank;
  logic     mv [4], mr [4], mrv [4];
  mem_req_t mq [4];
  mem_rsp_t mp [4];
  logic nvd_valid, nvd_grant, gdone_valid, out_valid, out_ready;
  vid_t nvd_vid, gdone_vid;
  rank_t nvd_rank;
  gather_out_t od;
  logic [$clog2(NE):0] busy;
  logic [$clog2(NV):0] owners;
  gather_unit #(.NV(NV), .NE(NE)) dut (.clk, .rst_n, .cfg,
    .in_valid, .in_vid, .in_rank, .in_ready,
    .vi_valid(mv[0]), .vi_ready(mr[0]), .vi_req(mq[0]), .vi_rsp_valid(mrv[0]), .vi_rsp(mp[0]),
    .ei_valid(mv[1]), .ei_ready(mr[1]), .ei_req(mq[1]), .ei_rsp_valid(mrv[1]), .ei_rsp(mp[1]),
    .ed_valid(mv[2]), .ed_ready(mr[2]), .ed_req(mq[2]), .ed_rsp_valid(mrv[2]), .ed_rsp(mp[2]),
    .vd_valid(mv[3]), .vd_ready(mr[3]), .vd_req(mq[3]), .vd_rsp_valid(mrv[3]), .vd_rsp(mp[3]),
    .nvd_valid, .nvd_vid, .nvd_rank, .nvd_grant, .gdone_valid, .gdone_vid,
    .out_valid, .out_ready, .out_data(od), .busy_slots(busy), .slot_owners(owners));
  dram_model #(.NP(4), .WORDS(16384), .LAT(12), .READY_PCT(80)) u_mem (
    .clk, .rst_n, .req_valid(mv), .req_ready(mr), .req(mq), .rsp_valid(mrv), .rsp(mp));

  int checks = 0, failures = 0, nout = 0, all_slots = 0, shared = 0, holds = 0;
  bit gdone_seen [N];
  graph_gen g;
  int unsigned vdist [N];

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    nvd_grant = nvd_valid && ($urandom_range(2) != 0);
    out_ready = ($urandom_range(3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (nvd_valid && !nvd_grant) holds++;
    if (busy == NE && owners == 1) all_slots++;
    if (owners > 1) shared++;
    if (gdone_valid) begin
      checks++;
      if (gdone_seen[gdone_vid]) begin failures++; $display("FAIL: gather done twice for %0d", gdone_vid); end
      gdone_seen[gdone_vid] = 1;
    end
    if (out_valid && out_ready) begin
      automatic int v = int'(od.vid);
      automatic int unsigned acc = 32'hFFFF_FFFF;
      for (int e = g.ioff[v]; e < g.ioff[v + 1]; e++) begin
        automatic longint s = longint'(vdist[g.icol[e]]) + g.iw[e];
        if (s > 32'hFFFF_FFFF) s = 32'hFFFF_FFFF;
        if (s < acc) acc = 32'(s);
      end
      checks++;
      if (od.acc != acc || od.old_val != vdist[v] || od.off_lo != vid_t'(g.ooff[v]) ||
          od.off_hi != vid_t'(g.ooff[v + 1]) || od.rank != rank_t'(v) || !gdone_seen[v]) begin
        failures++;
        $display("FAIL: vertex %0d acc %0d (exp %0d) old %0d (exp %0d) gdone %0b", v, od.acc, acc,
                 od.old_val, vdist[v], gdone_seen[v]);
      end
      nout++;
    end
  end

  initial begin
    g = new();
    g.build(N, 3, 7, 120, 50);
    g.layout(1, 0);
    for (int i = 0; i < g.img_addr.size(); i++) u_mem.mem[g.img_addr[i]] = g.img_data[i];
    for (int v = 0; v < N; v++) begin
      vdist[v] = ($urandom_range(9) == 0) ? 32'hFFFF_FFFF : $urandom_range(1000);
      u_mem.mem[g.vd_base + v] = vdist[v];
    end
    cfg = g.gcfg();
    in_valid = 0; in_vid = 0; in_rank = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int v = 0; v < N; v++) begin
      @(negedge clk); in_valid = 1; in_vid = v; in_rank = v;
      @(posedge clk); while (!in_ready) @(posedge clk);
      @(negedge clk); in_valid = 0;
    end
    wait (nout == N);
    checks++;
    if (all_slots == 0 || shared == 0 || holds == 0) begin
      failures++; $display("FAIL: all-slots %0d shared %0d RAW holds %0d", all_slots, shared, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
