// gather_unit (GU): collects and reduces the neighbour data of many vertices at once.
//
// Gathering needs several dependent memory reads per edge, each with a long latency, so the GU
// keeps partial state for up to NV vertices and NE edges at a time and lets all of them wait
// in parallel. A vertex context reads the two Vertex Info offsets that bound its edge list and
// its own old value. Edges are then handed out, one per cycle, to free edge slots by a
// credit scheme: the free slot count is the credit, and the context with the lowest rank
// (logically earliest) that still has unassigned edges gets the next slot. A single
// high-degree vertex can thus take every slot, or many low-degree vertices can share them.
// The last free slot is reserved for the lowest-ranked context in the unit, which guarantees
// that the logically earliest vertex can always progress (otherwise slots held by later
// vertices waiting for it could deadlock).
// An edge slot reads in-edge Edge Info (the neighbour index) and Edge Data (the edge value) in
// parallel, asks the sync unit for permission to read the neighbour's value (RAW check; slots
// waiting for it are polled round robin so one blocked slot does not stop the others), reads
// the neighbour's Vertex Data, and finally folds gather_edge(neighbour, edge) into the
// context's accumulator with gather_reduce (one fold per cycle), for the application
// selected by cfg.app, which is also passed on with the result.
// When all edges of a context are folded, the unit reports gather done to the sync unit
// (gdone_*) at once, and offers {vertex, rank, offsets, old value, result} to the apply unit.
// The offsets travel on so that the scatter unit need not read them again.
// Memory ports: vi (Vertex Info), ei (Edge Info), ed (Edge Data), vd (Vertex Data). Each issues
// at most one request per cycle; responses are matched by tag and always accepted.
// Slot and context structure and the credit priority follow the document; the counts
// (NV=16, NE=128: "tens of vertices and hundreds of edges"), the reserved slot, the fixed
// priorities and the reuse of offsets are this design's choices.
module gather_unit
  import gas_pkg::*;
#(
  parameter int unsigned NV = 16,
  parameter int unsigned NE = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  graph_cfg_t  cfg,
  // vertices from the runtime
  input  logic        in_valid,
  input  vid_t        in_vid,
  input  rank_t       in_rank,
  output logic        in_ready,
  // memory ports
  output logic        vi_valid,
  input  logic        vi_ready,
  output mem_req_t    vi_req,
  input  logic        vi_rsp_valid,
  input  mem_rsp_t    vi_rsp,
  output logic        ei_valid,
  input  logic        ei_ready,
  output mem_req_t    ei_req,
  input  logic        ei_rsp_valid,
  input  mem_rsp_t    ei_rsp,
  output logic        ed_valid,
  input  logic        ed_ready,
  output mem_req_t    ed_req,
  input  logic        ed_rsp_valid,
  input  mem_rsp_t    ed_rsp,
  output logic        vd_valid,
  input  logic        vd_ready,
  output mem_req_t    vd_req,
  input  logic        vd_rsp_valid,
  input  mem_rsp_t    vd_rsp,
  // RAW check
  output logic        nvd_valid,
  output vid_t        nvd_vid,
  output rank_t       nvd_rank,
  input  logic        nvd_grant,
  // gather finished
  output logic        gdone_valid,
  output vid_t        gdone_vid,
  // to the apply unit
  output logic        out_valid,
  input  logic        out_ready,
  output gather_out_t out_data,
  // occupancy, for observation
  output logic [$clog2(NE):0] busy_slots,
  output logic [$clog2(NV):0] slot_owners
);
  localparam int unsigned CW = $clog2(NV);
  localparam int unsigned SW = $clog2(NE);
  localparam int unsigned XW = (CW > SW) ? CW : SW;

  // vertex contexts
  logic          c_valid   [NV];
  vid_t          c_vid     [NV];
  rank_t         c_rank    [NV];
  logic [3:0]    c_vi_iss  [NV], c_vi_got [NV];   // in_lo, out_lo, in_hi, out_hi
  logic          c_own_iss [NV], c_own_got[NV];
  vid_t          c_hi      [NV], c_next   [NV];   // in-edge range still to assign
  vid_t          c_olo     [NV], c_ohi    [NV];   // out-edge range, passed on
  logic [SW:0]   c_out     [NV];
  val_t          c_acc     [NV], c_old    [NV];
  logic          c_done    [NV];

  // edge slots
  logic          s_valid   [NE];
  logic [CW-1:0] s_ctx     [NE];
  vid_t          s_e       [NE];
  logic          s_ei_iss  [NE], s_ei_got [NE];
  logic          s_ed_iss  [NE], s_ed_got [NE];
  logic          s_nvd_ok  [NE];
  logic          s_vd_iss  [NE], s_vd_got [NE];
  vid_t          s_nbr     [NE];
  val_t          s_w       [NE], s_nval   [NE];

  logic [SW-1:0] nvd_ptr;

  // ---------------- selection ----------------
  logic          free_c_any;   logic [CW-1:0] free_c;
  logic          vi_any;       logic [CW-1:0] vi_c;   logic [1:0] vi_k;
  logic          own_any;      logic [CW-1:0] own_c;
  logic          fs_any;       logic [SW-1:0] fs;     logic [SW:0] free_cnt;
  logic          el_any;       logic [CW-1:0] el_c;
  logic          old_any;      logic [CW-1:0] old_c;
  logic          alloc;
  logic          ei_any;       logic [SW-1:0] ei_s;
  logic          ed_any;       logic [SW-1:0] ed_s;
  logic          nv_any;       logic [SW-1:0] nv_s;
  logic          vde_any;      logic [SW-1:0] vde_s;
  logic          acc_any;      logic [SW-1:0] acc_s;
  logic          cmp_any;      logic [CW-1:0] cmp_c;
  logic          o_any;        logic [CW-1:0] o_c;

  always_comb begin
    free_c_any = 1'b0; free_c = '0;
    vi_any = 1'b0; vi_c = '0; vi_k = '0;
    own_any = 1'b0; own_c = '0;
    el_any = 1'b0; el_c = '0;
    old_any = 1'b0; old_c = '0;
    cmp_any = 1'b0; cmp_c = '0;
    o_any = 1'b0; o_c = '0;
    slot_owners = '0;
    for (int unsigned i = 0; i < NV; i++) begin
      if (!c_valid[i] && !free_c_any) begin free_c_any = 1'b1; free_c = CW'(i); end
      if (c_valid[i] && !vi_any && c_vi_iss[i] != 4'hF) begin
        vi_any = 1'b1; vi_c = CW'(i);
        for (int k = 3; k >= 0; k--) if (!c_vi_iss[i][k]) vi_k = 2'(k);
      end
      if (c_valid[i] && !own_any && !c_own_iss[i]) begin own_any = 1'b1; own_c = CW'(i); end
      if (c_valid[i] && !c_done[i] && c_vi_got[i] == 4'hF && c_next[i] < c_hi[i] &&
          (!el_any || c_rank[i] < c_rank[el_c])) begin
        el_any = 1'b1; el_c = CW'(i);
      end
      if (c_valid[i] && !c_done[i] && (!old_any || c_rank[i] < c_rank[old_c])) begin
        old_any = 1'b1; old_c = CW'(i);
      end
      if (c_valid[i] && !c_done[i] && !cmp_any && c_vi_got[i] == 4'hF && c_own_got[i] &&
          c_next[i] >= c_hi[i] && c_out[i] == '0) begin
        cmp_any = 1'b1; cmp_c = CW'(i);
      end
      if (c_valid[i] && c_done[i] && !o_any) begin o_any = 1'b1; o_c = CW'(i); end
      if (c_valid[i] && c_out[i] != '0) slot_owners = slot_owners + 1'b1;
    end

    fs_any = 1'b0; fs = '0; free_cnt = '0;
    ei_any = 1'b0; ei_s = '0;
    ed_any = 1'b0; ed_s = '0;
    vde_any = 1'b0; vde_s = '0;
    acc_any = 1'b0; acc_s = '0;
    for (int unsigned j = 0; j < NE; j++) begin
      if (!s_valid[j]) begin
        free_cnt = free_cnt + 1'b1;
        if (!fs_any) begin fs_any = 1'b1; fs = SW'(j); end
      end
      if (s_valid[j] && !s_ei_iss[j] && !ei_any) begin ei_any = 1'b1; ei_s = SW'(j); end
      if (s_valid[j] && !s_ed_iss[j] && !ed_any) begin ed_any = 1'b1; ed_s = SW'(j); end
      if (s_valid[j] && s_nvd_ok[j] && !s_vd_iss[j] && !vde_any) begin vde_any = 1'b1; vde_s = SW'(j); end
      if (s_valid[j] && s_vd_got[j] && s_ed_got[j] && !acc_any) begin acc_any = 1'b1; acc_s = SW'(j); end
    end
    busy_slots = (SW+1)'(NE) - free_cnt;

    nv_any = 1'b0; nv_s = '0;
    for (int unsigned j = 0; j < NE; j++) begin
      automatic logic [SW-1:0] k = nvd_ptr + SW'(j);
      if (!nv_any && s_valid[k] && s_ei_got[k] && !s_nvd_ok[k]) begin nv_any = 1'b1; nv_s = k; end
    end

    // credit check: the last free slot only goes to the earliest context
    alloc = fs_any && el_any && (free_cnt > 1 || el_c == old_c);
  end

  // ---------------- requests ----------------
  always_comb begin
    in_ready = free_c_any;

    vi_valid      = vi_any;
    vi_req        = '0;
    vi_req.addr   = cfg.vinfo_base + (c_vid[vi_c] << 1) + vid_t'(vi_k);
    vi_req.tag    = tag_t'({vi_c, vi_k});

    ei_valid      = ei_any;
    ei_req        = '0;
    ei_req.addr   = cfg.einfo_base + s_e[ei_s];
    ei_req.tag    = tag_t'(ei_s);

    ed_valid      = ed_any;
    ed_req        = '0;
    ed_req.addr   = cfg.edata_base + s_e[ed_s];
    ed_req.tag    = tag_t'(ed_s);

    vd_valid      = own_any || vde_any;
    vd_req        = '0;
    if (own_any) begin
      vd_req.addr = cfg.vdata_base + c_vid[own_c];
      vd_req.tag  = tag_t'({1'b1, XW'(own_c)});
    end else begin
      vd_req.addr = cfg.vdata_base + s_nbr[vde_s];
      vd_req.tag  = tag_t'({1'b0, XW'(vde_s)});
    end

    nvd_valid = nv_any;
    nvd_vid   = s_nbr[nv_s];
    nvd_rank  = c_rank[s_ctx[nv_s]];

    gdone_valid = cmp_any;
    gdone_vid   = c_vid[cmp_c];

    out_valid        = o_any;
    out_data.vid     = c_vid[o_c];
    out_data.app     = cfg.app;
    out_data.rank    = c_rank[o_c];
    out_data.off_lo  = c_olo[o_c];
    out_data.off_hi  = c_ohi[o_c];
    out_data.old_val = c_old[o_c];
    out_data.acc     = c_acc[o_c];
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nvd_ptr <= '0;
      for (int unsigned i = 0; i < NV; i++) begin
        c_valid[i] <= 1'b0;  c_done[i] <= 1'b0;
        c_vi_iss[i] <= '0; c_vi_got[i] <= '0; c_olo[i] <= '0; c_ohi[i] <= '0;
        c_own_iss[i] <= 1'b0; c_own_got[i] <= 1'b0;
        c_out[i] <= '0; c_next[i] <= '0; c_hi[i] <= '0;
        c_vid[i] <= '0; c_rank[i] <= '0; c_acc[i] <= '0; c_old[i] <= '0;
      end
      for (int unsigned j = 0; j < NE; j++) begin
        s_valid[j] <= 1'b0; s_ctx[j] <= '0; s_e[j] <= '0;
        s_ei_iss[j] <= 1'b0; s_ei_got[j] <= 1'b0;
        s_ed_iss[j] <= 1'b0; s_ed_got[j] <= 1'b0;
        s_nvd_ok[j] <= 1'b0; s_vd_iss[j] <= 1'b0; s_vd_got[j] <= 1'b0;
        s_nbr[j] <= '0; s_w[j] <= '0; s_nval[j] <= '0;
      end
    end else begin
      nvd_ptr <= nv_any ? nv_s + 1'b1 : nvd_ptr + 1'b1;

      // new vertex
      if (in_valid && in_ready) begin
        c_valid[free_c]   <= 1'b1;  c_done[free_c]    <= 1'b0;
        c_vid[free_c]     <= in_vid; c_rank[free_c]   <= in_rank;
        c_vi_iss[free_c]  <= '0;    c_vi_got[free_c]  <= '0;
        c_own_iss[free_c] <= 1'b0;  c_own_got[free_c] <= 1'b0;
        c_out[free_c]     <= '0;
        c_acc[free_c]     <= gather_identity(cfg.app);
      end

      // Vertex Info
      if (vi_valid && vi_ready) c_vi_iss[vi_c][vi_k] <= 1'b1;
      if (vi_rsp_valid) begin
        automatic logic [CW-1:0] c = vi_rsp.tag[CW+1:2];
        c_vi_got[c][vi_rsp.tag[1:0]] <= 1'b1;
        unique case (vi_rsp.tag[1:0])
          2'd0: c_next[c] <= vi_rsp.rdata;
          2'd1: c_olo[c]  <= vi_rsp.rdata;
          2'd2: c_hi[c]   <= vi_rsp.rdata;
          default: c_ohi[c] <= vi_rsp.rdata;
        endcase
      end

      // Vertex Data (own value and neighbour values)
      if (vd_valid && vd_ready) begin
        if (own_any) c_own_iss[own_c] <= 1'b1;
        else         s_vd_iss[vde_s]  <= 1'b1;
      end
      if (vd_rsp_valid) begin
        if (vd_rsp.tag[XW]) begin
          c_old[vd_rsp.tag[CW-1:0]]     <= vd_rsp.rdata;
          c_own_got[vd_rsp.tag[CW-1:0]] <= 1'b1;
        end else begin
          s_nval[vd_rsp.tag[SW-1:0]]   <= vd_rsp.rdata;
          s_vd_got[vd_rsp.tag[SW-1:0]] <= 1'b1;
        end
      end

      // Edge Info / Edge Data
      if (ei_valid && ei_ready) s_ei_iss[ei_s] <= 1'b1;
      if (ei_rsp_valid) begin
        s_nbr[ei_rsp.tag[SW-1:0]]    <= ei_rsp.rdata;
        s_ei_got[ei_rsp.tag[SW-1:0]] <= 1'b1;
      end
      if (ed_valid && ed_ready) s_ed_iss[ed_s] <= 1'b1;
      if (ed_rsp_valid) begin
        s_w[ed_rsp.tag[SW-1:0]]      <= ed_rsp.rdata;
        s_ed_got[ed_rsp.tag[SW-1:0]] <= 1'b1;
      end

      // RAW permission
      if (nvd_valid && nvd_grant) s_nvd_ok[nv_s] <= 1'b1;

      // edge slot allocation and accumulation (outstanding count per context)
      for (int unsigned i = 0; i < NV; i++) begin
        automatic logic inc = alloc && el_c == CW'(i);
        automatic logic dec = acc_any && s_ctx[acc_s] == CW'(i);
        if (inc && !dec) c_out[i] <= c_out[i] + 1'b1;
        if (dec && !inc) c_out[i] <= c_out[i] - 1'b1;
      end
      if (alloc) begin
        c_next[el_c]   <= c_next[el_c] + 1'b1;
        s_valid[fs]    <= 1'b1;  s_ctx[fs]    <= el_c;   s_e[fs] <= c_next[el_c];
        s_ei_iss[fs]   <= 1'b0;  s_ei_got[fs] <= 1'b0;
        s_ed_iss[fs]   <= 1'b0;  s_ed_got[fs] <= 1'b0;
        s_nvd_ok[fs]   <= 1'b0;  s_vd_iss[fs] <= 1'b0;  s_vd_got[fs] <= 1'b0;
      end
      if (acc_any) begin
        c_acc[s_ctx[acc_s]] <= gather_reduce(cfg.app, c_acc[s_ctx[acc_s]], gather_edge(cfg.app, s_nval[acc_s], s_w[acc_s]));
        s_valid[acc_s] <= 1'b0;
      end

      if (cmp_any) c_done[cmp_c] <= 1'b1;
      if (out_valid && out_ready) c_valid[o_c] <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(alloc && acc_any && fs == acc_s))
    else $error("gather_unit: slot allocated while busy");
endmodule
