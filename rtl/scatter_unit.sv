// scatter_unit (SCU): distributes each vertex's new value to its neighbours.
//
// For a vertex u whose value changed, the SCU walks u's out-edge list (the offsets come along
// from the gather unit) and for each neighbour w: reads Edge Info to learn w, asks the sync unit
// for the WAR acknowledgement for edge u->w (the sync unit holds it while w is an earlier
// vertex whose gather is still running), and then sends the activation u->w, which the sync
// unit filters and forwards to the active list. Once every edge of u has been acknowledged,
// u's new value is written to Vertex Data, and the SCU reports scatter done (sdone_*), which
// frees u in the sync unit and the runtime. A vertex whose value did not change writes nothing
// and activates nobody, and is done at once.
// Like the gather unit, the SCU keeps up to NV vertices and NE edges in flight, assigns edge
// slots by credit to the lowest-ranked vertex with edges left, and keeps the last free slot
// for its lowest-ranked vertex. WAR requests of waiting slots are polled round robin.
// Memory ports: ei (out-edge Edge Info, reads) and vd (Vertex Data, writes; no response).
// The WAR handshake before the write and the activation decision in the scatter stage are the
// document's; activating all neighbours of a changed vertex is the scatter function of both
// applications built (SSSP, PageRank);
// counts and priorities are this design's choices.
module scatter_unit
  import gas_pkg::*;
#(
  parameter int unsigned NV = 16,
  parameter int unsigned NE = 128
) (
  input  logic       clk,
  input  logic       rst_n,
  input  graph_cfg_t cfg,
  input  logic       in_valid,
  output logic       in_ready,
  input  apply_out_t in_data,
  output logic       ei_valid,
  input  logic       ei_ready,
  output mem_req_t   ei_req,
  input  logic       ei_rsp_valid,
  input  mem_rsp_t   ei_rsp,
  output logic       vd_valid,
  input  logic       vd_ready,
  output mem_req_t   vd_req,
  output logic       war_valid,
  output vid_t       war_vid,
  output rank_t      war_rank,
  input  logic       war_ack,
  output logic       act_valid,
  output vid_t       act_vid,
  output rank_t      act_rank,
  input  logic       act_ready,
  output logic       sdone_valid,
  output vid_t       sdone_vid
);
  localparam int unsigned CW = $clog2(NV);
  localparam int unsigned SW = $clog2(NE);

  logic          c_valid [NV];
  vid_t          c_vid   [NV];
  rank_t         c_rank  [NV];
  vid_t          c_next  [NV], c_hi [NV];
  logic [SW:0]   c_out   [NV];
  val_t          c_val   [NV];
  logic          c_wr    [NV];   // write done (or not needed)

  logic          s_valid  [NE];
  logic [CW-1:0] s_ctx    [NE];
  vid_t          s_e      [NE];
  logic          s_ei_iss [NE], s_ei_got [NE], s_war_ok [NE];
  vid_t          s_nbr    [NE];

  logic [SW-1:0] war_ptr;

  logic          free_c_any; logic [CW-1:0] free_c;
  logic          el_any;     logic [CW-1:0] el_c;
  logic          old_any;    logic [CW-1:0] old_c;
  logic          wr_any;     logic [CW-1:0] wr_c;
  logic          dn_any;     logic [CW-1:0] dn_c;
  logic          fs_any;     logic [SW-1:0] fs;  logic [SW:0] free_cnt;
  logic          ei_any;     logic [SW-1:0] ei_s;
  logic          wa_any;     logic [SW-1:0] wa_s;
  logic          ac_any;     logic [SW-1:0] ac_s;
  logic          alloc;

  always_comb begin
    free_c_any = 1'b0; free_c = '0;
    el_any = 1'b0; el_c = '0; old_any = 1'b0; old_c = '0;
    wr_any = 1'b0; wr_c = '0; dn_any = 1'b0; dn_c = '0;
    for (int unsigned i = 0; i < NV; i++) begin
      if (!c_valid[i] && !free_c_any) begin free_c_any = 1'b1; free_c = CW'(i); end
      if (c_valid[i] && c_next[i] < c_hi[i] && (!el_any || c_rank[i] < c_rank[el_c])) begin
        el_any = 1'b1; el_c = CW'(i);
      end
      if (c_valid[i] && (!old_any || c_rank[i] < c_rank[old_c])) begin
        old_any = 1'b1; old_c = CW'(i);
      end
      if (c_valid[i] && !c_wr[i] && c_next[i] >= c_hi[i] && c_out[i] == '0 && !wr_any) begin
        wr_any = 1'b1; wr_c = CW'(i);
      end
      if (c_valid[i] && c_wr[i] && c_next[i] >= c_hi[i] && c_out[i] == '0 && !dn_any) begin
        dn_any = 1'b1; dn_c = CW'(i);
      end
    end
    fs_any = 1'b0; fs = '0; free_cnt = '0;
    ei_any = 1'b0; ei_s = '0; ac_any = 1'b0; ac_s = '0;
    for (int unsigned j = 0; j < NE; j++) begin
      if (!s_valid[j]) begin
        free_cnt = free_cnt + 1'b1;
        if (!fs_any) begin fs_any = 1'b1; fs = SW'(j); end
      end
      if (s_valid[j] && !s_ei_iss[j] && !ei_any) begin ei_any = 1'b1; ei_s = SW'(j); end
      if (s_valid[j] && s_war_ok[j] && !ac_any) begin ac_any = 1'b1; ac_s = SW'(j); end
    end
    wa_any = 1'b0; wa_s = '0;
    for (int unsigned j = 0; j < NE; j++) begin
      automatic logic [SW-1:0] k = war_ptr + SW'(j);
      if (!wa_any && s_valid[k] && s_ei_got[k] && !s_war_ok[k]) begin wa_any = 1'b1; wa_s = k; end
    end
    alloc = fs_any && el_any && (free_cnt > 1 || el_c == old_c);

    in_ready    = free_c_any;
    ei_valid    = ei_any;
    ei_req      = '0;
    ei_req.addr = cfg.oinfo_base + s_e[ei_s];
    ei_req.tag  = tag_t'(ei_s);
    vd_valid     = wr_any;
    vd_req       = '0;
    vd_req.we    = 1'b1;
    vd_req.addr  = cfg.vdata_base + c_vid[wr_c];
    vd_req.wdata = c_val[wr_c];
    war_valid = wa_any;
    war_vid   = s_nbr[wa_s];
    war_rank  = c_rank[s_ctx[wa_s]];
    act_valid = ac_any;
    act_vid   = s_nbr[ac_s];
    act_rank  = c_rank[s_ctx[ac_s]];
    sdone_valid = dn_any;
    sdone_vid   = c_vid[dn_c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      war_ptr <= '0;
      for (int unsigned i = 0; i < NV; i++) begin
        c_valid[i] <= 1'b0; c_vid[i] <= '0; c_rank[i] <= '0; c_next[i] <= '0;
        c_hi[i] <= '0; c_out[i] <= '0; c_val[i] <= '0; c_wr[i] <= 1'b0;
      end
      for (int unsigned j = 0; j < NE; j++) begin
        s_valid[j] <= 1'b0; s_ctx[j] <= '0; s_e[j] <= '0;
        s_ei_iss[j] <= 1'b0; s_ei_got[j] <= 1'b0; s_war_ok[j] <= 1'b0; s_nbr[j] <= '0;
      end
    end else begin
      war_ptr <= wa_any ? wa_s + 1'b1 : war_ptr + 1'b1;
      if (in_valid && in_ready) begin
        c_valid[free_c] <= 1'b1;
        c_vid[free_c]   <= in_data.vid;
        c_rank[free_c]  <= in_data.rank;
        c_next[free_c]  <= in_data.changed ? in_data.off_lo : in_data.off_hi;
        c_hi[free_c]    <= in_data.off_hi;
        c_out[free_c]   <= '0;
        c_val[free_c]   <= in_data.new_val;
        c_wr[free_c]    <= !in_data.changed;
      end
      if (ei_valid && ei_ready) s_ei_iss[ei_s] <= 1'b1;
      if (ei_rsp_valid) begin
        s_nbr[ei_rsp.tag[SW-1:0]]    <= ei_rsp.rdata;
        s_ei_got[ei_rsp.tag[SW-1:0]] <= 1'b1;
      end
      if (war_valid && war_ack) s_war_ok[wa_s] <= 1'b1;
      for (int unsigned i = 0; i < NV; i++) begin
        automatic logic inc = alloc && el_c == CW'(i);
        automatic logic dec = act_valid && act_ready && s_ctx[ac_s] == CW'(i);
        if (inc && !dec) c_out[i] <= c_out[i] + 1'b1;
        if (dec && !inc) c_out[i] <= c_out[i] - 1'b1;
      end
      if (alloc) begin
        c_next[el_c] <= c_next[el_c] + 1'b1;
        s_valid[fs]  <= 1'b1; s_ctx[fs] <= el_c; s_e[fs] <= c_next[el_c];
        s_ei_iss[fs] <= 1'b0; s_ei_got[fs] <= 1'b0; s_war_ok[fs] <= 1'b0;
      end
      if (act_valid && act_ready) s_valid[ac_s] <= 1'b0;
      if (vd_valid && vd_ready) c_wr[wr_c] <= 1'b1;
      if (sdone_valid) c_valid[dn_c] <= 1'b0;
    end
  end
endmodule
