// accel_unit (AU): one complete gather-apply-scatter engine.
//
// Vertices flow  active-list manager -> runtime -> sync unit (rank) -> gather unit ->
// apply unit -> scatter unit, and the scatter unit's activations go back through the sync
// unit, which drops the unnecessary ones, to the active list of the AU that owns the vertex
// (act_out_* leaves the AU, act_in_* arrives from the activation crossbar; a single AU simply
// loops them back). Memory traffic goes through one cache per read-only graph object type
// (Vertex Info, Edge Info, Edge Data), while Vertex Data (read and written by many vertices)
// and the active list go to memory directly; a round-robin arbiter merges everything onto the
// AU's single memory port.
// The sync unit's table is exported (tbl_out) and every AU's table comes back in (ext_tbl) so
// that dependences between vertices owned by different AUs are checked in the owner's table.
// idle is the runtime's termination condition for this AU.
// The set of units and their order are the document's. Passing the edge offsets from gather to
// scatter, leaving Vertex Data uncached (it is written, and caches of several AUs would not be
// coherent) and the single memory port per AU are this design's choices.
module accel_unit
  import gas_pkg::*;
#(
  parameter int unsigned NUM_AU      = 4,
  parameter int unsigned AU_ID       = 0,
  parameter int unsigned GU_NV       = 16,
  parameter int unsigned GU_NE       = 128,
  parameter int unsigned SCU_NV      = 16,
  parameter int unsigned SCU_NE      = 128,
  parameter int unsigned SYU_ENTRIES = 32,
  parameter int unsigned APU_STAGES  = 4,
  parameter int unsigned CACHE_LINES = 512
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  graph_cfg_t gcfg,
  input  al_cfg_t    acfg,
  output logic       mem_valid,
  input  logic       mem_ready,
  output mem_req_t   mem_req,
  input  logic       mem_rsp_valid,
  input  mem_rsp_t   mem_rsp,
  output logic       grc_assign,
  input  logic       grc_inc,
  output syu_entry_t tbl_out [SYU_ENTRIES],
  input  syu_entry_t ext_tbl [NUM_AU][SYU_ENTRIES],
  output logic       act_out_valid,
  output vid_t       act_out_vid,
  input  logic       act_out_ready,
  input  logic       act_in_valid,
  input  vid_t       act_in_vid,
  output logic       act_in_ready,
  output logic       idle
);
  // active list <-> runtime
  logic al_valid, al_ready, al_empty, al_ack_valid;
  vid_t al_vid, al_ack_vid;
  logic al_local_hit, al_mem_act;
  // runtime <-> sync
  logic reg_valid, reg_ready; vid_t reg_vid; rank_t reg_rank;
  // runtime -> gather
  logic rt_gu_valid, rt_gu_ready; vid_t rt_gu_vid; rank_t rt_gu_rank;
  logic [15:0] rt_gcnt, rt_scnt;
  // gather -> apply -> scatter
  logic gu_o_valid, gu_o_ready; gather_out_t gu_o;
  logic ap_o_valid, ap_o_ready; apply_out_t ap_o;
  logic gdone_valid; vid_t gdone_vid;
  logic sdone_valid; vid_t sdone_vid;
  // sync checks
  logic nvd_valid, nvd_grant; vid_t nvd_vid; rank_t nvd_rank;
  logic war_valid, war_ack;   vid_t war_vid; rank_t war_rank;
  logic sa_valid, sa_ready;   vid_t sa_vid;  rank_t sa_rank;
  logic raw_stall, war_stall, act_filtered;
  logic [$clog2(GU_NE):0] gu_busy_slots;
  logic [$clog2(GU_NV):0] gu_slot_owners;

  // memory clients
  logic     gvi_v, gvi_r, gvi_rv;  mem_req_t gvi_q; mem_rsp_t gvi_p;
  logic     gei_v, gei_r, gei_rv;  mem_req_t gei_q; mem_rsp_t gei_p;
  logic     ged_v, ged_r, ged_rv;  mem_req_t ged_q; mem_rsp_t ged_p;
  logic     gvd_v, gvd_r, gvd_rv;  mem_req_t gvd_q; mem_rsp_t gvd_p;
  logic     sei_v, sei_r, sei_rv;  mem_req_t sei_q; mem_rsp_t sei_p;
  logic     svd_v, svd_r;          mem_req_t svd_q;
  logic     alm_v, alm_r, alm_rv;  mem_req_t alm_q; mem_rsp_t alm_p;

  // ---------------- control path ----------------
  active_list_manager #(.NUM_AU(NUM_AU), .AU_ID(AU_ID)) u_alm (
    .clk, .rst_n, .start, .cfg(acfg),
    .v_valid(al_valid), .v_vid(al_vid), .v_ready(al_ready),
    .ack_valid(al_ack_valid), .ack_vid(al_ack_vid),
    .act_valid(act_in_valid), .act_vid(act_in_vid), .act_ready(act_in_ready),
    .mem_valid(alm_v), .mem_ready(alm_r), .mem_req(alm_q),
    .mem_rsp_valid(alm_rv), .mem_rsp(alm_p),
    .empty(al_empty), .local_hit(al_local_hit), .mem_act(al_mem_act));

  runtime #(.MAX_GATHER(GU_NV)) u_rt (
    .clk, .rst_n,
    .al_valid, .al_vid, .al_ready, .al_empty, .al_ack_valid, .al_ack_vid,
    .reg_valid, .reg_vid, .reg_ready, .reg_rank,
    .gu_valid(rt_gu_valid), .gu_vid(rt_gu_vid), .gu_rank(rt_gu_rank), .gu_ready(rt_gu_ready),
    .gather_done(gu_o_valid && gu_o_ready), .scatter_done(sdone_valid),
    .idle, .gather_cnt(rt_gcnt), .scatter_cnt(rt_scnt));

  sync_unit #(.NUM_AU(NUM_AU), .AU_ID(AU_ID), .ENTRIES(SYU_ENTRIES)) u_syu (
    .clk, .rst_n,
    .reg_valid, .reg_vid, .reg_ready, .reg_rank,
    .grc_assign, .grc_inc,
    .gdone_valid, .gdone_vid, .sdone_valid, .sdone_vid,
    .nvd_valid, .nvd_vid, .nvd_rank, .nvd_grant,
    .war_valid, .war_vid, .war_rank, .war_ack,
    .act_valid(sa_valid), .act_vid(sa_vid), .act_rank(sa_rank), .act_ready(sa_ready),
    .act_out_valid, .act_out_vid, .act_out_ready,
    .tbl_out, .ext_tbl,
    .raw_stall, .war_stall, .act_filtered);

  // ---------------- compute path ----------------
  gather_unit #(.NV(GU_NV), .NE(GU_NE)) u_gu (
    .clk, .rst_n, .cfg(gcfg),
    .in_valid(rt_gu_valid), .in_vid(rt_gu_vid), .in_rank(rt_gu_rank), .in_ready(rt_gu_ready),
    .vi_valid(gvi_v), .vi_ready(gvi_r), .vi_req(gvi_q), .vi_rsp_valid(gvi_rv), .vi_rsp(gvi_p),
    .ei_valid(gei_v), .ei_ready(gei_r), .ei_req(gei_q), .ei_rsp_valid(gei_rv), .ei_rsp(gei_p),
    .ed_valid(ged_v), .ed_ready(ged_r), .ed_req(ged_q), .ed_rsp_valid(ged_rv), .ed_rsp(ged_p),
    .vd_valid(gvd_v), .vd_ready(gvd_r), .vd_req(gvd_q), .vd_rsp_valid(gvd_rv), .vd_rsp(gvd_p),
    .nvd_valid, .nvd_vid, .nvd_rank, .nvd_grant,
    .gdone_valid, .gdone_vid,
    .out_valid(gu_o_valid), .out_ready(gu_o_ready), .out_data(gu_o),
    .busy_slots(gu_busy_slots), .slot_owners(gu_slot_owners));

  apply_unit #(.STAGES(APU_STAGES)) u_apu (
    .clk, .rst_n,
    .in_valid(gu_o_valid), .in_ready(gu_o_ready), .in_data(gu_o),
    .out_valid(ap_o_valid), .out_ready(ap_o_ready), .out_data(ap_o));

  scatter_unit #(.NV(SCU_NV), .NE(SCU_NE)) u_scu (
    .clk, .rst_n, .cfg(gcfg),
    .in_valid(ap_o_valid), .in_ready(ap_o_ready), .in_data(ap_o),
    .ei_valid(sei_v), .ei_ready(sei_r), .ei_req(sei_q), .ei_rsp_valid(sei_rv), .ei_rsp(sei_p),
    .vd_valid(svd_v), .vd_ready(svd_r), .vd_req(svd_q),
    .war_valid, .war_vid, .war_rank, .war_ack,
    .act_valid(sa_valid), .act_vid(sa_vid), .act_rank(sa_rank), .act_ready(sa_ready),
    .sdone_valid, .sdone_vid);

  // ---------------- memory subsystem ----------------
  logic     vic_v, vic_r, vic_rv;  mem_req_t vic_q; mem_rsp_t vic_p;
  logic     eic_v, eic_r, eic_rv;  mem_req_t eic_q; mem_rsp_t eic_p;
  logic     edc_v, edc_r, edc_rv;  mem_req_t edc_q; mem_rsp_t edc_p;
  logic     eia_v, eia_r, eia_rv;  mem_req_t eia_q; mem_rsp_t eia_p;
  logic     vi_hit, vi_miss, ei_hit, ei_miss, ed_hit, ed_miss;

  object_cache #(.LINES(CACHE_LINES)) u_vi_cache (
    .clk, .rst_n,
    .cl_valid(gvi_v), .cl_ready(gvi_r), .cl_req(gvi_q), .cl_rsp_valid(gvi_rv), .cl_rsp(gvi_p),
    .mem_valid(vic_v), .mem_ready(vic_r), .mem_req(vic_q), .mem_rsp_valid(vic_rv), .mem_rsp(vic_p),
    .hit_pulse(vi_hit), .miss_pulse(vi_miss));

  // Edge Info is read by both gather and scatter
  logic     ea_in_v [2], ea_in_r [2], ea_in_rv [2];
  mem_req_t ea_in_q [2];
  mem_rsp_t ea_in_p [2];
  assign ea_in_v[0] = gei_v;  assign ea_in_q[0] = gei_q;
  assign ea_in_v[1] = sei_v;  assign ea_in_q[1] = sei_q;
  assign gei_r = ea_in_r[0];  assign gei_rv = ea_in_rv[0];  assign gei_p = ea_in_p[0];
  assign sei_r = ea_in_r[1];  assign sei_rv = ea_in_rv[1];  assign sei_p = ea_in_p[1];

  mem_arb #(.N(2)) u_ei_arb (
    .clk, .rst_n,
    .in_valid(ea_in_v), .in_ready(ea_in_r), .in_req(ea_in_q),
    .in_rsp_valid(ea_in_rv), .in_rsp(ea_in_p),
    .out_valid(eia_v), .out_ready(eia_r), .out_req(eia_q),
    .out_rsp_valid(eia_rv), .out_rsp(eia_p));

  object_cache #(.LINES(CACHE_LINES)) u_ei_cache (
    .clk, .rst_n,
    .cl_valid(eia_v), .cl_ready(eia_r), .cl_req(eia_q), .cl_rsp_valid(eia_rv), .cl_rsp(eia_p),
    .mem_valid(eic_v), .mem_ready(eic_r), .mem_req(eic_q), .mem_rsp_valid(eic_rv), .mem_rsp(eic_p),
    .hit_pulse(ei_hit), .miss_pulse(ei_miss));

  object_cache #(.LINES(CACHE_LINES)) u_ed_cache (
    .clk, .rst_n,
    .cl_valid(ged_v), .cl_ready(ged_r), .cl_req(ged_q), .cl_rsp_valid(ged_rv), .cl_rsp(ged_p),
    .mem_valid(edc_v), .mem_ready(edc_r), .mem_req(edc_q), .mem_rsp_valid(edc_rv), .mem_rsp(edc_p),
    .hit_pulse(ed_hit), .miss_pulse(ed_miss));

  localparam int unsigned NC = 6;
  logic     m_v [NC], m_r [NC], m_rv [NC];
  mem_req_t m_q [NC];
  mem_rsp_t m_p [NC];
  assign m_v[0] = vic_v;  assign m_q[0] = vic_q;
  assign m_v[1] = eic_v;  assign m_q[1] = eic_q;
  assign m_v[2] = edc_v;  assign m_q[2] = edc_q;
  assign m_v[3] = gvd_v;  assign m_q[3] = gvd_q;
  assign m_v[4] = svd_v;  assign m_q[4] = svd_q;
  assign m_v[5] = alm_v;  assign m_q[5] = alm_q;
  assign vic_r = m_r[0];  assign vic_rv = m_rv[0];  assign vic_p = m_p[0];
  assign eic_r = m_r[1];  assign eic_rv = m_rv[1];  assign eic_p = m_p[1];
  assign edc_r = m_r[2];  assign edc_rv = m_rv[2];  assign edc_p = m_p[2];
  assign gvd_r = m_r[3];  assign gvd_rv = m_rv[3];  assign gvd_p = m_p[3];
  assign svd_r = m_r[4];
  assign alm_r = m_r[5];  assign alm_rv = m_rv[5];  assign alm_p = m_p[5];

  mem_arb #(.N(NC)) u_mem_arb (
    .clk, .rst_n,
    .in_valid(m_v), .in_ready(m_r), .in_req(m_q),
    .in_rsp_valid(m_rv), .in_rsp(m_p),
    .out_valid(mem_valid), .out_ready(mem_ready), .out_req(mem_req),
    .out_rsp_valid(mem_rsp_valid), .out_rsp(mem_rsp));

endmodule
