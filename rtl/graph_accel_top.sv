// graph_accel_top: the multi-AU graph analytics accelerator.
//
// NUM_AU accelerator units run side by side; vertex v (with its active-list bit and its sync
// table row) belongs to AU v mod NUM_AU. Three small pieces tie the units together:
//   global_rank_counter          keeps every sync unit's rank counter in step,
//   act_xbar                     delivers each activation to the AU owning the vertex,
//   global_termination_detector  raises done when all AUs are idle.
// Every sync unit sees the vertex tables of all AUs, so an edge between vertices of different
// AUs is ordered by the table of the vertex's owner.
// Host interface: the host writes the graph (CSR arrays) and each AU's active list into
// memory, sets gcfg / acfg, pulses start for one cycle and waits for done. Each AU has its own
// memory port (mem_*[i]); the memory system behind them is shared, one bank per AU in the
// document's multibank arrangement, and must make a write visible to every request it accepts
// afterwards. rank_issued counts the ranks handed out (vertex executions).
// NUM_AU=4 is the document's configuration; all other sizes are this design's defaults.
// Lint note: a linter that treats each unpacked array as one signal reports a combinational
// loop through ao_valid/ao_ready. There is none per element: an AU's activation valid does
// not depend on any ready, and the crossbar's ready depends only on valids and the
// destinations' readies.
module graph_accel_top
  import gas_pkg::*;
#(
  parameter int unsigned NUM_AU      = 4,
  parameter int unsigned GU_NV       = 16,
  parameter int unsigned GU_NE       = 128,
  parameter int unsigned SCU_NV      = 16,
  parameter int unsigned SCU_NE      = 128,
  parameter int unsigned SYU_ENTRIES = 32,
  parameter int unsigned APU_STAGES  = 4,
  parameter int unsigned CACHE_LINES = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  graph_cfg_t  gcfg,
  input  al_cfg_t     acfg          [NUM_AU],
  output logic        mem_valid     [NUM_AU],
  input  logic        mem_ready     [NUM_AU],
  output mem_req_t    mem_req       [NUM_AU],
  input  logic        mem_rsp_valid [NUM_AU],
  input  mem_rsp_t    mem_rsp       [NUM_AU],
  output logic        done,
  output logic [31:0] rank_issued
);
  logic       grc_assign [NUM_AU];
  logic       grc_inc;
  syu_entry_t tbl [NUM_AU][SYU_ENTRIES];
  logic       ao_valid [NUM_AU], ao_ready [NUM_AU];
  vid_t       ao_vid   [NUM_AU];
  logic       ai_valid [NUM_AU], ai_ready [NUM_AU];
  vid_t       ai_vid   [NUM_AU];
  logic       au_idle  [NUM_AU];
  logic       xbar_busy;

  for (genvar i = 0; i < NUM_AU; i++) begin : g_au
    accel_unit #(
      .NUM_AU(NUM_AU), .AU_ID(i), .GU_NV(GU_NV), .GU_NE(GU_NE), .SCU_NV(SCU_NV),
      .SCU_NE(SCU_NE), .SYU_ENTRIES(SYU_ENTRIES), .APU_STAGES(APU_STAGES),
      .CACHE_LINES(CACHE_LINES)
    ) u_au (
      .clk, .rst_n, .start, .gcfg, .acfg(acfg[i]),
      .mem_valid(mem_valid[i]), .mem_ready(mem_ready[i]), .mem_req(mem_req[i]),
      .mem_rsp_valid(mem_rsp_valid[i]), .mem_rsp(mem_rsp[i]),
      .grc_assign(grc_assign[i]), .grc_inc,
      .tbl_out(tbl[i]), .ext_tbl(tbl),
      .act_out_valid(ao_valid[i]), .act_out_vid(ao_vid[i]), .act_out_ready(ao_ready[i]),
      .act_in_valid(ai_valid[i]), .act_in_vid(ai_vid[i]), .act_in_ready(ai_ready[i]),
      .idle(au_idle[i]));
  end

  global_rank_counter #(.NUM_AU(NUM_AU)) u_grc (
    .clk, .rst_n, .assign_rank(grc_assign), .inc(grc_inc), .issued(rank_issued));

  act_xbar #(.NUM_AU(NUM_AU)) u_xbar (
    .clk, .rst_n,
    .src_valid(ao_valid), .src_vid(ao_vid), .src_ready(ao_ready),
    .dst_valid(ai_valid), .dst_vid(ai_vid), .dst_ready(ai_ready),
    .busy(xbar_busy));

  global_termination_detector #(.NUM_AU(NUM_AU)) u_gtd (
    .clk, .rst_n, .start, .au_idle, .done);

endmodule
