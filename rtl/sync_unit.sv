// sync_unit (SYU): keeps concurrently executing vertices sequentially consistent.
//
// Every vertex gets a unique rank when the runtime registers it; lower rank means logically
// earlier. The vertex table holds, per executing vertex, its index, rank and whether its
// gather has finished; the row is freed when its scatter finishes. Following the edge
// consistency model, three kinds of request are checked against the table of the AU that owns
// the neighbour vertex (every AU's table is visible to every sync unit, ext_tbl):
//   RAW  (nvd_*, from the gather unit of v reading neighbour u): held while u is executing
//        with a lower rank than v, i.e. until u has written its new value.
//   WAR  (war_*, from the scatter unit of u, edge u->w): held while w is executing with a
//        lower rank than u and has not finished its gather.
//   ACT  (act_*, activation u->w): dropped when w is executing with a higher rank than u,
//        since w will then read u's new value anyway; otherwise passed on to the active list
//        of w's owner (act_out_*).
// Rank: {counter, AU_ID}. The counter advances whenever any AU assigns a rank (grc_inc).
// A vertex that is already in the table is not registered a second time until its first
// instance leaves (reg_ready low), which keeps table lookups unambiguous.
// All checks are combinational: a request is granted in the cycle it is presented; a held
// request is simply not granted and the requester retries.
// The table and the three rules are the document's; the table size, the register-once rule
// and the freeing of a row at scatter end (rather than at the vertex write) are this design's.
module sync_unit
  import gas_pkg::*;
#(
  parameter int unsigned NUM_AU  = 4,
  parameter int unsigned AU_ID   = 0,
  parameter int unsigned ENTRIES = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  // registration from the runtime
  input  logic       reg_valid,
  input  vid_t       reg_vid,
  output logic       reg_ready,
  output rank_t      reg_rank,
  // global rank counter
  output logic       grc_assign,
  input  logic       grc_inc,
  // state updates
  input  logic       gdone_valid,
  input  vid_t       gdone_vid,
  input  logic       sdone_valid,
  input  vid_t       sdone_vid,
  // RAW check for neighbour data reads
  input  logic       nvd_valid,
  input  vid_t       nvd_vid,
  input  rank_t      nvd_rank,
  output logic       nvd_grant,
  // WAR check before scatter writes
  input  logic       war_valid,
  input  vid_t       war_vid,
  input  rank_t      war_rank,
  output logic       war_ack,
  // activations from the scatter unit
  input  logic       act_valid,
  input  vid_t       act_vid,
  input  rank_t      act_rank,
  output logic       act_ready,
  output logic       act_out_valid,
  output vid_t       act_out_vid,
  input  logic       act_out_ready,
  // vertex tables
  output syu_entry_t tbl_out [ENTRIES],
  input  syu_entry_t ext_tbl [NUM_AU][ENTRIES],
  // event pulses for observation
  output logic       raw_stall,
  output logic       war_stall,
  output logic       act_filtered
);
  syu_entry_t            tbl [ENTRIES];
  logic [RANK_CNT_W-1:0] cnt;

  typedef struct packed {
    logic  hit;
    rank_t rank;
    logic  gdone;
  } look_t;

  function automatic look_t lookup(input syu_entry_t t [NUM_AU][ENTRIES], input vid_t v);
    look_t r;
    int unsigned o;
    r = '0;
    o = (NUM_AU > 1) ? int'(v % NUM_AU) : 0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (t[o][i].valid && t[o][i].vid == v) begin
        r.hit   = 1'b1;
        r.rank  = t[o][i].rank;
        r.gdone = t[o][i].gdone;
      end
    return r;
  endfunction

  look_t nvd_l, war_l, act_l;
  logic  free_any, dup;
  int unsigned free_idx;

  always_comb begin
    free_any = 1'b0;
    free_idx = 0;
    dup      = 1'b0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!tbl[i].valid && !free_any) begin
        free_any = 1'b1;
        free_idx = i;
      end
      if (tbl[i].valid && tbl[i].vid == reg_vid) dup = 1'b1;
    end
    reg_ready  = free_any && !dup;
    reg_rank   = {cnt, AU_ID_W'(AU_ID)};
    grc_assign = reg_valid && reg_ready;

    nvd_l = lookup(ext_tbl, nvd_vid);
    war_l = lookup(ext_tbl, war_vid);
    act_l = lookup(ext_tbl, act_vid);

    nvd_grant = nvd_valid && !(nvd_l.hit && nvd_l.rank < nvd_rank);
    war_ack   = war_valid && !(war_l.hit && war_l.rank < war_rank && !war_l.gdone);

    act_filtered  = act_valid && act_l.hit && act_rank < act_l.rank;
    act_out_valid = act_valid && !act_filtered;
    act_out_vid   = act_vid;
    act_ready     = act_filtered || act_out_ready;

    raw_stall = nvd_valid && !nvd_grant;
    war_stall = war_valid && !war_ack;
  end

  always_comb
    for (int unsigned i = 0; i < ENTRIES; i++) tbl_out[i] = tbl[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int unsigned i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else begin
      if (grc_inc) cnt <= cnt + 1'b1;
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        if (gdone_valid && tbl[i].valid && tbl[i].vid == gdone_vid) tbl[i].gdone <= 1'b1;
        if (sdone_valid && tbl[i].valid && tbl[i].vid == sdone_vid) tbl[i].valid <= 1'b0;
      end
      if (reg_valid && reg_ready) begin
        tbl[free_idx].valid <= 1'b1;
        tbl[free_idx].vid   <= reg_vid;
        tbl[free_idx].rank  <= reg_rank;
        tbl[free_idx].gdone <= 1'b0;
      end
    end
  end

  // A vertex may only finish gather or scatter while it is registered.
  always_ff @(posedge clk) begin
    if (rst_n && sdone_valid) begin
      automatic logic f = 1'b0;
      for (int unsigned i = 0; i < ENTRIES; i++) f |= tbl[i].valid && tbl[i].vid == sdone_vid;
      assert (f) else $error("sync_unit: scatter done for unregistered vertex %0d", sdone_vid);
    end
  end
endmodule
