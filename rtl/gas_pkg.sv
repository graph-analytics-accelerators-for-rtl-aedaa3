// gas_pkg: types, sizes and the application plug-in shared by the graph accelerator.
//
// The accelerator is a gather-apply-scatter (GAS) template: the blocks move vertices, edges,
// ranks and memory words around, and the few functions at the bottom of this package are the
// only application-specific part. Two of the four applications evaluated with the template
// are plugged in, selected by graph_cfg_t.app when the run starts: single-source shortest
// path (SSSP) and PageRank (see the functions for their definitions). The gather unit copies
// the selection into every gather result, so the apply unit needs no configuration of its
// own. Loopy belief propagation and SGD are not plugged in: they need wider, vector-valued
// vertex data. Adding an application means adding an app_t value and its case in each
// function.
//
// Memory traffic uses one request/response format throughout: 32-bit words, word addresses,
// a tag that is returned with the response, and the address echoed in the response so that
// caches can fill without miss-status registers. Requests use valid/ready; responses are
// valid only, every requester reserves space for its responses before it asks.
package gas_pkg;

  parameter int unsigned DATA_W     = 32;  // vertex and edge value width
  parameter int unsigned ADDR_W     = 32;  // word address width
  parameter int unsigned VID_W      = 32;  // vertex and edge index width
  parameter int unsigned TAG_W      = 16;  // memory tag width
  parameter int unsigned RANK_CNT_W = 32;  // rank counter width
  parameter int unsigned AU_ID_W    = 2;   // AU number appended to a rank: up to 4 AUs
  parameter int unsigned RANK_W     = RANK_CNT_W + AU_ID_W;
  parameter int unsigned SEG_BITS   = 256; // active-list bit-vector segment
  parameter int unsigned SEG_WORDS  = SEG_BITS / DATA_W;

  typedef logic [DATA_W-1:0] val_t;
  typedef logic [VID_W-1:0]  vid_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [RANK_W-1:0] rank_t;

  typedef struct packed {
    addr_t addr;
    logic  we;
    val_t  wdata;
    tag_t  tag;
  } mem_req_t;

  typedef struct packed {
    addr_t addr;
    val_t  rdata;
    tag_t  tag;
  } mem_rsp_t;

  // Where the host placed the graph in memory (compressed sparse row). Gather walks the
  // in-edges of a vertex, scatter its out-edges; an undirected graph may point both edge
  // arrays at the same data.
  // Application run by the gather, apply and scatter functions below (chosen at start).
  typedef enum logic [0:0] {
    APP_SSSP     = 1'b0,     // single-source shortest path
    APP_PAGERANK = 1'b1      // PageRank, values in unsigned 16.16 fixed point
  } app_t;

  typedef struct packed {
    app_t  app;
    addr_t vinfo_base;   // Vertex Info: words 2v and 2v+1 = in-edge and out-edge offset of v
                         // (N+1 pairs)
    addr_t einfo_base;   // Edge Info, in-edges: source vertex per edge
    addr_t edata_base;   // Edge Data, in-edges: one value per edge
    addr_t oinfo_base;   // Edge Info, out-edges: destination vertex per edge
    addr_t vdata_base;   // Vertex Data: one value per vertex
  } graph_cfg_t;

  // Where the host placed one AU's active list.
  typedef struct packed {
    addr_t bv_base;      // bit vector, bit l for local vertex l
    addr_t q_base;       // circular queue of segment indices
    addr_t qf_base;      // one "segment is queued" bit per segment
    vid_t  q_size;       // queue capacity (number of segments)
    vid_t  q_count;      // entries queued by the host at start
  } al_cfg_t;

  // One row of a sync unit's vertex table, as seen by every sync unit.
  typedef struct packed {
    logic  valid;
    vid_t  vid;
    rank_t rank;
    logic  gdone;        // gather finished
  } syu_entry_t;

  typedef struct packed {
    vid_t  vid;
    rank_t rank;
    vid_t  off_lo;       // first out-edge
    vid_t  off_hi;       // one past the last out-edge
    val_t  old_val;
    val_t  acc;          // gather result
    app_t  app;
  } gather_out_t;

  typedef struct packed {
    vid_t  vid;
    rank_t rank;
    vid_t  off_lo;
    vid_t  off_hi;
    val_t  new_val;
    logic  changed;      // scatter must write and activate
  } apply_out_t;

  // ---------------- application plug-ins ----------------
  // SSSP: a value is a distance (INF = unreached), Edge Data holds the edge weight. Gather
  // takes the minimum of neighbour distance + weight over the in-edges; apply keeps the
  // smaller of that and the old distance; a vertex whose distance dropped activates its
  // out-neighbours.
  // PageRank: a value is a rank in 16.16 fixed point (1.0 = 65536), and the Edge Data of an
  // in-edge u->v holds 1/outdeg(u) in 0.16 fixed point, written by the host. Gather sums
  // rank(u) * (1/outdeg(u)); apply computes 0.15 + 0.85 * sum; a vertex whose rank moved by
  // more than PR_EPS activates its out-neighbours, otherwise its rank is not written.
  localparam val_t INF       = '1;
  localparam val_t PR_BASE   = 32'd9830;    // 0.15 in 16.16
  localparam val_t PR_DAMP   = 32'd55706;   // 0.85 in 0.16
  localparam val_t PR_EPS    = 32'd16;      // about 2.4e-4

  function automatic val_t gather_identity(app_t app);
    return (app == APP_PAGERANK) ? '0 : INF;
  endfunction

  // Contribution of one in-edge.
  function automatic val_t gather_edge(app_t app, val_t nbr_val, val_t edge_val);
    logic [DATA_W:0]     s;
    logic [2*DATA_W-1:0] p;
    s = {1'b0, nbr_val} + {1'b0, edge_val};
    p = {{DATA_W{1'b0}}, nbr_val} * {{DATA_W{1'b0}}, edge_val};
    if (app == APP_PAGERANK) return p[DATA_W+15:16];
    return s[DATA_W] ? INF : s[DATA_W-1:0];
  endfunction

  function automatic val_t gather_reduce(app_t app, val_t a, val_t b);
    logic [DATA_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (app == APP_PAGERANK) return s[DATA_W] ? '1 : s[DATA_W-1:0];
    return (a < b) ? a : b;
  endfunction

  function automatic val_t apply_fn(app_t app, val_t old_val, val_t acc);
    logic [2*DATA_W-1:0] p;
    p = {{DATA_W{1'b0}}, acc} * {{DATA_W{1'b0}}, PR_DAMP};
    if (app == APP_PAGERANK) return PR_BASE + p[DATA_W+15:16];
    return (acc < old_val) ? acc : old_val;
  endfunction

  function automatic logic apply_changed(app_t app, val_t old_val, val_t new_val);
    if (app == APP_PAGERANK)
      return ((new_val > old_val) ? new_val - old_val : old_val - new_val) > PR_EPS;
    return new_val != old_val;
  endfunction

endpackage
