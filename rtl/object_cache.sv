// object_cache: a cache for one read-only graph object type (Vertex Info, Edge Info, Edge Data).
//
// The accelerator gives each graph object type its own cache so that the size of each can be
// tuned to that object's locality. This one is direct mapped with one-word lines and no
// allocation on write; it never blocks on a miss: a miss is forwarded with the requester's tag
// and the line is filled when the response (which echoes the address) comes back, so any
// number of misses may be outstanding. A hit answers one cycle after the request. A memory
// response has priority over a hit in the same cycle: the hit request then waits a cycle.
// Writes pass through and invalidate the line. Responses are registered, so a miss costs the
// memory latency plus one cycle.
// The organisation (direct mapped, one-word lines, LINES=512) is this design's choice; the
// document leaves the cache parameters to the application.
module object_cache
  import gas_pkg::*;
#(
  parameter int unsigned LINES = 512
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cl_valid,
  output logic     cl_ready,
  input  mem_req_t cl_req,
  output logic     cl_rsp_valid,
  output mem_rsp_t cl_rsp,
  output logic     mem_valid,
  input  logic     mem_ready,
  output mem_req_t mem_req,
  input  logic     mem_rsp_valid,
  input  mem_rsp_t mem_rsp,
  output logic     hit_pulse,
  output logic     miss_pulse
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = ADDR_W - IW;

  logic [LINES-1:0] vld;
  logic [TW-1:0]    tags [LINES];
  val_t             data [LINES];

  logic [IW-1:0] ridx, fidx;
  logic          hit;

  assign ridx = cl_req.addr[IW-1:0];
  assign fidx = mem_rsp.addr[IW-1:0];
  assign hit  = !cl_req.we && vld[ridx] && (tags[ridx] == cl_req.addr[ADDR_W-1:IW]);

  always_comb begin
    mem_valid = cl_valid && !hit;
    mem_req   = cl_req;
    cl_ready  = hit ? !mem_rsp_valid : mem_ready;
  end

  assign hit_pulse  = cl_valid && hit && !mem_rsp_valid;
  assign miss_pulse = cl_valid && !hit && !cl_req.we && mem_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld          <= '0;
      cl_rsp_valid <= 1'b0;
      cl_rsp       <= '0;
    end else begin
      cl_rsp_valid <= mem_rsp_valid || hit_pulse;
      if (mem_rsp_valid) begin
        cl_rsp    <= mem_rsp;
        vld[fidx] <= 1'b1;
      end else if (hit_pulse) begin
        cl_rsp.addr  <= cl_req.addr;
        cl_rsp.rdata <= data[ridx];
        cl_rsp.tag   <= cl_req.tag;
      end
      if (cl_valid && cl_req.we && mem_ready) vld[ridx] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (mem_rsp_valid) begin
      tags[fidx] <= mem_rsp.addr[ADDR_W-1:IW];
      data[fidx] <= mem_rsp.rdata;
    end
  end

endmodule
