// act_xbar: carries activation requests between AUs.
//
// Vertices are assigned to AUs statically by index (vertex v belongs to AU v mod NUM_AU), so
// an activation produced by one AU's sync unit must reach the active-list manager of the AU
// that owns the vertex. Each destination picks one source per cycle, round robin. There is no
// buffering: a source's request is accepted in the same cycle the destination accepts it, so
// an activation is never "in the wire" while both ends look idle, which the termination
// detector relies on. The crossbar itself is this design's choice; the document only states
// the static assignment.
module act_xbar
  import gas_pkg::*;
#(
  parameter int unsigned NUM_AU = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic src_valid [NUM_AU],
  input  vid_t src_vid   [NUM_AU],
  output logic src_ready [NUM_AU],
  output logic dst_valid [NUM_AU],
  output vid_t dst_vid   [NUM_AU],
  input  logic dst_ready [NUM_AU],
  output logic busy
);
  localparam int unsigned IDW = (NUM_AU > 1) ? $clog2(NUM_AU) : 1;

  logic [IDW-1:0] ptr  [NUM_AU];
  logic [IDW-1:0] pick [NUM_AU];

  function automatic int unsigned owner(vid_t v);
    return (NUM_AU > 1) ? int'(v % NUM_AU) : 0;
  endfunction

  always_comb begin
    for (int unsigned s = 0; s < NUM_AU; s++) src_ready[s] = 1'b0;
    busy = 1'b0;
    for (int unsigned d = 0; d < NUM_AU; d++) begin
      dst_valid[d] = 1'b0;
      pick[d]      = '0;
      for (int unsigned i = 0; i < NUM_AU; i++) begin
        automatic int unsigned s = (int'(ptr[d]) + i) % NUM_AU;
        if (!dst_valid[d] && src_valid[s] && owner(src_vid[s]) == d) begin
          dst_valid[d] = 1'b1;
          pick[d]      = IDW'(s);
        end
      end
      dst_vid[d] = src_vid[pick[d]];
      if (dst_valid[d] && dst_ready[d]) src_ready[pick[d]] = 1'b1;
      busy |= dst_valid[d];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned d = 0; d < NUM_AU; d++) ptr[d] <= '0;
    end else begin
      for (int unsigned d = 0; d < NUM_AU; d++)
        if (dst_valid[d] && dst_ready[d]) ptr[d] <= IDW'((int'(pick[d]) + 1) % NUM_AU);
    end
  end
endmodule
