// apply_unit (APU): computes each vertex's new value from its gather result.
//
// The apply function of the application selected in the gather result (gas_pkg::apply_fn:
// for SSSP the smaller of old and gathered distance, for PageRank 0.15 + 0.85 * sum) is evaluated on entry and carried through a pipeline of
// STAGES registers, so that one vertex can enter per cycle and different vertices sit in
// different stages, as the document describes. The unit touches no memory. The whole pipeline
// holds when its last stage is full and the scatter unit does not accept (in_ready is then
// low). Latency from in_valid&in_ready to out_valid is STAGES cycles.
// The depth (STAGES=4) is this design's choice; the document gives none.
module apply_unit
  import gas_pkg::*;
#(
  parameter int unsigned STAGES = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  gather_out_t in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output apply_out_t  out_data
);
  logic       v [STAGES];
  apply_out_t d [STAGES];
  logic       en;
  apply_out_t comp;

  always_comb begin
    comp.vid     = in_data.vid;
    comp.rank    = in_data.rank;
    comp.off_lo  = in_data.off_lo;
    comp.off_hi  = in_data.off_hi;
    comp.new_val = apply_fn(in_data.app, in_data.old_val, in_data.acc);
    comp.changed = apply_changed(in_data.app, in_data.old_val, comp.new_val);
  end

  assign en        = !v[STAGES-1] || out_ready;
  assign in_ready  = en;
  assign out_valid = v[STAGES-1];
  assign out_data  = d[STAGES-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < STAGES; i++) v[i] <= 1'b0;
    end else if (en) begin
      v[0] <= in_valid;
      for (int unsigned i = 1; i < STAGES; i++) v[i] <= v[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      d[0] <= comp;
      for (int unsigned i = 1; i < STAGES; i++) d[i] <= d[i-1];
    end
  end
endmodule
