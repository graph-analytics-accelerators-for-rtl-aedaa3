// runtime (RT): schedules vertices into the AU and detects when the AU has run dry.
//
// The runtime takes the next active vertex from the active-list manager when the gather unit
// has room (fewer than MAX_GATHER vertices in gather), registers it with the sync unit, which
// returns its rank, tells the active-list manager that the vertex is registered (so that its
// active bit may be cleared), and hands {vertex, rank} to the gather unit. Two counters track
// the vertices in the gather stage (from leaving the active list to leaving the gather unit)
// and in the apply/scatter stages (until the scatter unit reports the vertex done). The AU is
// idle when both counters are zero and the active list is empty.
// One vertex is held at a time; each step is a valid/ready handshake, so a vertex takes at
// least three cycles from the active list to the gather unit, and a new one can be taken the
// cycle after the previous one entered the gather unit.
// The two counters and the termination rule are the document's; the handshake order is this
// design's.
module runtime
  import gas_pkg::*;
#(
  parameter int unsigned MAX_GATHER = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  // from the active-list manager
  input  logic  al_valid,
  input  vid_t  al_vid,
  output logic  al_ready,
  input  logic  al_empty,
  output logic  al_ack_valid,
  output vid_t  al_ack_vid,
  // registration with the sync unit
  output logic  reg_valid,
  output vid_t  reg_vid,
  input  logic  reg_ready,
  input  rank_t reg_rank,
  // to the gather unit
  output logic  gu_valid,
  output vid_t  gu_vid,
  output rank_t gu_rank,
  input  logic  gu_ready,
  // stage completions
  input  logic  gather_done,
  input  logic  scatter_done,
  output logic  idle,
  output logic [15:0] gather_cnt,
  output logic [15:0] scatter_cnt
);
  typedef enum logic [1:0] {R_EMPTY, R_REG, R_DISPATCH} rstate_e;
  rstate_e st;
  vid_t    h_vid;
  rank_t   h_rank;

  assign al_ready     = (st == R_EMPTY) && (gather_cnt < 16'(MAX_GATHER));
  assign reg_valid    = (st == R_REG);
  assign reg_vid      = h_vid;
  assign al_ack_valid = reg_valid && reg_ready;
  assign al_ack_vid   = h_vid;
  assign gu_valid     = (st == R_DISPATCH);
  assign gu_vid       = h_vid;
  assign gu_rank      = h_rank;
  assign idle         = (gather_cnt == 0) && (scatter_cnt == 0) && al_empty && (st == R_EMPTY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= R_EMPTY;
      h_vid       <= '0;
      h_rank      <= '0;
      gather_cnt  <= '0;
      scatter_cnt <= '0;
    end else begin
      unique case (st)
        R_EMPTY:    if (al_valid && al_ready) begin h_vid <= al_vid; st <= R_REG; end
        R_REG:      if (reg_ready) begin h_rank <= reg_rank; st <= R_DISPATCH; end
        R_DISPATCH: if (gu_ready) st <= R_EMPTY;
        default:    st <= R_EMPTY;
      endcase
      gather_cnt  <= gather_cnt + 16'(al_valid && al_ready) - 16'(gather_done);
      scatter_cnt <= scatter_cnt + 16'(gather_done) - 16'(scatter_done);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(gather_done && gather_cnt == 0))
    else $error("runtime: gather done with no vertex in gather");
  assert property (@(posedge clk) disable iff (!rst_n) !(scatter_done && scatter_cnt == 0))
    else $error("runtime: scatter done with no vertex in scatter");
endmodule
