// active_list_manager (ALM): the set of vertices still to be executed, kept in memory.
//
// The active list (AL) of an AU covers the vertices it owns (v mod NUM_AU == AU_ID, local
// index l = v / NUM_AU) and has two parts in memory: a bit vector with one bit per vertex, and
// a circular queue of segment indices, a segment being 256 bits (8 words) of the bit vector.
// A third array holds one bit per segment telling whether the segment is already queued, so a
// segment is never queued twice.
//
// Extracting work: with no segment held locally, the ALM pops the next segment index, reads
// the 8 words of that segment into local storage, writes zeros back, and clears the segment's
// queued bit. It then offers the vertices whose bits are set, one per cycle, lowest first.
// A bit that has been offered stays set (and "pending") until the runtime reports that the
// sync unit has registered the vertex (ack_*); only then is it cleared, so an activation that
// arrives in between finds the bit set and is absorbed. The local segment is released when it
// has no set bits left.
// Adding work: an activation of a vertex inside the local segment just sets its bit. Any other
// activation is a read-modify-write of the bit vector word in memory, then of the queued-bit
// word; if the segment was not queued, its index is appended to the queue.
// All memory operations are done one at a time by a single state machine and activations wait
// while it is busy, so bit vectors are never in flight in two places at once.
// empty is high when nothing is queued, no segment is held and no operation is running.
// The two-part AL and the 256-bit segments are the document's; the queued-bit array, the
// serialised memory operations and the lowest-first order are this design's.
module active_list_manager
  import gas_pkg::*;
#(
  parameter int unsigned NUM_AU = 4,
  parameter int unsigned AU_ID  = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  al_cfg_t  cfg,
  // vertices to the runtime
  output logic     v_valid,
  output vid_t     v_vid,
  input  logic     v_ready,
  input  logic     ack_valid,
  input  vid_t     ack_vid,
  // activations
  input  logic     act_valid,
  input  vid_t     act_vid,
  output logic     act_ready,
  // memory
  output logic     mem_valid,
  input  logic     mem_ready,
  output mem_req_t mem_req,
  input  logic     mem_rsp_valid,
  input  mem_rsp_t mem_rsp,
  output logic     empty,
  output logic     local_hit,
  output logic     mem_act
);
  localparam int unsigned SH = (NUM_AU > 1) ? $clog2(NUM_AU) : 0;

  typedef enum logic [3:0] {
    S_IDLE, S_Q_RD, S_Q_WT, S_BV_RD, S_BV_WT, S_BV_CLR, S_QF_RD, S_QF_WT, S_QF_WR,
    S_A_RD, S_A_WT, S_A_WR, S_AQ_RD, S_AQ_WT, S_AQ_WR, S_AQ_PUSH
  } st_e;

  st_e           st;
  logic          seg_valid;
  vid_t          seg;
  logic [SEG_BITS-1:0] bits, pend;
  vid_t          head, tail, count;
  logic [2:0]    k;
  val_t          tmp;
  vid_t          a_l;        // local index of the activation being written to memory

  function automatic vid_t local_idx(vid_t v);
    return v >> SH;
  endfunction
  function automatic vid_t seg_of(vid_t l);
    return l >> $clog2(SEG_BITS);
  endfunction

  // vertex offer
  logic        found;
  logic [7:0]  fidx;
  always_comb begin
    found = 1'b0;
    fidx  = '0;
    for (int i = SEG_BITS - 1; i >= 0; i--)
      if (bits[i] && !pend[i]) begin
        found = 1'b1;
        fidx  = 8'(i);
      end
  end
  assign v_valid = seg_valid && found;
  assign v_vid   = (((seg << $clog2(SEG_BITS)) | vid_t'(fidx)) << SH) | vid_t'(AU_ID);

  // activation
  vid_t act_l;
  assign act_l     = local_idx(act_vid);
  assign local_hit = act_valid && (st == S_IDLE) && seg_valid && seg_of(act_l) == seg;
  assign mem_act   = act_valid && (st == S_IDLE) && !local_hit;
  assign act_ready = (st == S_IDLE);
  assign empty     = (st == S_IDLE) && !seg_valid && (count == 0);

  // memory requests
  always_comb begin
    mem_valid     = 1'b0;
    mem_req       = '0;
    unique case (st)
      S_Q_RD:   begin mem_valid = 1'b1; mem_req.addr = cfg.q_base + head; end
      S_BV_RD:  begin mem_valid = 1'b1; mem_req.addr = cfg.bv_base + (seg << 3) + vid_t'(k); end
      S_BV_CLR: begin mem_valid = 1'b1; mem_req.we = 1'b1; mem_req.wdata = '0;
                      mem_req.addr = cfg.bv_base + (seg << 3) + vid_t'(k); end
      S_QF_RD:  begin mem_valid = 1'b1; mem_req.addr = cfg.qf_base + (seg >> 5); end
      S_QF_WR:  begin mem_valid = 1'b1; mem_req.we = 1'b1; mem_req.wdata = tmp;
                      mem_req.addr = cfg.qf_base + (seg >> 5); end
      S_A_RD:   begin mem_valid = 1'b1; mem_req.addr = cfg.bv_base + (a_l >> 5); end
      S_A_WR:   begin mem_valid = 1'b1; mem_req.we = 1'b1; mem_req.wdata = tmp;
                      mem_req.addr = cfg.bv_base + (a_l >> 5); end
      S_AQ_RD:  begin mem_valid = 1'b1; mem_req.addr = cfg.qf_base + (seg_of(a_l) >> 5); end
      S_AQ_WR:  begin mem_valid = 1'b1; mem_req.we = 1'b1; mem_req.wdata = tmp;
                      mem_req.addr = cfg.qf_base + (seg_of(a_l) >> 5); end
      S_AQ_PUSH: begin mem_valid = 1'b1; mem_req.we = 1'b1; mem_req.wdata = seg_of(a_l);
                      mem_req.addr = cfg.q_base + tail; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      seg_valid <= 1'b0;
      seg       <= '0;
      bits      <= '0;
      pend      <= '0;
      head      <= '0;
      tail      <= '0;
      count     <= '0;
      k         <= '0;
      tmp       <= '0;
      a_l       <= '0;
    end else if (start) begin
      st        <= S_IDLE;
      seg_valid <= 1'b0;
      bits      <= '0;
      pend      <= '0;
      head      <= '0;
      tail      <= cfg.q_count % cfg.q_size;
      count     <= cfg.q_count;
    end else begin
      automatic logic [SEG_BITS-1:0] nb = bits;
      automatic logic [SEG_BITS-1:0] np = pend;
      if (ack_valid && seg_valid && seg_of(local_idx(ack_vid)) == seg) begin
        nb[local_idx(ack_vid) % SEG_BITS] = 1'b0;
        np[local_idx(ack_vid) % SEG_BITS] = 1'b0;
      end
      if (v_valid && v_ready) np[fidx] = 1'b1;
      // an activation of a vertex offered but not yet registered is absorbed: that vertex
      // will be registered after the activating one and read its new value anyway
      if (local_hit && !np[act_l % SEG_BITS]) nb[act_l % SEG_BITS] = 1'b1;

      unique case (st)
        S_IDLE: begin
          if (mem_act) begin
            a_l <= act_l;
            st  <= S_A_RD;
          end else if (!seg_valid && count != 0) begin
            st <= S_Q_RD;
          end else if (seg_valid && nb == '0 && np == '0) begin
            seg_valid <= 1'b0;
          end
        end
        S_Q_RD:  if (mem_ready) st <= S_Q_WT;
        S_Q_WT:  if (mem_rsp_valid) begin seg <= mem_rsp.rdata; k <= '0; st <= S_BV_RD; end
        S_BV_RD: if (mem_ready) st <= S_BV_WT;
        S_BV_WT: if (mem_rsp_valid) begin
                   nb[32*k +: 32] = mem_rsp.rdata;
                   st <= S_BV_CLR;
                 end
        S_BV_CLR: if (mem_ready) begin
                   k  <= k + 3'd1;
                   st <= (k == 3'(SEG_WORDS - 1)) ? S_QF_RD : S_BV_RD;
                 end
        S_QF_RD: if (mem_ready) st <= S_QF_WT;
        S_QF_WT: if (mem_rsp_valid) begin
                   tmp <= mem_rsp.rdata & ~(val_t'(1) << seg[4:0]);
                   st  <= S_QF_WR;
                 end
        S_QF_WR: if (mem_ready) begin
                   seg_valid <= 1'b1;
                   np        = '0;
                   head      <= (head + 1 == cfg.q_size) ? '0 : head + 1;
                   count     <= count - 1;
                   st        <= S_IDLE;
                 end
        S_A_RD:  if (mem_ready) st <= S_A_WT;
        S_A_WT:  if (mem_rsp_valid) begin
                   tmp <= mem_rsp.rdata | (val_t'(1) << a_l[4:0]);
                   st  <= S_A_WR;
                 end
        S_A_WR:  if (mem_ready) st <= S_AQ_RD;
        S_AQ_RD: if (mem_ready) st <= S_AQ_WT;
        S_AQ_WT: if (mem_rsp_valid) begin
                   automatic vid_t sg = seg_of(a_l);
                   if (mem_rsp.rdata[sg[4:0]]) st <= S_IDLE;
                   else begin
                     tmp <= mem_rsp.rdata | (val_t'(1) << sg[4:0]);
                     st  <= S_AQ_WR;
                   end
                 end
        S_AQ_WR: if (mem_ready) st <= S_AQ_PUSH;
        S_AQ_PUSH: if (mem_ready) begin
                   tail  <= (tail + 1 == cfg.q_size) ? '0 : tail + 1;
                   count <= count + 1;
                   st    <= S_IDLE;
                 end
        default: st <= S_IDLE;
      endcase
      bits <= nb;
      pend <= np;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= cfg.q_size)
    else $error("active_list_manager: segment queue overflow");
endmodule
