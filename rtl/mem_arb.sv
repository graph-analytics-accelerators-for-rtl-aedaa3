// mem_arb: merges the memory requests of N clients onto one memory port.
//
// Round-robin among the clients that have a request; the grant moves past the winner after
// every accepted request. The client number is placed in the low bits of the tag on the way
// out and stripped again from the response, which is steered back to that client. Responses
// cannot be refused, so the response path is pure wiring. Requests pass through in the same
// cycle (no buffering): a client's request is accepted in the cycle the memory side accepts
// it, which keeps the memory order equal to the acceptance order seen by every client.
// Which clients share a port, and the round-robin order, are this design's choices.
module mem_arb
  import gas_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid [N],
  output logic     in_ready [N],
  input  mem_req_t in_req   [N],
  output logic     in_rsp_valid [N],
  output mem_rsp_t in_rsp       [N],
  output logic     out_valid,
  input  logic     out_ready,
  output mem_req_t out_req,
  input  logic     out_rsp_valid,
  input  mem_rsp_t out_rsp
);
  localparam int unsigned IDW = (N > 1) ? $clog2(N) : 1;

  logic [IDW-1:0] ptr, pick;
  logic           any;

  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int unsigned i = 0; i < N; i++) begin
      automatic int unsigned k = (int'(ptr) + i) % N;
      if (!any && in_valid[k]) begin
        any  = 1'b1;
        pick = IDW'(k);
      end
    end
  end

  always_comb begin
    out_valid = any;
    out_req   = in_req[pick];
    out_req.tag = {in_req[pick].tag[TAG_W-IDW-1:0], pick};
    for (int unsigned i = 0; i < N; i++) begin
      in_ready[i]     = any && (pick == IDW'(i)) && out_ready;
      in_rsp_valid[i] = out_rsp_valid && (out_rsp.tag[IDW-1:0] == IDW'(i));
      in_rsp[i]       = out_rsp;
      in_rsp[i].tag   = out_rsp.tag >> IDW;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (any && out_ready) ptr <= IDW'((int'(pick) + 1) % N);
  end

endmodule
