// dram_model: behavioural model of the shared system memory seen through NP ports.
//
// Not synthesizable hardware: a testbench stand-in for the DRAM system. Each port accepts a
// request in a cycle with probability READY_PCT percent. The access is performed when it is
// accepted (a write is visible to every request accepted later, on any port), and a read's
// response (address echoed, tag returned) appears exactly LAT cycles later. Writes get no
// response. The array `mem` is read and written directly by the testbench (the "host").
module dram_model
  import gas_pkg::*;
#(
  parameter int unsigned NP        = 4,
  parameter int unsigned WORDS     = 65536,
  parameter int unsigned LAT       = 20,
  parameter int unsigned READY_PCT = 80
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid [NP],
  output logic     req_ready [NP],
  input  mem_req_t req       [NP],
  output logic     rsp_valid [NP],
  output mem_rsp_t rsp       [NP]
);
  val_t     mem [WORDS];
  logic     dl_v [NP][LAT];
  mem_rsp_t dl_d [NP][LAT];
  int unsigned accepted;

  always_comb
    for (int p = 0; p < NP; p++) begin
      rsp_valid[p] = dl_v[p][LAT-1];
      rsp[p]       = dl_d[p][LAT-1];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      accepted <= 0;
      for (int p = 0; p < NP; p++) begin
        req_ready[p] <= 1'b0;
        for (int i = 0; i < LAT; i++) begin dl_v[p][i] <= 1'b0; dl_d[p][i] <= '0; end
      end
    end else begin
      for (int p = 0; p < NP; p++) begin
        for (int i = LAT - 1; i > 0; i--) begin
          dl_v[p][i] <= dl_v[p][i-1];
          dl_d[p][i] <= dl_d[p][i-1];
        end
        dl_v[p][0] <= 1'b0;
        if (req_valid[p] && req_ready[p]) begin
          accepted <= accepted + 1;
          assert (req[p].addr < WORDS) else $error("dram_model: address %0d out of range", req[p].addr);
          if (req[p].we) mem[req[p].addr] = req[p].wdata;
          else begin
            dl_v[p][0]       <= 1'b1;
            dl_d[p][0].addr  <= req[p].addr;
            dl_d[p][0].rdata <= mem[req[p].addr];
            dl_d[p][0].tag   <= req[p].tag;
          end
        end
        req_ready[p] <= ($urandom_range(99) < READY_PCT);
      end
    end
  end
endmodule
