// tb_runtime: the runtime between a scripted active list, sync unit and gather unit.
// Checks that each vertex is registered, acknowledged to the active list and dispatched with
// the rank the sync unit returned, in order; that no more than MAX_GATHER vertices are ever
// in gather; that the gather and scatter counters follow the done pulses; and that idle is
// raised only when both counters are zero and the active list is empty.
module tb_runtime;
  import gas_pkg::*;
  localparam int MG = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic al_valid, al_ready, al_empty, al_ack_valid, reg_valid, reg_ready, gu_valid, gu_ready;
  logic gdone, sdone, idle;
  vid_t al_vid, al_ack_vid, reg_vid, gu_vid;
  rank_t reg_rank, gu_rank;
  logic [15:0] gcnt, scnt;
  runtime #(.MAX_GATHER(MG)) dut (.clk, .rst_n, .al_valid, .al_vid, .al_ready, .al_empty,
    .al_ack_valid, .al_ack_vid, .reg_valid, .reg_vid, .reg_ready, .reg_rank,
    .gu_valid, .gu_vid, .gu_rank, .gu_ready, .gather_done(gdone), .scatter_done(sdone),
    .idle, .gather_cnt(gcnt), .scatter_cnt(scnt));
  int checks = 0, failures = 0;
  int next_v = 0, acked = 0, dispatched = 0, in_gather = 0, in_scatter = 0, finished = 0;
  int max_in_gather = 0;
  rank_t rank_ctr = 100;
  localparam int TOTAL = 200;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  assign al_valid = (next_v < TOTAL);
  assign al_vid   = vid_t'(next_v);
  assign al_empty = (next_v >= TOTAL);
  assign reg_rank = rank_ctr;

  always @(posedge clk) if (rst_n) begin
    if (al_valid && al_ready) next_v <= next_v + 1;
    if (al_ack_valid) begin
      checks++;
      if (al_ack_vid != vid_t'(acked)) begin failures++; $display("FAIL: ack %0d expected %0d", al_ack_vid, acked); end
      acked <= acked + 1;
      rank_ctr <= rank_ctr + 1;
    end
    if (gu_valid && gu_ready) begin
      checks++;
      if (gu_vid != vid_t'(dispatched) || gu_rank != rank_t'(100 + dispatched)) begin
        failures++; $display("FAIL: dispatched %0d rank %0d", gu_vid, gu_rank);
      end
      dispatched <= dispatched + 1;
    end
    // gather completes at random for dispatched vertices, scatter likewise
    in_gather  <= in_gather + (gu_valid && gu_ready) - gdone;
    in_scatter <= in_scatter + gdone - sdone;
    if (sdone) finished <= finished + 1;
    // checks of the counters (gather count includes the vertex held by the runtime)
    checks++;
    if (scnt != 16'(in_scatter)) begin failures++; $display("FAIL: scatter count %0d expected %0d", scnt, in_scatter); end
    if (gcnt > MG) begin failures++; $display("FAIL: %0d vertices in gather", gcnt); end
    if (idle && !(gcnt == 0 && scnt == 0 && al_empty)) begin failures++; $display("FAIL: idle while busy"); end
    if (gcnt > max_in_gather) max_in_gather = gcnt;
  end

  always @(negedge clk) begin
    reg_ready <= ($urandom_range(3) != 0);
    gu_ready  <= ($urandom_range(2) != 0);
    gdone     <= (in_gather > 0) && ($urandom_range(4) == 0);
    sdone     <= (in_scatter > 0) && ($urandom_range(3) == 0);
  end

  initial begin
    reg_ready = 0; gu_ready = 0; gdone = 0; sdone = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    wait (finished == TOTAL);
    repeat (3) @(posedge clk);
    checks++;
    if (!idle) begin failures++; $display("FAIL: not idle at the end"); end
    checks++;
    if (max_in_gather != MG) begin failures++; $display("FAIL: gather never full (%0d)", max_in_gather); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
