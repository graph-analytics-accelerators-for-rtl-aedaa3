// global_termination_detector (GTD): decides when the whole multi-AU system has finished.
//
// Each AU's runtime reports idle when it has no vertex in flight and its active list is empty.
// One AU being idle is not enough, since another AU may still activate its vertices; the GTD
// declares the computation finished when all AUs report idle for CONFIRM consecutive cycles
// after a start, then raises done to the host and holds it until the next start. Activation
// hand-offs between AUs complete in a single cycle while the sender still counts its vertex
// as busy, so all-idle in one cycle is already safe; CONFIRM=2 is a margin of this design.
module global_termination_detector #(
  parameter int unsigned NUM_AU  = 4,
  parameter int unsigned CONFIRM = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic au_idle [NUM_AU],
  output logic done
);
  logic       running;
  logic [3:0] cnt;
  logic       all_idle;

  always_comb begin
    all_idle = 1'b1;
    for (int unsigned i = 0; i < NUM_AU; i++) all_idle &= au_idle[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cnt     <= '0;
      done    <= 1'b0;
    end else if (start) begin
      running <= 1'b1;
      cnt     <= '0;
      done    <= 1'b0;
    end else if (running) begin
      if (!all_idle) cnt <= '0;
      else if (cnt + 4'd1 >= 4'(CONFIRM)) begin
        running <= 1'b0;
        done    <= 1'b1;
      end else cnt <= cnt + 4'd1;
    end
  end
endmodule
