// global_rank_counter (GRC): keeps the rank counters of all sync units in step.
//
// Every sync unit holds its own copy of the rank counter. Whenever any sync unit hands out a
// rank, the GRC raises the increment line to all of them in the same cycle, so every copy
// moves together and ranks stay monotonic across AUs. Two AUs that hand out a rank in the same
// cycle use the same counter value; the AU number appended below the counter keeps the two
// ranks distinct. That scheme is the document's; doing it combinationally (same cycle) is this
// design's choice, which keeps one AU from reusing a counter value on consecutive cycles.
// The GRC also counts the ranks issued, for observation.
module global_rank_counter #(
  parameter int unsigned NUM_AU = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        assign_rank [NUM_AU],
  output logic        inc,
  output logic [31:0] issued
);
  always_comb begin
    inc = 1'b0;
    for (int unsigned i = 0; i < NUM_AU; i++) inc |= assign_rank[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) issued <= '0;
    else begin
      automatic logic [31:0] n = '0;
      for (int unsigned i = 0; i < NUM_AU; i++) n += {31'b0, assign_rank[i]};
      issued <= issued + n;
    end
  end
endmodule
