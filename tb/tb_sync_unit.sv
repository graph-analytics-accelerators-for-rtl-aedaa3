// tb_sync_unit: directed scenarios on one sync unit of a two-AU system (AU 0; the other AU's
// table is driven by the testbench). Checks rank assignment ({counter, AU number}, counter
// advancing on the global increment), refusal of a full table and of a vertex already in it,
// and the three ordering rules for vertices of both AUs:
//   RAW: a neighbour read waits while the neighbour runs with a lower rank;
//   WAR: a scatter write waits while the neighbour runs with a lower rank and has not
//        finished gathering;
//   activation: dropped when the target runs with a higher rank than the source.
module tb_sync_unit;
  import gas_pkg::*;
  localparam int E = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic reg_valid, reg_ready, grc_assign, grc_inc, gdone_valid, sdone_valid;
  vid_t reg_vid, gdone_vid, sdone_vid;
  rank_t reg_rank;
  logic nvd_valid, nvd_grant, war_valid, war_ack, act_valid, act_ready, aov, aor;
  vid_t nvd_vid, war_vid, act_vid, aovid;
  rank_t nvd_rank, war_rank, act_rank;
  syu_entry_t tbl [E];
  syu_entry_t ext [2][E];
  logic raw_s, war_s, filt;
  sync_unit #(.NUM_AU(2), .AU_ID(0), .ENTRIES(E)) dut (.clk, .rst_n,
    .reg_valid, .reg_vid, .reg_ready, .reg_rank, .grc_assign, .grc_inc,
    .gdone_valid, .gdone_vid, .sdone_valid, .sdone_vid,
    .nvd_valid, .nvd_vid, .nvd_rank, .nvd_grant,
    .war_valid, .war_vid, .war_rank, .war_ack,
    .act_valid, .act_vid, .act_rank, .act_ready,
    .act_out_valid(aov), .act_out_vid(aovid), .act_out_ready(aor),
    .tbl_out(tbl), .ext_tbl(ext), .raw_stall(raw_s), .war_stall(war_s), .act_filtered(filt));
  int checks = 0, failures = 0;
  logic other_inc;
  assign grc_inc = grc_assign | other_inc;
  always_comb begin
    ext[0] = tbl;
  end
  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  task automatic register(vid_t v, output rank_t r);
    @(negedge clk); reg_valid = 1; reg_vid = v; #1;
    chk(reg_ready, $sformatf("register %0d ready", v));
    r = reg_rank;
    @(negedge clk); reg_valid = 0;
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rank_t r2, r4, r6, r8, rx;
    reg_valid = 0; reg_vid = 0; gdone_valid = 0; sdone_valid = 0; gdone_vid = 0; sdone_vid = 0;
    nvd_valid = 0; war_valid = 0; act_valid = 0; nvd_vid = 0; war_vid = 0; act_vid = 0;
    nvd_rank = 0; war_rank = 0; act_rank = 0; aor = 1; other_inc = 0;
    for (int i = 0; i < E; i++) ext[1][i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    register(2, r2);
    chk(r2 == {32'd0, 2'd0}, "first rank");
    // another AU assigns: counter advances without a local assignment
    @(negedge clk); other_inc = 1; @(negedge clk); other_inc = 0;
    register(4, r4);
    chk(r4 == {32'd2, 2'd0}, $sformatf("rank after global increment %0h", r4));
    register(6, r6);
    register(8, r8);
    chk(r6 < r8 && r4 < r6, "ranks increase");
    // full table and duplicate
    @(negedge clk); reg_valid = 1; reg_vid = 10; #1; chk(!reg_ready, "full table refused");
    @(negedge clk); reg_valid = 0;
    // AU 1 runs vertex 5 with rank {1,1}, gather not done
    ext[1][0] = '{valid: 1'b1, vid: 5, rank: {32'd1, 2'd1}, gdone: 1'b0};
    // RAW: vertex 4 (rank r4) reads neighbour 2 (lower rank, running): held
    @(negedge clk); nvd_valid = 1; nvd_vid = 2; nvd_rank = r4; #1;
    chk(!nvd_grant && raw_s, "RAW hold on lower-ranked neighbour");
    nvd_vid = 6; #1; chk(nvd_grant, "RAW pass on higher-ranked neighbour");
    nvd_vid = 12; #1; chk(nvd_grant, "RAW pass on idle neighbour");
    nvd_vid = 5; nvd_rank = r2; #1; chk(nvd_grant, "RAW pass, other AU's vertex ranks higher");
    nvd_rank = r8; #1; chk(!nvd_grant, "RAW hold on other AU's lower-ranked vertex");
    @(negedge clk); nvd_valid = 0;
    // WAR: vertex 8 writes, neighbour 4 lower rank gathering: held until gather done
    war_valid = 1; war_vid = 4; war_rank = r8; #1; chk(!war_ack && war_s, "WAR hold");
    war_vid = 5; #1; chk(!war_ack, "WAR hold across AUs");
    war_vid = 4; war_rank = r2; #1; chk(war_ack, "WAR pass when neighbour ranks higher");
    war_rank = r8;
    gdone_valid = 1; gdone_vid = 4;
    @(negedge clk); gdone_valid = 0; #1;
    chk(war_ack, "WAR pass after neighbour's gather done");
    @(negedge clk); war_valid = 0;
    // activations
    act_valid = 1; act_vid = 8; act_rank = r4; #1;
    chk(filt && !aov && act_ready, "activation of higher-ranked running vertex dropped");
    act_vid = 2; #1; chk(!filt && aov && aovid == 2, "activation of lower-ranked running vertex kept");
    aor = 0; #1; chk(!act_ready, "kept activation waits for the active list");
    aor = 1;
    act_vid = 14; #1; chk(aov, "activation of idle vertex kept");
    @(negedge clk); act_valid = 0;
    // scatter done frees the row; the vertex may register again
    @(negedge clk); reg_valid = 1; reg_vid = 6; #1; chk(!reg_ready, "vertex already running refused");
    sdone_valid = 1; sdone_vid = 6;
    @(negedge clk); sdone_valid = 0; reg_valid = 0;
    register(6, rx);
    chk(rx > r8, "re-registered vertex gets a later rank");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
