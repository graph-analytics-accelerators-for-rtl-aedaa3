// tb_apply_unit: random gather results through the apply pipeline with random back-pressure.
// Each item picks SSSP or PageRank at random. Each output must equal that application's
// apply, computed here independently (SSSP: new = min(old, gathered), changed = new != old;
// PageRank in 16.16 fixed point: new = 9830 + floor(gathered * 55706 / 65536), changed when
// new and old differ by more than 16), arrive in order, and the first result must appear exactly
// STAGES cycles after it entered.
module tb_apply_unit;
  import gas_pkg::*;
  localparam int S = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic iv, ir, ov, orr;
  gather_out_t id;
  apply_out_t  od;
  apply_unit #(.STAGES(S)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(orr), .out_data(od));
  int checks = 0, failures = 0, nout = 0;
  gather_out_t q [$];
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && ov && orr) begin
    gather_out_t e;
    val_t nv;
    logic ch;
    e = q.pop_front();
    if (e.app == APP_PAGERANK) begin
      nv = val_t'(longint'(9830) + (longint'(e.acc) * 55706) / 65536);
      ch = (nv > e.old_val) ? (nv - e.old_val > 16) : (e.old_val - nv > 16);
    end else begin
      nv = (e.acc < e.old_val) ? e.acc : e.old_val;
      ch = nv != e.old_val;
    end
    checks++;
    if (od.vid != e.vid || od.rank != e.rank || od.off_lo != e.off_lo || od.off_hi != e.off_hi ||
        od.new_val != nv || od.changed != ch) begin
      failures++; $display("FAIL: vertex %0d new %0d changed %0b", od.vid, od.new_val, od.changed);
    end
    nout++;
  end
  initial begin
    int t;
    iv = 0; id = '0; orr = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    // latency
    @(negedge clk); iv = 1; id = '0; id.vid = 7; id.old_val = 10; id.acc = 3; q.push_back(id);
    @(negedge clk); iv = 0;
    t = 1;
    while (!ov) begin @(negedge clk); t++; end
    checks++;
    if (t != S) begin failures++; $display("FAIL: latency %0d", t); end
    @(negedge clk);
    fork
      for (int k = 0; k < 1000; k++) begin
        @(negedge clk);
        iv = 1;
        id.vid = k; id.rank = $urandom; id.off_lo = $urandom; id.off_hi = $urandom;
        id.app = app_t'($urandom_range(1));
        if (id.app == APP_PAGERANK) begin
          id.acc = $urandom_range(400000);
          id.old_val = ($urandom_range(1) == 0) ? $urandom_range(400000)
                                                : val_t'(9830 + (longint'(id.acc) * 55706) / 65536 + $urandom_range(40) - 20);
        end else begin
          id.old_val = $urandom_range(100); id.acc = ($urandom_range(3) == 0) ? '1 : $urandom_range(100);
        end
        #1;
        while (!ir) begin @(negedge clk); #1; end
        q.push_back(id);
      end
      forever begin @(negedge clk); orr = ($urandom_range(3) != 0); end
    join_any
    @(negedge clk); iv = 0;
    wait (nout == 1001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
