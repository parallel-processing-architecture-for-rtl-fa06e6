// tb_dqsm: directed test of the distributed queue counters.
// 1. Idle node: REQs at level 0 count RQ_0 up, empty slots count it down,
//    never below zero; REQs at level 2 leave RQ_0 alone.
// 2. Queueing at level 0 moves RQ_0 into CD_0 and schedules one REQ.
// 3. While queued, a level-1 REQ raises CD_0, a level-0 REQ raises RQ_0;
//    the node lets exactly CD_0 empty slots pass and takes the next one,
//    with tx_grant in the same clock as that empty slot.
// 4. Bandwidth balancing: after BWB_MOD own transmissions RQ is raised by
//    one, so one extra empty slot passes before the next transmission.
module tb_dqsm;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int BWB = 8;
  logic empty_slot = 0, q_req = 0, queued, tx_grant;
  logic [2:0] req_seen = 0, req_want, req_sent = 0;
  logic [1:0] q_prio = 0;
  logic [13:0] rq [3], cd [3], bwb_skips;

  dqsm #(.NPRIO(3), .CNT_W(14), .BWB_MOD(BWB)) dut (
    .clk, .rst_n, .empty_slot, .req_seen, .q_req, .q_prio, .queued, .tx_grant,
    .req_want, .req_sent, .rq, .cd, .bwb_skips);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cyc(input logic e, input logic [2:0] r);
    @(negedge clk); empty_slot = e; req_seen = r;
    @(posedge clk); #1; empty_slot = 0; req_seen = 0;
  endtask

  // Queue one segment at level p, then count the empty slots that pass
  // before tx_grant.
  task automatic send_one(input int p, output int passed);
    @(negedge clk); q_prio = 2'(p); q_req = 1;
    @(posedge clk); #1 q_req = 0;
    passed = 0;
    forever begin
      @(negedge clk); empty_slot = 1; #1;
      if (tx_grant) begin @(posedge clk); #1 empty_slot = 0; break; end
      passed++;
      @(posedge clk); #1 empty_slot = 0;
      if (passed > 100) break;
    end
  endtask

  initial begin
    int passed;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1.
    repeat (5) cyc(0, 3'b001);
    repeat (2) cyc(1, 3'b000);
    cyc(0, 3'b100);
    check(rq[0] == 3, "RQ0 counts REQs minus empty slots");
    check(rq[2] == 1 && rq[1] == 0, "levels count separately");
    repeat (6) cyc(1, 0);
    check(rq[0] == 0, "RQ0 stops at zero");
    repeat (3) cyc(0, 3'b001);
    // 2.
    @(negedge clk); q_prio = 0; q_req = 1;
    @(posedge clk); #1 q_req = 0;
    check(queued && cd[0] == 3 && rq[0] == 0, "queueing moves RQ into CD");
    check(req_want[0] == 1, "one REQ scheduled");
    @(negedge clk); req_sent = 3'b001;
    @(posedge clk); #1 req_sent = 0;
    check(req_want[0] == 0, "REQ written");
    // 3.
    cyc(0, 3'b010);
    check(cd[0] == 4, "higher-level REQ raises CD");
    cyc(0, 3'b001);
    check(rq[0] == 1 && cd[0] == 4, "same-level REQ goes to RQ while queued");
    passed = 0;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); empty_slot = 1; #1;
      if (tx_grant) begin @(posedge clk); #1 empty_slot = 0; break; end
      passed++;
      @(posedge clk); #1 empty_slot = 0;
    end
    check(passed == 4, $sformatf("let CD=4 empty slots pass (passed %0d)", passed));
    check(!queued, "queue cleared after transmission");
    check(rq[0] == 1, "RQ not decremented by own slot");
    repeat (1) cyc(1, 0);
    check(rq[0] == 0, "RQ counts down again when idle");
    // 4. One grant so far; seven more reach BWB_MOD.
    for (int k = 2; k <= BWB; k++) begin
      send_one(0, passed);
      check(passed == 0, $sformatf("transmission %0d immediate", k));
    end
    check(bwb_skips == 1 && rq[0] == 1, "bandwidth balancing raised RQ after 8 transmissions");
    send_one(0, passed);
    check(passed == 1, "one empty slot left for downstream");
    // 5. Level 2 is not delayed by level-0 or level-1 REQs.
    @(negedge clk); q_prio = 2; q_req = 1;
    @(posedge clk); #1 q_req = 0;
    cyc(0, 3'b011);
    check(cd[2] == 0, "lower-level REQs do not raise CD2");
    @(negedge clk); empty_slot = 1; #1;
    check(tx_grant, "level 2 sends at once");
    @(posedge clk); #1 empty_slot = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
