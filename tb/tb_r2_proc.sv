// tb_r2_proc: reassembly requests as the R1 processors send them. Checks two
// interleaved multi-segment IMPDUs reassembled into copy requests (segment
// count, MSDU offset and length, the segment list read back), a BE tag
// mismatch, a wrong sequence number and a COM with no open process turned
// into discard requests, the active MID/VCI table, the limit of NREASM open
// processes and the release of a finished process.
module tb_r2_proc;
  import dqdb_pkg::*;
  import tb_dqdb_util::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam logic [63:0] DA = 64'hC000_0000_0000_0022, SA = 64'hC000_0000_0000_0011;
  localparam logic [19:0] VCI = 20'hFFFFF;
  logic msg_wr = 0, msg_full, sbus_req, sbus_gnt = 0, rel_valid = 0;
  r2_msg_t msg_in = '0;
  logic [3:0] act_valid, act_indiv;
  logic [19:0] act_vci [4];
  logic [9:0] act_mid [4];
  hip_req_t hip_msg;
  logic [RID_W-1:0] sl_rid = 0, rel_rid = 0;
  logic [SEG_W-1:0] sl_idx = 0;
  logic [PROC_W-1:0] sl_proc;
  logic [BUF_W-1:0] sl_buf;
  logic [15:0] n_done, n_fail;

  r2_proc #(.NREASM(4), .MAXSEG(210), .FIFO_DEPTH(8)) dut (
    .clk, .rst_n, .msg_wr, .msg_in, .msg_full, .act_valid, .act_vci, .act_mid, .act_indiv,
    .sbus_req, .sbus_gnt, .hip_msg, .sl_rid, .sl_idx, .sl_proc, .sl_buf, .rel_valid, .rel_rid,
    .n_done, .n_fail);

  hip_req_t got [$];
  always @(negedge clk) sbus_gnt = sbus_req && ($urandom_range(0, 2) == 0);
  always @(posedge clk) if (sbus_req && sbus_gnt) got.push_back(hip_msg);

  // Units of an IMPDU as (type, seq, plen, unit) messages.
  task automatic put(input bytes_t imp, input int k, input logic [9:0] mid, input int seq,
                     input int pr, input int bf);
    r2_msg_t m;
    int nj, n;
    nj = (imp.size() + 43) / 44;
    n = (k == nj - 1) ? imp.size() - 44 * k : 44;
    m = '0;
    m.st = (k == 0) ? ST_BOM : (k == nj - 1) ? ST_EOM : ST_COM;
    m.seq = 4'(seq); m.mid = mid; m.vci = VCI; m.plen = 6'(n);
    m.proc = PROC_W'(pr); m.buf_idx = BUF_W'(bf); m.indiv = 1;
    for (int i = 0; i < 44; i++) m.unit[(43 - i) * 8 +: 8] = (i < n) ? imp[44 * k + i] : 8'h00;
    while (msg_full) @(negedge clk);
    msg_wr = 1; msg_in = m;
    @(negedge clk); msg_wr = 0;
  endtask

  task automatic wait_msgs(input int n);
    int t = 0;
    while (got.size() < n && t < 1000) begin @(negedge clk); t++; end
  endtask

  initial begin
    bytes_t a, b, c;
    hip_req_t h;
    repeat (2) @(posedge clk);
    rst_n = 1;
    a = make_impdu(1, 100, DA, SA, 8'h21, 8'h21);   // 128 octets: BOM COM EOM
    b = make_impdu(2, 150, DA, SA, 8'h22, 8'h22);   // 180 octets: BOM COM COM COM EOM
    put(a, 0, 10'd5, 0, 1, 10);
    put(b, 0, 10'd6, 7, 2, 20);
    repeat (3) @(negedge clk);
    check(act_valid == 4'b0011 && act_mid[0] == 5 && act_mid[1] == 6 && act_vci[0] == VCI,
          "two processes active");
    put(a, 1, 10'd5, 1, 1, 11);
    put(b, 1, 10'd6, 8, 3, 21);
    put(b, 2, 10'd6, 9, 0, 22);
    put(a, 2, 10'd5, 2, 2, 12);
    put(b, 3, 10'd6, 10, 1, 23);
    put(b, 4, 10'd6, 11, 1, 24);
    wait_msgs(2);
    check(got.size() == 2, "two copy requests");
    h = got[0];
    check(!h.discard && !h.single && h.rid == 0 && h.nseg == 3 && h.off == 24 && h.len == 100,
          $sformatf("IMPDU A: rid %0d nseg %0d off %0d len %0d", h.rid, h.nseg, h.off, h.len));
    h = got[1];
    check(!h.discard && h.rid == 1 && h.nseg == 5 && h.len == 150, "IMPDU B copy request");
    sl_rid = 0;
    for (int k = 0; k < 3; k++) begin
      sl_idx = SEG_W'(k); #1;
      check(sl_proc == PROC_W'(k == 2 ? 2 : 1) && sl_buf == BUF_W'(10 + k), $sformatf("segment list A[%0d]", k));
    end
    sl_rid = 1; sl_idx = 2; #1;
    check(sl_proc == 0 && sl_buf == 22, "segment list B[2]");
    check(act_valid == 4'b0000 && n_done == 2, "processes closed after EOM");
    // BE tag mismatch
    got = {};
    c = make_impdu(3, 60, DA, SA, 8'h30, 8'h31);
    put(c, 0, 10'd7, 0, 0, 30); put(c, 1, 10'd7, 1, 0, 31);
    // wrong sequence number
    put(a, 0, 10'd8, 0, 0, 32); put(a, 1, 10'd8, 2, 0, 33);
    // COM with no process
    put(a, 1, 10'd9, 1, 0, 34);
    wait_msgs(3);
    check(got.size() == 3 && got[0].discard && got[0].nseg == 2, "BE tag mismatch discarded");
    check(got[1].discard && got[1].nseg == 2, "wrong sequence number discarded");
    check(got[2].discard && got[2].single && got[2].buf_idx == 34, "orphan COM discarded");
    check(n_fail == 3, "failures counted");
    // all four entries are now waiting for release (A, B, C, wrong-seq);
    // a new BOM finds no free process
    got = {};
    put(a, 0, 10'd10, 0, 0, 40);
    wait_msgs(1);
    check(got.size() == 1 && got[0].discard && got[0].single && got[0].buf_idx == 40 && n_fail == 4,
          "BOM refused while all processes are held");
    @(negedge clk); rel_valid = 1; rel_rid = 2;
    @(negedge clk); rel_valid = 0;
    put(a, 0, 10'd11, 0, 0, 41);
    repeat (4) @(negedge clk);
    check(act_valid == 4'b0100 && act_mid[2] == 11, "released process reused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
