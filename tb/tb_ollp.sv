// tb_ollp: the OLLP between a control-block FIFO, a buffer-memory
// model and a simple queue model standing in for the DQSM (grant the first
// empty QA slot after each queue request). Three segments are described by
// control blocks (inline header, data from memory, inline trailer) and must
// appear on the forward bus exactly as the testbench builds them, with the
// busy bit set and the CRC-10 filled in; all other slots must pass through
// unchanged one clock later. It also checks the block release after a
// segment marked last, a PSR request setting the PSR bit of the next slot,
// and the reverse bus: a wanted REQ is written into the first slot whose REQ
// bit is clear, and the REQ bits of passing slots are reported.
module tb_ollp;
  import dqdb_pkg::*;
  import tb_dqdb_util::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam logic [19:0] VCI = 20'h0ABCD;
  logic cb_empty, cb_rd, ser_load, ser_rd, q_req, tx_grant, psr_req = 0, release_blk, rel_conn;
  logic [7:0] cb_data, ser_data;
  logic [15:0] ser_addr, n_tx, n_psr;
  logic [1:0] q_prio;
  logic [2:0] req_want = 0, req_sent, req_seen;
  bus_octet_t bus_a_in = '0, bus_a_out, bus_b_in = '0, bus_b_out;

  ollp #(.NPRIO(3)) dut (
    .clk, .rst_n, .cb_empty, .cb_data, .cb_rd, .ser_load, .ser_addr, .ser_rd, .ser_data,
    .tx_prio(2'd0), .q_req, .q_prio, .tx_grant, .req_want, .req_sent, .req_seen,
    .bus_a_in, .bus_a_out, .bus_b_in, .bus_b_out, .psr_req, .release_blk, .rel_conn, .n_tx, .n_psr);

  // control-block FIFO and buffer memory models
  logic [7:0] cbq [$];
  logic cb_wr = 0, cb_full;
  logic [7:0] cb_wdata = 0;
  sync_fifo #(.T(logic [7:0]), .DEPTH(64)) u_cb (.clk, .rst_n, .wr(cb_wr), .wdata(cb_wdata),
    .rd(cb_rd), .rdata(cb_data), .empty(cb_empty), .full(cb_full), .count());
  always @(negedge clk) begin
    cb_wr = 0;
    if (rst_n && cbq.size() != 0 && !cb_full) begin cb_wr = 1; cb_wdata = cbq.pop_front(); end
  end
  logic [7:0] mem [65536];
  logic [15:0] sp = 0;
  assign ser_data = mem[sp];
  always @(posedge clk) if (ser_load) sp <= ser_addr; else if (ser_rd) sp <= sp + 1'b1;

  // queue model
  logic queued = 0;
  assign tx_grant = queued && bus_a_in.sof && bus_a_in.d[7:6] == 2'b00;
  always @(posedge clk) begin
    if (q_req) queued <= 1'b1;
    else if (tx_grant) queued <= 1'b0;
  end
  int n_rel = 0;
  always @(posedge clk) if (release_blk) begin n_rel++; if (rel_conn != 1'b1) failures++; end

  // Control blocks for one segment whose unit is `pre` (inline), n octets
  // from memory at addr, then `post` (inline).
  task automatic push_seg(input seg_type_e st, input int seq, input int mid, input int plen,
                          input bytes_t pre, input int addr, input int n, input bytes_t post,
                          input bit last);
    bytes_t h;
    h = {};
    h.push_back(VCI[19:12]); h.push_back(VCI[11:4]); h.push_back({VCI[3:0], 4'h0});
    h.push_back(hcs_of(VCI, 4'h0));
    h.push_back({st, 4'(seq), 2'(mid >> 8)}); h.push_back(8'(mid));
    foreach (pre[i]) h.push_back(pre[i]);
    cbq.push_back(8'h09); cbq.push_back(8'(h.size())); cbq.push_back(0); cbq.push_back(0);
    foreach (h[i]) cbq.push_back(h[i]);
    if (n > 0) begin
      cbq.push_back(8'h0A); cbq.push_back(8'(n)); cbq.push_back(8'(addr >> 8)); cbq.push_back(8'(addr));
    end
    cbq.push_back({1'b1, last, 6'b001001}); cbq.push_back(8'(post.size() + 2)); cbq.push_back(0); cbq.push_back(0);
    foreach (post[i]) cbq.push_back(post[i]);
    cbq.push_back({6'(plen), 2'b00}); cbq.push_back(0);
  endtask

  // forward bus: slots in, slots out
  bytes_t sent [$], outs [$];
  bytes_t cur_out;
  bit started = 0;
  always @(posedge clk) if (rst_n) begin
    if (bus_a_out.sof) begin if (cur_out.size() != 0) outs.push_back(cur_out); cur_out = {}; started = 1; end
    if (started && cur_out.size() < 53) cur_out.push_back(bus_a_out.d);
  end
  int n_req_out = 0, n_req_seen = 0;
  bus_octet_t b_prev = '0;
  always @(posedge clk) if (rst_n) begin
    if (bus_b_out.sof && bus_b_out.d[1] && !b_prev.d[1]) n_req_out++;
    b_prev = bus_b_in;
    if (req_seen[2]) n_req_seen++;
  end

  initial begin
    bytes_t u1, u2, u3, pre, post, e;
    int ng = 0, nslot = 0;
    for (int i = 0; i < 65536; i++) mem[i] = 8'(i * 13 + 7);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // segment 1: BOM, 24 inline header octets + 20 memory octets
    pre = {}; for (int i = 0; i < 24; i++) pre.push_back(8'(100 + i));
    post = {};
    push_seg(ST_BOM, 3, 77, 44, pre, 16'h1234, 20, post, 0);
    u1 = pre; for (int i = 0; i < 20; i++) u1.push_back(mem[16'h1234 + i]);
    // segment 2: COM, 44 memory octets
    pre = {};
    push_seg(ST_COM, 4, 77, 44, pre, 16'h1248, 44, post, 0);
    u2 = {}; for (int i = 0; i < 44; i++) u2.push_back(mem[16'h1248 + i]);
    // segment 3: EOM, 7 memory octets, pad 1, trailer, zero fill
    post = {8'h00, 8'h00, 8'h07, 8'h00, 8'h90};
    for (int i = 0; i < 44 - 12; i++) post.push_back(8'h00);
    push_seg(ST_EOM, 5, 77, 12, pre, 16'h1274, 7, post, 1);
    u3 = {}; for (int i = 0; i < 7; i++) u3.push_back(mem[16'h1274 + i]);
    for (int i = 0; i < 5; i++) u3.push_back(post[i]);
    // run the bus: a mix of busy and empty slots
    fork
      for (int k = 0; k < 40; k++) begin
        bytes_t s;
        s = {};
        if (k % 3 == 1) begin
          s.push_back(8'h80);
          for (int i = 1; i < 53; i++) s.push_back(8'($urandom));
        end else for (int i = 0; i < 53; i++) s.push_back(8'h00);
        if (k == 20) s[0] = s[0] | 8'h04;  // a REQ_2 passing on bus A is ignored here
        sent.push_back(s);
        foreach (s[i]) begin
          @(negedge clk); bus_a_in.sof = (i == 0); bus_a_in.d = s[i];
          if (k == 30 && i == 10) psr_req = 1; else psr_req = 0;
        end
      end
      for (int k = 0; k < 40; k++) begin
        for (int i = 0; i < 53; i++) begin
          @(negedge clk); bus_b_in.sof = (i == 0);
          bus_b_in.d = (i == 0) ? ((k < 6) ? 8'h06 : (k == 8) ? 8'h04 : 8'h00) : 8'h00;
          if (k == 2 && i == 3) req_want = 3'b010;
          if (bus_b_in.sof) begin
            #1;
            if (req_sent[1]) begin @(posedge clk); #1 req_want = 3'b000; end
          end
        end
      end
    join
    @(negedge clk); bus_a_in = '0; bus_b_in = '0;
    repeat (3) @(negedge clk);
    if (cur_out.size() != 0) outs.push_back(cur_out);
    check(outs.size() == 40, $sformatf("40 slots out (%0d)", outs.size()));
    for (int k = 0; k < outs.size() && k < 40; k++) begin
      e = sent[k];
      if (e[0] == 8'h00 && outs[k][0][7] && ng < 3) begin
        bytes_t u;
        int pl;
        u  = (ng == 0) ? u1 : (ng == 1) ? u2 : u3;
        pl = (ng == 2) ? 12 : 44;
        e = make_slot(VCI, ng == 0 ? ST_BOM : ng == 1 ? ST_COM : ST_EOM, 4'(3 + ng), 10'd77, 6'(pl), u);
        ng++;
      end
      if (k == 31) e[0] = e[0] | 8'h20;   // PSR requested during slot 30
      checks++;
      if (outs[k] != e) begin
        failures++;
        $display("FAIL slot %0d differs (size %0d, ng %0d)", k, outs[k].size(), ng);
        foreach (e[i]) if (outs[k][i] != e[i]) $display("  octet %0d got %h exp %h", i, outs[k][i], e[i]);
      end
    end
    check(n_tx == 3 && ng == 3, $sformatf("three segments sent (%0d %0d st %0d cb %0d)", n_tx, ng, dut.ast, cbq.size()));
    check(n_psr == 1, "PSR bit written once");
    check(n_rel == 1, "block released after the last segment");
    check(n_req_out == 1, $sformatf("one REQ_1 written on bus B (%0d)", n_req_out));
    check(n_req_seen == 7, $sformatf("REQ_2 bits seen on bus B (%0d)", n_req_seen));
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
