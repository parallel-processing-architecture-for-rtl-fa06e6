// tb_dqdb_top: end-to-end test of two access units on one dual bus, at the
// default parameters.
//
// Bus A runs head -> node 1 -> node 2 -> end, bus B head -> node 2 ->
// node 1 -> end. The head of bus A sends empty QA slots and, now and then, a
// slot built by the testbench for node 2 (a good single-segment message, a
// bad CRC, a bad HCS, an unknown VCI, a COM without a BOM, a BOM/EOM pair with
// mismatched BE tags). Node 1's host sends MSDUs to node 2 (single segment,
// multi segment and the maximum 9188-octet MSDU, 210 DMPDUs), then a burst
// of short ones that exhausts the connection's buffer list. Node 2's host
// sends traffic downstream, so node 1 sees its REQs and has to let slots
// pass. Node 2's host bus is busy at random (DMA cycle stealing), and once
// for a long stretch while a burst of slots arrives, which fills the HIP
// queue and makes the ILLP drop slots for want of a ready R1.
// Every MSDU node 2 delivers is compared octet by octet with what was sent,
// and its reported DA, SA and QOS with those of the sender,
// and each mechanism is counted; one that never happens is a failure.
module tb_dqdb_top;
  import dqdb_pkg::*;
  import tb_dqdb_util::*;

  localparam logic [63:0] ADDR1 = 64'hC000_0000_0000_0011;
  localparam logic [63:0] ADDR2 = 64'hC000_0000_0000_0022;
  localparam logic [63:0] ADDRX = 64'hC000_0000_0000_0099;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bus_octet_t a0, a1, a2, b0, b1, b2;

  logic [19:0] vtab [4];
  assign vtab = '{20'h00ABC, 20'h0, 20'h0, 20'h0};

  // node 1 host
  logic h1_req_v, h1_req_rdy, h1_gnt_v, h1_done, h1_we;
  tx_req_t h1_req;
  logic [15:0] h1_gnt_a, h1_addr;
  logic [7:0]  h1_data;
  // node 2 host
  logic h2_req_v, h2_req_rdy, h2_gnt_v, h2_done, h2_we, h2_busy;
  tx_req_t h2_req;
  logic [15:0] h2_gnt_a, h2_addr;
  logic [7:0]  h2_data;
  logic        hw_v, rxd;
  logic [31:0] hw_a, rx_a;
  logic [63:0] rx_da, rx_sa, rx1_da, rx1_sa;
  logic [2:0]  rx_qos, rx1_qos;
  logic [7:0]  hw_d;
  logic [15:0] rx_l;
  stats_t s1, s2;
  logic hw1_v, rxd1; logic [31:0] hw1_a, rx1_a; logic [7:0] hw1_d; logic [15:0] rx1_l;

  dqdb_top n1 (
    .clk, .rst_n, .bus_a_in(a0), .bus_a_out(a1), .bus_b_in(b1), .bus_b_out(b2),
    .msap_addr(ADDR1), .group_addr(64'hE000_0000_0000_0001), .vci_tab(vtab), .vci_valid(4'b0001),
    .psr_en(1'b1), .tx_vci(VCI_DEFAULT), .tx_mid(10'd17), .tx_prio(2'd0),
    .hreq_valid(h1_req_v), .hreq(h1_req), .hreq_ready(h1_req_rdy), .hgrant_valid(h1_gnt_v),
    .hgrant_addr(h1_gnt_a), .host_done(h1_done), .hd_we(h1_we), .hd_addr(h1_addr), .hd_data(h1_data),
    .host_busy(1'b0), .rx_base(32'h0), .hw_valid(hw1_v), .hw_addr(hw1_a), .hw_data(hw1_d),
    .rx_done(rxd1), .rx_addr(rx1_a), .rx_len(rx1_l),
    .rx_da(rx1_da), .rx_sa(rx1_sa), .rx_qos(rx1_qos), .stats(s1)
  );

  dqdb_top n2 (
    .clk, .rst_n, .bus_a_in(a1), .bus_a_out(a2), .bus_b_in(b0), .bus_b_out(b1),
    .msap_addr(ADDR2), .group_addr(64'hE000_0000_0000_0002), .vci_tab(vtab), .vci_valid(4'b0001),
    .psr_en(1'b1), .tx_vci(VCI_DEFAULT), .tx_mid(10'd29), .tx_prio(2'd0),
    .hreq_valid(h2_req_v), .hreq(h2_req), .hreq_ready(h2_req_rdy), .hgrant_valid(h2_gnt_v),
    .hgrant_addr(h2_gnt_a), .host_done(h2_done), .hd_we(h2_we), .hd_addr(h2_addr), .hd_data(h2_data),
    .host_busy(h2_busy), .rx_base(32'h1000_0000), .hw_valid(hw_v), .hw_addr(hw_a), .hw_data(hw_d),
    .rx_done(rxd), .rx_addr(rx_a), .rx_len(rx_l),
    .rx_da(rx_da), .rx_sa(rx_sa), .rx_qos(rx_qos), .stats(s2)
  );

  // ---------------------------------------------------------------- buses
  bytes_t inj [$];        // slots waiting at the head of bus A
  bytes_t cur;
  int     apos = 0, bpos = 0;
  bit     inj_gap = 0;

  always @(posedge clk) begin
    if (apos == 0) begin
      if (inj.size() > 0 && !inj_gap) cur = inj.pop_front();
      else cur = {};
      inj_gap <= ($urandom % 3) == 0;
    end
    a0.sof <= (apos == 0);
    a0.d   <= (cur.size() == 53) ? cur[apos] : 8'h00;
    apos   <= (apos == 52) ? 0 : apos + 1;
    b0.sof <= (bpos == 0);
    b0.d   <= 8'h00;
    bpos   <= (bpos == 52) ? 0 : bpos + 1;
  end

  // ---------------------------------------------------------- node 2 host
  byte unsigned hostmem [int];
  int rx_count [int];
  int rx_len_of [int];
  bit long_busy = 0;

  always @(posedge clk) begin
    h2_busy <= long_busy || (($urandom % 4) == 0);
    if (hw_v) hostmem[int'(hw_a)] = hw_d;
    if (rxd) begin
      int id;
      bit ok;
      id = hostmem.exists(int'(rx_a)) ? int'(hostmem[int'(rx_a)]) : -1;
      ok = 1;
      for (int i = 0; i < int'(rx_l); i++)
        if (!hostmem.exists(int'(rx_a) + i) || hostmem[int'(rx_a) + i] != msdu_octet(id, i)) ok = 0;
      check(ok, $sformatf("MSDU id %0d len %0d content", id, rx_l));
      check(rx_da == ADDR2 && (rx_sa == ADDR1 || rx_sa == ADDRX) && rx_qos == (rx_sa == ADDR1 ? 3'd5 : 3'd0),
            $sformatf("MSDU id %0d indication DA/SA/QOS", id));
      if (rx_len_of.exists(id)) check(rx_len_of[id] == int'(rx_l), $sformatf("MSDU id %0d length", id));
      rx_count[id] = rx_count.exists(id) ? rx_count[id] + 1 : 1;
    end
  end

  // ------------------------------------------------------- host transmit
  bit g1_seen = 0, g2_seen = 0;
  logic [15:0] g1_addr, g2_addr;
  always @(posedge clk) begin
    if (h1_gnt_v) begin g1_seen = 1; g1_addr = h1_gnt_a; end
    if (h2_gnt_v) begin g2_seen = 1; g2_addr = h2_gnt_a; end
  end

  task automatic send1(input int id, input int n, input bit conn, input logic [63:0] da);
    h1_req = '{conn: conn, da: da, sa: ADDR1, nbytes: 14'(n), qos_delay: 3'd5, qos_loss: 1'b0};
    g1_seen = 0;
    while (!h1_req_rdy) @(negedge clk);
    h1_req_v = 1'b1;
    @(negedge clk);
    h1_req_v = 1'b0;
    while (!g1_seen) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      h1_we = 1'b1; h1_addr = g1_addr + 16'(i); h1_data = msdu_octet(id, i);
      @(negedge clk);
    end
    h1_we = 1'b0; h1_done = 1'b1;
    @(negedge clk);
    h1_done = 1'b0;
    rx_len_of[id] = n;
  endtask

  task automatic send2(input int id, input int n);
    h2_req = '{conn: 1'b0, da: ADDRX, sa: ADDR2, nbytes: 14'(n), qos_delay: 3'd0, qos_loss: 1'b0};
    g2_seen = 0;
    while (!h2_req_rdy) @(negedge clk);
    h2_req_v = 1'b1;
    @(negedge clk);
    h2_req_v = 1'b0;
    while (!g2_seen) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      h2_we = 1'b1; h2_addr = g2_addr + 16'(i); h2_data = msdu_octet(id, i);
      @(negedge clk);
    end
    h2_we = 1'b0; h2_done = 1'b1;
    @(negedge clk);
    h2_done = 1'b0;
  endtask

  // ---------------------------------------------------------- mechanisms
  int n_defer = 0, n_req1 = 0, n_req2 = 0, n_psr = 0, n_tx2 = 0;
  int max_busy_buf = 0;
  always @(posedge clk) begin
    if (n1.u_dqsm.queued && n1.empty_slot && !n1.tx_grant) n_defer++;
    if (b1.sof && b1.d[2:0] != 3'b000) n_req2++;
    if (b2.sof && (b2.d[2:0] & ~b1.d[2:0]) != 3'b000) n_req1++;
    if (a2.sof && a2.d[ACF_PSR]) n_psr++;
  end

  // ------------------------------------------------------------ stimulus
  task automatic inject_ssm(input int id, input int n, input bit bad_crc, input bit bad_hcs,
                            input logic [19:0] vci);
    bytes_t imp;
    imp = make_impdu(id, n, ADDR2, ADDRX, 8'(id), 8'(id));
    inj.push_back(make_slot(vci, 2'b11, 4'd0, 10'd0, 6'(imp.size()), imp, bad_hcs, bad_crc));
    rx_len_of[id] = n;
  endtask

  initial begin
    bytes_t imp, u;
    h1_req_v = 0; h1_done = 0; h1_we = 0; h1_addr = 0; h1_data = 0; h1_req = '0;
    h2_req_v = 0; h2_done = 0; h2_we = 0; h2_addr = 0; h2_data = 0; h2_req = '0;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);

    // injected receive cases for node 2
    inject_ssm(100, 12, 0, 0, VCI_DEFAULT);          // good SSM
    inject_ssm(101, 12, 1, 0, VCI_DEFAULT);          // payload CRC error
    inject_ssm(102, 12, 0, 1, VCI_DEFAULT);          // HCS error
    inject_ssm(103, 12, 0, 0, 20'h12345);            // VCI not programmed
    inject_ssm(104, 16, 0, 0, 20'h00ABC);            // good SSM on a programmed VCI
    u = {};
    for (int i = 0; i < 44; i++) u.push_back(8'h55);
    inj.push_back(make_slot(VCI_DEFAULT, 2'b00, 4'd3, 10'd77, 6'd44, u));   // orphan COM
    imp = make_impdu(105, 40, ADDR2, ADDRX, 8'd5, 8'd6);                    // BE tag mismatch
    u = imp[0:43];
    inj.push_back(make_slot(VCI_DEFAULT, 2'b10, 4'd0, 10'd88, 6'd44, u));
    u = imp[44:$];
    inj.push_back(make_slot(VCI_DEFAULT, 2'b01, 4'd1, 10'd88, 6'(u.size()), u));

    fork
      begin
        send1(1, 10, 0, ADDR2);      // single segment message
        send1(2, 100, 0, ADDR2);     // BOM, COM, EOM
        send1(3, 301, 1, ADDR2);     // odd length: PAD
        send1(4, 9188, 1, ADDR2);    // largest MSDU: 210 DMPDUs
        for (int k = 5; k < 11; k++) send1(k, 8 + k, 0, ADDR2);   // exhausts conn 0 blocks
      end
      begin
        send2(200, 200);
        send2(201, 120);
        send2(202, 44);
      end
    join

    // wait until node 1 has sent everything and node 2 has delivered it
    fork
      begin : wait_rx
        forever begin
          bit all;
          @(posedge clk);
          all = 1;
          for (int k = 1; k < 11; k++) if (!rx_count.exists(k)) all = 0;
          if (all) disable wait_rx;
        end
      end
      begin repeat (60000) @(posedge clk); end
    join_any
    disable fork;

    // overflow: node 2's host bus stays busy while a burst of slots arrives
    long_busy = 1;
    for (int k = 0; k < 40; k++) inject_ssm(110 + k, 8, 0, 0, VCI_DEFAULT);
    while (inj.size() > 0) @(posedge clk);
    repeat (600) @(posedge clk);
    long_busy = 0;
    repeat (8000) @(posedge clk);

    // ---- results
    for (int k = 1; k < 11; k++)
      check(rx_count.exists(k) && rx_count[k] == 1, $sformatf("node 1 MSDU %0d delivered once", k));
    check(rx_count.exists(100) && rx_count.exists(104), "injected good SSMs delivered");
    check(!rx_count.exists(101) && !rx_count.exists(102) && !rx_count.exists(103) &&
          !rx_count.exists(105), "bad slots not delivered");
    check(s2.rx_drop_crc  >= 1, "payload CRC error seen");
    check(s2.rx_drop_hcs  >= 1, "HCS error seen");
    check(s2.rx_drop_vci  >= 1, "unknown VCI seen");
    check(s2.rx_drop_addr >= 1, "orphan COM dropped");
    check(s2.reasm_fail   >= 1, "reassembly failure seen");
    check(s2.reasm_done   >= 4, "multi-segment reassemblies");
    check(s2.rx_drop_busy >= 1, "receive overflow (no R1 ready)");
    check(s2.dma_stall    >= 1, "DMA waited for the host bus");
    check(s1.tx_blocked   >= 1, "host blocked on a full buffer list");
    check(s1.bwb_skips    >= 1, "bandwidth balancing skip");
    check(n_defer >= 1, "node 1 let an empty slot pass for a downstream request");
    check(n_req1 >= 1 && n_req2 >= 1, "REQ bits written on bus B by both nodes");
    check(n_psr >= 1 && s2.tx_psr >= 1, "PSR bits written");
    check(s1.tx_impdu == 16'd10 && s2.tx_impdu == 16'd3, "IMPDUs segmented");
    check(s1.tx_segments >= 16'd216, "node 1 segments sent");
    $display("mechanisms: defer=%0d req1=%0d req2=%0d psr=%0d crc=%0d hcs=%0d vci=%0d addr=%0d reasm_fail=%0d busy_drop=%0d stall=%0d blocked=%0d bwb=%0d",
             n_defer, n_req1, n_req2, n_psr, s2.rx_drop_crc, s2.rx_drop_hcs, s2.rx_drop_vci,
             s2.rx_drop_addr, s2.reasm_fail, s2.rx_drop_busy, s2.dma_stall, s1.tx_blocked, s1.bwb_skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("dbg s1 impdu=%0d tx=%0d s2 acc=%0d done=%0d fail=%0d crc=%0d addr=%0d ssm=%0d busy=%0d rxcnt=%0d",
      s1.tx_impdu, s1.tx_segments, s2.rx_accepted, s2.reasm_done, s2.reasm_fail, s2.rx_drop_crc,
      s2.rx_drop_addr, s2.rx_drop_ssm, s2.rx_drop_busy, rx_count.num());
    foreach (rx_count[k]) $display("dbg rx id %0d", k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
