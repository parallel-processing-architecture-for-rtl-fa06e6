// tb_hip_dma: the HIP with models of four R1 packet-buffer memories and of
// R2's segment lists. It queues a single-segment copy, a five-segment copy, a
// discard and another single-segment copy, with the host bus busy at random,
// and checks the MSDU octets written to host memory (and that nothing else
// is written), the consecutive host addresses and the rx_done reports
// (with the DA, SA and QOS taken from the IMPDU header), that
// every segment buffer is freed exactly once, that R2's processes are
// released, and that busy host cycles were waited out (stall count).
module tb_hip_dma;
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
  localparam logic [31:0] BASE = 32'h0010_0000;
  logic req_wr = 0, req_full, free_valid, rel_valid, host_busy = 0, hw_valid, rx_done;
  hip_req_t req_in = '0;
  logic [PROC_W-1:0] free_proc, sl_proc;
  logic [BUF_W-1:0] free_buf, dma_buf, sl_buf;
  logic [5:0] dma_addr;
  logic [7:0] dma_data [4];
  logic [RID_W-1:0] sl_rid, rel_rid;
  logic [SEG_W-1:0] sl_idx;
  logic [31:0] hw_addr, rx_addr;
  logic [7:0] hw_data;
  logic [15:0] rx_len, n_stall;
  logic [63:0] rx_da, rx_sa;
  logic [2:0]  rx_qos;

  hip_dma #(.N_R1(4), .FIFO_DEPTH(8)) dut (
    .clk, .rst_n, .req_wr, .req_in, .req_full, .free_valid, .free_proc, .free_buf, .dma_buf,
    .dma_addr, .dma_data, .sl_rid, .sl_idx, .sl_proc, .sl_buf, .rel_valid, .rel_rid,
    .host_busy, .rx_base(BASE), .hw_valid, .hw_addr, .hw_data, .rx_done, .rx_addr, .rx_len,
    .rx_da, .rx_sa, .rx_qos, .n_stall);

  logic [7:0] bufmem [4][64][56];
  logic [PROC_W+BUF_W-1:0] slist [8][16];
  always_comb for (int i = 0; i < 4; i++) dma_data[i] = bufmem[i][dma_buf][dma_addr];
  assign {sl_proc, sl_buf} = slist[sl_rid][sl_idx];

  logic [7:0] host [int];
  int freed [int];
  int rels [$];
  int dones_a [$], dones_l [$];
  always @(negedge clk) host_busy = ($urandom_range(0, 3) == 0);
  always @(posedge clk) if (rst_n) begin
    if (hw_valid) host[hw_addr] = hw_data;
    if (free_valid) freed[int'(free_proc) * 64 + int'(free_buf)]++;
    if (rel_valid) rels.push_back(rel_rid);
    if (rx_done) begin
      dones_a.push_back(rx_addr); dones_l.push_back(rx_len);
      check(rx_da == DA && rx_sa == SA && rx_qos == 3'd0, "indication DA, SA and QOS");
    end
  end

  // Store unit k of an IMPDU in a packet buffer (unit at octets 7..50).
  task automatic store(input bytes_t imp, input int k, input int pr, input int bf);
    for (int i = 0; i < 44; i++) bufmem[pr][bf][7 + i] = (44 * k + i < imp.size()) ? imp[44 * k + i] : 8'h00;
  endtask

  task automatic q(input hip_req_t h);
    @(negedge clk); req_wr = 1; req_in = h;
    @(negedge clk); req_wr = 0;
  endtask

  initial begin
    bytes_t a, b, c, d;
    hip_req_t h;
    int t, exp_addr;
    for (int p = 0; p < 4; p++) for (int f = 0; f < 64; f++) for (int i = 0; i < 56; i++) bufmem[p][f][i] = 8'hEE;
    for (int r = 0; r < 8; r++) for (int i = 0; i < 16; i++) slist[r][i] = '0;
    a = make_impdu(1, 10, DA, SA, 1, 1);      // SSM, 40 octets
    b = make_impdu(2, 190, DA, SA, 2, 2);     // 220 octets, 5 units
    c = make_impdu(3, 50, DA, SA, 3, 3);      // discarded, 2 units
    d = make_impdu(4, 1, DA, SA, 4, 4);
    store(a, 0, 1, 5);
    for (int k = 0; k < 5; k++) begin store(b, k, k % 4, 10 + k); slist[3][k] = {PROC_W'(k % 4), BUF_W'(10 + k)}; end
    for (int k = 0; k < 2; k++) begin store(c, k, 2, 20 + k); slist[6][k] = {PROC_W'(2), BUF_W'(20 + k)}; end
    store(d, 0, 3, 30);
    repeat (2) @(posedge clk);
    rst_n = 1;
    h = '0; h.single = 1; h.proc = 1; h.buf_idx = 5; h.nseg = 1; h.off = 24; h.len = 10; q(h);
    h = '0; h.rid = 3; h.nseg = 5; h.off = 24; h.len = 190; q(h);
    h = '0; h.discard = 1; h.rid = 6; h.nseg = 2; q(h);
    h = '0; h.single = 1; h.proc = 3; h.buf_idx = 30; h.nseg = 1; h.off = 24; h.len = 1; q(h);
    t = 0;
    while (dones_a.size() < 3 && t < 5000) begin @(negedge clk); t++; end
    repeat (10) @(negedge clk);
    check(dones_a.size() == 3, "three deliveries");
    exp_addr = BASE;
    foreach (dones_a[i]) begin
      int n, id;
      n  = (i == 0) ? 10 : (i == 1) ? 190 : 1;
      id = (i == 0) ? 1 : (i == 1) ? 2 : 4;
      check(dones_a[i] == exp_addr && dones_l[i] == n, $sformatf("delivery %0d at %h len %0d", i, dones_a[i], dones_l[i]));
      for (int j = 0; j < n; j++) begin
        checks++;
        if (!host.exists(exp_addr + j) || host[exp_addr + j] != msdu_octet(id, j)) begin
          failures++; $display("FAIL host octet id %0d #%0d", id, j);
        end
      end
      exp_addr += n;
    end
    check(host.num() == 201, $sformatf("only MSDU octets written (%0d)", host.num()));
    check(freed.num() == 9, $sformatf("nine buffers freed (%0d)", freed.num()));
    foreach (freed[k]) check(freed[k] == 1, $sformatf("buffer %0d freed once", k));
    check(rels.size() == 2 && rels[0] == 3 && rels[1] == 6, "R2 processes released");
    check(n_stall > 0, "host bus busy cycles waited out");
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
