// tb_t1_proc: host requests of several MSDU lengths (1, 10, 16, 17, 100,
// 301 and the maximum 9188 octets) go through T1. A simple buffer list
// model grants blocks, sometimes only after a wait. The testbench rebuilds
// each IMPDU from the segmentation units T1 hands out, taking data octets
// from a memory model filled with the MSDU at the granted block, and compares
// it with an IMPDU built here from the request; it also checks the segment
// types (SSM for IMPDUs up to 44 octets, else BOM, COM..., EOM), the payload
// lengths, the sequence numbers, the MID, the round-robin choice of T2 and
// the BE tag incrementing per IMPDU.
module tb_t1_proc;
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
  logic hreq_valid = 0, hreq_ready, hgrant_valid, host_done = 0;
  tx_req_t hreq = '0;
  logic [15:0] hgrant_addr, alloc_addr = 0, n_impdu;
  logic alloc, alloc_conn, alloc_ok = 0;
  logic [1:0] t2_idle = 2'b11;
  logic job_valid;
  logic [0:0] job_id;
  t2_job_t job;
  logic [7:0] mem [65536];

  t1_proc #(.N_T2(2)) dut (.clk, .rst_n, .hreq_valid, .hreq, .hreq_ready, .hgrant_valid,
    .hgrant_addr, .host_done, .tx_mid(10'h155), .alloc, .alloc_conn, .alloc_ok, .alloc_addr,
    .t2_idle, .job_valid, .job_id, .job, .n_impdu);

  t2_job_t jobs [$];
  int ids [$];
  int bad_pick = 0, prev_id = 1;
  always @(posedge clk) if (job_valid) begin
    jobs.push_back(job); ids.push_back(job_id);
    // an idle T2, and the other one than last time whenever both are idle
    if (!t2_idle[job_id] || (t2_idle == 2'b11 && int'(job_id) == prev_id)) bad_pick++;
    prev_id = job_id;
  end

  // T2 model: busy for a few clocks after each job
  int busy_t [2] = '{0, 0};
  always @(negedge clk) begin
    for (int i = 0; i < 2; i++) begin
      if (busy_t[i] > 0) busy_t[i]--;
      t2_idle[i] = (busy_t[i] == 0);
    end
  end
  always @(posedge clk) if (job_valid) busy_t[job_id] <= 3 + $urandom_range(0, 5);

  int lastid = 1;
  task automatic send(input int id, input int n, input logic [7:0] betag);
    bytes_t imp, rb;
    int nj, exp_id;
    logic [3:0] seq0;
    hreq = '0; hreq.conn = 1'(id); hreq.da = DA; hreq.sa = SA; hreq.nbytes = 14'(n);
    jobs = {}; ids = {};
    @(negedge clk); hreq_valid = 1;
    @(negedge clk); hreq_valid = 0;
    repeat ($urandom_range(0, 6)) @(negedge clk);
    alloc_addr = 16'(id * 1000); alloc_ok = 1;
    while (!hgrant_valid) @(negedge clk);
    alloc_ok = 0;
    check(hgrant_addr == 16'(id * 1000) && alloc_conn == 1'(id), "block address to host");
    for (int i = 0; i < n; i++) mem[hgrant_addr + i] = msdu_octet(id, i);
    @(negedge clk); host_done = 1;
    @(negedge clk); host_done = 0;
    while (!hreq_ready) @(negedge clk);
    repeat (2) @(negedge clk);
    imp = make_impdu(id, n, DA, SA, betag, betag);
    nj = (imp.size() + 43) / 44;
    check(jobs.size() == nj, $sformatf("id %0d: %0d units, expected %0d", id, jobs.size(), nj));
    rb = {};
    seq0 = jobs[0].seq;
    exp_id = 1 - lastid;
    foreach (jobs[k]) begin
      t2_job_t j;
      seg_type_e et;
      j = jobs[k];
      et = (nj == 1) ? ST_SSM : (k == 0) ? ST_BOM : (k == nj - 1) ? ST_EOM : ST_COM;
      checks++;
      if (j.st != et || j.seq != 4'(seq0 + k) || j.mid != (nj == 1 ? 10'd0 : 10'h155) ||
          j.plen != 6'(k == nj - 1 ? imp.size() - 44 * k : 44) || j.last != (k == nj - 1)) begin
        failures++; $display("FAIL id %0d unit %0d st=%0d seq=%0d plen=%0d", id, k, j.st, j.seq, j.plen);
      end
      if (j.has_hdr) for (int i = 0; i < 24; i++) rb.push_back(j.hdr[(23 - i) * 8 +: 8]);
      for (int i = 0; i < j.data_n; i++) rb.push_back(mem[j.data_addr + i]);
      for (int i = 0; i < j.pad_n; i++) rb.push_back(0);
      if (j.has_trl) for (int i = 0; i < 4; i++) rb.push_back(j.trl[(3 - i) * 8 +: 8]);
      if (k != nj - 1) begin
        checks++;
        if (rb.size() != 44 * (k + 1)) begin failures++; $display("FAIL id %0d unit %0d holds %0d", id, k, rb.size() - 44 * k); end
      end
    end
    check(rb == imp, $sformatf("id %0d: IMPDU rebuilt from the units (%0d octets)", id, imp.size()));
    lastid = ids[ids.size() - 1];
  endtask

  initial begin
    int lens [7] = '{1, 10, 16, 17, 100, 301, 9188};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (lens[i]) send(i + 1, lens[i], 8'(i));
    check(n_impdu == 7, "IMPDUs counted");
    check(bad_pick == 0, $sformatf("T2 chosen round robin among idle ones (%0d wrong)", bad_pick));
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
