// tb_t2_proc: gives a T2 processor one job of each shape (SSM with header,
// data, pad and trailer; COM of 44 data octets; EOM with data, pad and
// trailer; a BOM that carries only the header and data) and compares the
// octets it writes into the control-block FIFO with the record expected from
// the control-block format: inline block with segment header (its HCS worked
// out here separately) and DMPDU header, optional IMPDU header; memory block
// with count and address; end-of-segment inline block with pad, trailer,
// zero fill to 44 octets and the DMPDU trailer. It also checks that nothing
// is written before `turn`, and that a full FIFO stalls the output without
// losing octets.
module tb_t2_proc;
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
  logic job_valid = 0, idle, turn = 0, out_full = 0, out_wr, seg_done;
  t2_job_t job_in = '0;
  logic [7:0] out_data;
  bytes_t got;
  int early = 0;

  t2_proc dut (.clk, .rst_n, .job_valid, .job_in, .idle, .tx_vci(VCI), .turn, .out_full,
               .out_wr, .out_data, .seg_done);

  always @(posedge clk) if (out_wr) got.push_back(out_data);
  always @(posedge clk) if (out_wr && !turn && got.size() == 0) early++;

  function automatic bytes_t expect_rec(input t2_job_t j);
    bytes_t r;
    int n1, fill, n3;
    r = {};
    n1 = j.has_hdr ? 30 : 6;
    r.push_back({j.last & 1'b0, 1'b0, 2'b00, j.conn, 1'b0, 2'd1}); r.push_back(8'(n1));
    r.push_back(0); r.push_back(0);
    r.push_back(VCI[19:12]); r.push_back(VCI[11:4]); r.push_back({VCI[3:0], 4'h0});
    r.push_back(hcs_of(VCI, 4'h0));
    r.push_back({j.st, j.seq, j.mid[9:8]}); r.push_back(j.mid[7:0]);
    if (j.has_hdr) for (int i = 0; i < 24; i++) r.push_back(j.hdr[(23 - i) * 8 +: 8]);
    if (j.data_n != 0) begin
      r.push_back({4'b0000, j.conn, 1'b0, 2'd2}); r.push_back(8'(j.data_n));
      r.push_back(j.data_addr[15:8]); r.push_back(j.data_addr[7:0]);
    end
    fill = 44 - (j.has_hdr ? 24 : 0) - int'(j.data_n) - int'(j.pad_n) - (j.has_trl ? 4 : 0);
    n3 = int'(j.pad_n) + (j.has_trl ? 4 : 0) + fill + 2;
    r.push_back({1'b1, j.last, 2'b00, j.conn, 1'b0, 2'd1}); r.push_back(8'(n3));
    r.push_back(0); r.push_back(0);
    for (int i = 0; i < j.pad_n; i++) r.push_back(0);
    if (j.has_trl) for (int i = 0; i < 4; i++) r.push_back(j.trl[(3 - i) * 8 +: 8]);
    for (int i = 0; i < fill; i++) r.push_back(0);
    r.push_back({j.plen, 2'b00}); r.push_back(0);
    return r;
  endfunction

  task automatic run_job(input t2_job_t j, input bit stall, input string name);
    bytes_t e;
    int t;
    got = {};
    early = 0;
    @(negedge clk); job_valid = 1; job_in = j;
    @(negedge clk); job_valid = 0;
    check(!idle, {name, ": busy after job"});
    repeat (5) @(negedge clk);
    check(got.size() == 0, {name, ": nothing written before its turn"});
    turn = 1;
    t = 0;
    while (!(seg_done) && t < 400) begin
      out_full = stall ? ($urandom_range(0, 2) == 0) : 1'b0;
      #1;
      if (seg_done) break;
      @(negedge clk); t++;
    end
    @(negedge clk); turn = 0; out_full = 0;
    e = expect_rec(j);
    check(got.size() == e.size(), $sformatf("%s: %0d octets, expected %0d", name, got.size(), e.size()));
    for (int i = 0; i < e.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != e[i]) begin failures++; $display("FAIL %s octet %0d got %h exp %h", name, i, got[i], e[i]); end
    end
    check(idle, {name, ": idle again"});
  endtask

  initial begin
    t2_job_t j;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // SSM: header, 10 data octets, pad 2, trailer
    j = '0; j.st = ST_SSM; j.plen = 6'd40; j.has_hdr = 1;
    for (int i = 0; i < 24; i++) j.hdr[(23 - i) * 8 +: 8] = 8'(i * 9 + 1);
    j.data_addr = 16'h2401; j.data_n = 10; j.pad_n = 2; j.has_trl = 1; j.trl = 32'h0011_0020;
    j.conn = 1; j.last = 1;
    run_job(j, 0, "SSM");
    // COM: 44 data octets
    j = '0; j.st = ST_COM; j.seq = 4'd5; j.mid = 10'h2F3; j.plen = 6'd44;
    j.data_addr = 16'h0100; j.data_n = 44;
    run_job(j, 1, "COM");
    // EOM: 5 data octets, pad 3, trailer
    j = '0; j.st = ST_EOM; j.seq = 4'd6; j.mid = 10'h2F3; j.plen = 6'd12;
    j.data_addr = 16'h012C; j.data_n = 5; j.pad_n = 3; j.has_trl = 1; j.trl = 32'h0022_01F0; j.last = 1;
    run_job(j, 1, "EOM");
    // BOM with header only and an EOM with only pad and trailer
    j = '0; j.st = ST_BOM; j.mid = 10'h001; j.plen = 6'd44; j.has_hdr = 1;
    j.data_addr = 16'h0000; j.data_n = 20;
    run_job(j, 0, "BOM");
    j = '0; j.st = ST_EOM; j.seq = 1; j.mid = 10'h001; j.plen = 6'd4; j.has_trl = 1; j.trl = 32'h0001_0014; j.last = 1;
    run_job(j, 0, "EOM trailer only");
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
