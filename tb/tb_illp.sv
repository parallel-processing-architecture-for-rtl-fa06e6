// tb_illp: the ILLP read tap on a stream of slots built by the testbench:
// empty QA slots, good busy slots for a programmed VCI and for the default
// VCI, a bad HCS, an unknown VCI, and good slots while no R1 is ready. It
// checks the empty-slot strobe, the choice of R1 (round robin over the ready
// ones), the header handed over, every payload octet written with its
// position, the CRC-10 value at `done`, and the drop counters.
module tb_illp;
  import dqdb_pkg::*;
  import tb_dqdb_util::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  bus_octet_t bus_in = '0;
  logic [19:0] vci_tab [4];
  logic [3:0] r1_ready = 4'b1111;
  logic empty_slot, assign_valid, wr_en, done;
  logic [1:0] assign_id, wr_id;
  logic [39:0] hdr;
  logic [5:0] wr_addr;
  logic [7:0] wr_data;
  logic [9:0] crc_rem;
  logic [15:0] n_accepted, n_drop_vci, n_drop_hcs, n_drop_busy;

  illp #(.N_R1(4), .NVCI(4)) dut (
    .clk, .rst_n, .bus_in, .vci_tab, .vci_valid(4'b0011), .r1_ready, .empty_slot,
    .assign_valid, .assign_id, .hdr, .wr_en, .wr_id, .wr_addr, .wr_data, .done, .crc_rem,
    .n_accepted, .n_drop_vci, .n_drop_hcs, .n_drop_busy);

  // What the tap should do with each slot sent.
  bytes_t exp_slot [$];
  int     exp_id   [$];
  int n_empty = 0, n_assign = 0, n_done = 0, wr_errs = 0;
  bytes_t cur;
  int cur_id = -1;

  always @(negedge clk) if (rst_n) begin
    if (empty_slot) n_empty++;
    if (assign_valid) begin
      n_assign++;
      cur = exp_slot.pop_front();
      cur_id = exp_id.pop_front();
      checks++;
      if (int'(assign_id) != cur_id || hdr != {cur[0], cur[1], cur[2], cur[3], cur[4]}) begin
        failures++; $display("FAIL assign id %0d exp %0d hdr %h", assign_id, cur_id, hdr);
      end
    end
    if (wr_en && (int'(wr_id) != cur_id || wr_data != cur[wr_addr])) wr_errs++;
    if (done) begin
      bytes_t d;
      d = {};
      for (int i = 5; i < 52; i++) d.push_back(cur[i]);
      n_done++;
      checks++;
      if (crc_rem != 10'(crc_bits(d, 46 * 8 + 6, 10, 16'h233))) begin failures++; $display("FAIL crc at done"); end
    end
  end

  task automatic send(input bytes_t s);
    foreach (s[i]) begin
      @(negedge clk); bus_in.sof = (i == 0); bus_in.d = s[i];
    end
  endtask

  task automatic send_empty();
    bytes_t s;
    s = {};
    for (int i = 0; i < 53; i++) s.push_back(8'h00);
    send(s);
  endtask

  function automatic bytes_t rnd_unit();
    bytes_t u;
    u = {};
    for (int i = 0; i < 44; i++) u.push_back(8'($urandom));
    return u;
  endfunction

  initial begin
    vci_tab[0] = 20'h00123; vci_tab[1] = 20'h00456; vci_tab[2] = 20'h00789; vci_tab[3] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send_empty(); send_empty();
    // good slots, round robin 0,1,2,3,0
    for (int k = 0; k < 5; k++) begin
      bytes_t s;
      s = make_slot(k % 2 ? 20'hFFFFF : 20'h00456, ST_COM, 4'(k), 10'd9, 6'd44, rnd_unit());
      exp_slot.push_back(s); exp_id.push_back(k % 4);
      send(s);
    end
    // R1 1 busy: next goes to 2 (after 0 was last), then 3, then 0
    r1_ready = 4'b1101;
    for (int k = 0; k < 3; k++) begin
      bytes_t s;
      s = make_slot(20'h00123, ST_BOM, 0, 10'd9, 6'd44, rnd_unit());
      exp_slot.push_back(s); exp_id.push_back(k == 0 ? 2 : k == 1 ? 3 : 0);
      send(s);
    end
    send(make_slot(20'h00123, ST_SSM, 0, 0, 6'd44, rnd_unit(), 1, 0));   // bad HCS
    send(make_slot(20'h00789, ST_SSM, 0, 0, 6'd44, rnd_unit()));        // VCI not enabled
    send(make_slot(20'h00AAA, ST_SSM, 0, 0, 6'd44, rnd_unit()));        // unknown VCI
    send_empty();
    r1_ready = 4'b0000;
    send(make_slot(20'h00123, ST_SSM, 0, 0, 6'd44, rnd_unit()));        // no R1 ready
    begin
      bytes_t s;
      s = make_slot(20'h00123, ST_SSM, 0, 0, 6'd44, rnd_unit());
      s[0] = 8'h40;                                                    // slot type PA: ignored
      send(s);
    end
    r1_ready = 4'b1111;
    send_empty();
    @(negedge clk); bus_in = '0;
    repeat (60) @(negedge clk);
    check(n_assign == 8 && n_done == 8 && n_accepted == 8, $sformatf("8 slots accepted (%0d/%0d/%0d)", n_assign, n_done, n_accepted));
    check(wr_errs == 0, $sformatf("payload writes (%0d errors)", wr_errs));
    check(n_drop_hcs == 1, "HCS drop counted");
    check(n_drop_vci == 2, "VCI drops counted");
    check(n_drop_busy == 1, "drop for no ready R1 counted");
    check(n_empty == 4, $sformatf("empty QA slots seen (%0d)", n_empty));
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
