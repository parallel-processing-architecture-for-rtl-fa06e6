// tb_r1_proc: one R1 receive processor driven the way the ILLP drives it.
// Slots built by the testbench are written into the packet buffer; the test
// checks the outcome of each path of the state diagram (SSM to the HIP, BOM
// and COM to R2, drops for a bad CRC, a foreign address, a COM without an
// active reassembly and an SSM with mismatched BE tags), the messages'
// contents, the PSR pulse, the buffer accounting and the DMA read port, and
// the processing time of every path against the operation counts of the
// state table: 19, 28, 32, 39 and 37 operations of CYC_PER_OP clocks, from
// the end of the slot to the message request or the return to state I.
// Because state I is itself one operation long, a packet can wait up to one
// operation for it to end; the measured time must lie in ((N-1)*C, N*C+1].
module tb_r1_proc;
  import dqdb_pkg::*;
  import tb_dqdb_util::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int C = 4;
  localparam logic [63:0] ME = 64'hC000_0000_0000_0022;
  localparam logic [63:0] OTHER = 64'hC000_0000_0000_0077;

  logic assign_valid = 0, wr_en = 0, done = 0, ready;
  logic [39:0] hdr = '0;
  logic [5:0] wr_addr = '0;
  logic [7:0] wr_data = '0;
  logic [9:0] crc_rem = '0;
  logic [19:0] vci_tab [4];
  logic [3:0] act_valid = '0, act_indiv = '0;
  logic [19:0] act_vci [4];
  logic [9:0] act_mid [4];
  logic sbus_req, sbus_gnt = 0, to_hip, psr;
  r2_msg_t r2_msg;
  hip_req_t hip_msg;
  logic free_valid = 0;
  logic [BUF_W-1:0] free_buf = '0, dma_buf = '0;
  logic [5:0] dma_addr = '0;
  logic [7:0] dma_data;
  logic [15:0] n_drop_crc, n_drop_addr, n_drop_ssm;
  logic [BUF_W:0] n_free;

  r1_proc #(.NBUF(54), .CYC_PER_OP(C), .NVCI(4), .NREASM(4), .PROC_ID(2)) dut (
    .clk, .rst_n, .assign_valid, .hdr, .wr_en, .wr_addr, .wr_data, .done, .crc_rem, .ready,
    .msap_addr(ME), .group_addr(64'hE000_0000_0000_0001), .vci_tab, .vci_valid(4'b0001),
    .psr_en(1'b1), .act_valid, .act_vci, .act_mid, .act_indiv,
    .sbus_req, .sbus_gnt, .to_hip, .r2_msg, .hip_msg, .psr,
    .free_valid, .free_buf, .dma_buf, .dma_addr, .dma_data,
    .n_drop_crc, .n_drop_addr, .n_drop_ssm, .n_free);

  int psr_cnt = 0;
  always @(negedge clk) if (psr) psr_cnt++;

  // Write one slot as the ILLP does: header at the assignment, then the
  // DMPDU octets 5..52 one per clock, `done` with the last.
  task automatic feed(input bytes_t s, input bit bad_crc_rem);
    bytes_t d;
    logic [9:0] c;
    d = {};
    for (int i = 5; i < 52; i++) d.push_back(s[i]);
    c = 10'(crc_bits(d, 46 * 8 + 6, 10, 16'h233));
    wait (ready);
    @(negedge clk);
    assign_valid = 1; hdr = {s[0], s[1], s[2], s[3], s[4]};
    @(negedge clk); assign_valid = 0;
    for (int i = 5; i <= 52; i++) begin
      wr_en = 1; wr_addr = 6'(i); wr_data = s[i];
      done = (i == 52); crc_rem = bad_crc_rem ? ~c : c;
      @(negedge clk);
    end
    wr_en = 0; done = 0;
  endtask

  // Time from the clock after `done` to the request for the shared bus
  // (fwd) or to ready (drop).
  task automatic run(input bytes_t s, input bit bad, input bit fwd, input int nops, input string name);
    int t;
    feed(s, bad);
    t = 0;
    while (fwd ? !sbus_req : !ready) begin @(posedge clk); #1; t++; if (t > 400) break; end
    check(t > (nops - 1) * C && t <= nops * C + 1,
          $sformatf("%s path time %0d clocks, expected %0d ops x %0d", name, t, nops, C));
    if (fwd) begin
      @(negedge clk); sbus_gnt = 1;
      @(negedge clk); sbus_gnt = 0;
    end
  endtask

  initial begin
    bytes_t imp, s, unit;
    logic [15:0] nd;
    vci_tab[0] = 20'h00123; vci_tab[1] = 0; vci_tab[2] = 0; vci_tab[3] = 0;
    foreach (act_vci[i]) begin act_vci[i] = 0; act_mid[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(n_free == 54, "all 54 buffers free after reset");

    // 1. good SSM, individual address, MSDU of 10 octets
    imp = make_impdu(7, 10, ME, 64'hC1, 8'h33, 8'h33);
    s = make_slot(20'hFFFFF, ST_SSM, 0, 0, 6'(imp.size()), imp);
    fork
      run(s, 0, 1, 37, "SSM");
      begin
        wait (sbus_req); #1;
        check(to_hip, "SSM goes to the HIP");
        check(hip_msg.single && hip_msg.proc == 2 && hip_msg.off == 24 && hip_msg.len == 10,
              $sformatf("HIP request off=%0d len=%0d", hip_msg.off, hip_msg.len));
        dma_buf = hip_msg.buf_idx;
        for (int i = 0; i < 53; i++) begin
          dma_addr = 6'(i); #1;
          checks++;
          if (dma_data != s[i]) begin failures++; $display("FAIL dma octet %0d", i); end
        end
      end
    join
    check(psr_cnt == 1, $sformatf("PSR pulse for an individually addressed segment (%0d)", psr_cnt));
    check(n_free == 53, "accepted packet keeps its buffer");
    @(negedge clk); free_valid = 1; free_buf = dma_buf;
    @(negedge clk); free_valid = 0;
    check(n_free == 54, "free returns the buffer");

    // 2. bad CRC
    run(s, 1, 0, 19, "CRC drop");
    check(n_drop_crc == 1 && n_free == 54, "CRC error dropped and freed");

    // 3. BOM for another address
    imp = make_impdu(8, 100, OTHER, 64'hC1, 8'h34, 8'h34);
    unit = {}; for (int i = 0; i < 44; i++) unit.push_back(imp[i]);
    s = make_slot(20'hFFFFF, ST_BOM, 0, 10'd5, 6'd44, unit);
    run(s, 0, 0, 28, "address drop");
    check(n_drop_addr == 1, "foreign DA dropped");

    // 4. BOM for this node
    imp = make_impdu(9, 100, ME, 64'hC1, 8'h35, 8'h35);
    unit = {}; for (int i = 0; i < 44; i++) unit.push_back(imp[i]);
    s = make_slot(20'h00123, ST_BOM, 0, 10'd6, 6'd44, unit);
    fork
      run(s, 0, 1, 39, "BOM");
      begin
        wait (sbus_req); #1;
        check(!to_hip && r2_msg.st == ST_BOM && r2_msg.mid == 6 && r2_msg.vci == 20'h00123 &&
              r2_msg.plen == 44 && r2_msg.indiv && r2_msg.proc == 2, "BOM message to R2");
        check(unit_octet(r2_msg.unit, 0) == imp[0] && unit_octet(r2_msg.unit, 43) == imp[43], "BOM unit carried");
      end
    join

    // 5. COM without an active reassembly, then with one
    unit = {}; for (int i = 44; i < 88; i++) unit.push_back(imp[i]);
    s = make_slot(20'h00123, ST_COM, 1, 10'd6, 6'd44, unit);
    nd = n_drop_addr;
    run(s, 0, 0, 28, "COM drop");
    check(n_drop_addr == nd + 1, "COM without reassembly dropped");
    act_valid = 4'b0100; act_vci[2] = 20'h00123; act_mid[2] = 10'd6; act_indiv = 4'b0100;
    fork
      run(s, 0, 1, 32, "COM");
      begin wait (sbus_req); #1; check(r2_msg.st == ST_COM && r2_msg.seq == 1, "COM message to R2"); end
    join

    // 6. SSM with mismatched BE tags
    imp = make_impdu(10, 10, ME, 64'hC1, 8'h36, 8'h37);
    s = make_slot(20'hFFFFF, ST_SSM, 0, 0, 6'(imp.size()), imp);
    run(s, 0, 0, 37, "SSM drop");
    check(n_drop_ssm == 1, "SSM with BE tag mismatch dropped");
    check(n_free == 52, "two packets held (BOM and COM, waiting for R2)");
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
