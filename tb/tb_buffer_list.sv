// tb_buffer_list: allocates and releases blocks on two connections in random
// order and checks them against a model of the buffer list: each connection
// owns NCELL fixed blocks, hands them out in ring order, releases them oldest
// first, refuses an allocation when all are busy and counts the refusals.
module tb_buffer_list;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NCONN = 2, NCELL = 3, BB = 9216;
  logic alloc = 0, release_blk = 0, alloc_ok;
  logic alloc_conn = 0, rel_conn = 0;
  logic [15:0] alloc_addr, n_blocked;
  logic [1:0] busy_cnt [NCONN];
  int nxt [NCONN], busy [NCONN];
  int blocked = 0;
  bit rel_ok;

  buffer_list #(.NCONN(NCONN), .NCELL(NCELL), .BLOCK_BYTES(BB)) dut (
    .clk, .rst_n, .alloc, .alloc_conn, .alloc_ok, .alloc_addr, .release_blk, .rel_conn, .busy_cnt, .n_blocked);

  initial begin
    foreach (nxt[c]) begin nxt[c] = 0; busy[c] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      alloc = $urandom_range(0, 1); alloc_conn = 1'($urandom);
      release_blk = $urandom_range(0, 2) == 0; rel_conn = 1'($urandom);
      #1;
      checks++;
      if (alloc_ok != (busy[alloc_conn] < NCELL)) begin failures++; $display("FAIL t=%0d ok", t); end
      checks++;
      if (alloc_addr != 16'((alloc_conn * NCELL + nxt[alloc_conn]) * BB)) begin
        failures++; $display("FAIL t=%0d addr %h", t, alloc_addr);
      end
      @(posedge clk);
      rel_ok = release_blk && busy[rel_conn] > 0;
      if (alloc && busy[alloc_conn] < NCELL) begin busy[alloc_conn]++; nxt[alloc_conn] = (nxt[alloc_conn] + 1) % NCELL; end
      else if (alloc) blocked++;
      if (rel_ok) busy[rel_conn]--;
      #1;
      for (int c = 0; c < NCONN; c++) begin
        checks++;
        if (busy_cnt[c] != 2'(busy[c])) begin failures++; $display("FAIL t=%0d busy %0d got %0d exp %0d a=%b%0d r=%b%0d", t, c, busy_cnt[c], busy[c], alloc, alloc_conn, release_blk, rel_conn); end
      end
    end
    checks++;
    if (n_blocked != 16'(blocked) || blocked == 0) begin failures++; $display("FAIL blocked %0d/%0d", n_blocked, blocked); end
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
