// tb_fcfs_arbiter: masters raise a request at random moments, hold it until
// granted, keep the bus a random number of clocks and drop the request. A
// model keeps the arrival order (masters arriving in the same clock are
// ordered by index); the testbench checks that at most one grant is given,
// that it goes to the oldest waiting master, that it comes within two clocks
// (one to queue a new request, one to see a dropped one), and that gnt_en
// gates it. A master keeps its request low for two clocks after releasing.
module tb_fcfs_arbiter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 5;
  logic [N-1:0] req = '0, gnt;
  logic gnt_en = 1;
  logic [2:0] gnt_id;
  int hold [N], cool [N];
  int wait_cl = 0;
  int order [$];
  int served = 0;

  fcfs_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .gnt_en, .gnt, .gnt_id);

  initial begin
    foreach (hold[i]) begin hold[i] = 0; cool[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      gnt_en = $urandom_range(0, 9) != 0;
      for (int m = 0; m < N; m++) begin
        if (cool[m] > 0) cool[m]--;
        else if (!req[m] && $urandom_range(0, 9) == 0) begin
          req[m] = 1; order.push_back(m); hold[m] = 1 + $urandom_range(0, 6);
        end
      end
      #1;
      checks++;
      if ($countones(gnt) > 1) begin failures++; $display("FAIL t=%0d two grants %b", t, gnt); end
      if (order.size() != 0) begin
        checks++;
        if (gnt != 0 && gnt != (N'(1) << order[0])) begin
          failures++; $display("FAIL t=%0d exp grant %0d got %b", t, order[0], gnt);
        end
        // A new request is queued one clock after it is raised, and a released
        // bus passes on one clock after the request drops.
        if (gnt_en && gnt == 0) wait_cl++; else wait_cl = 0;
        if (wait_cl > 2) begin failures++; $display("FAIL t=%0d grant to %0d late", t, order[0]); end
        if (!gnt_en && gnt != 0) begin failures++; $display("FAIL t=%0d grant while disabled", t); end
      end
      @(posedge clk);
      if (order.size() != 0 && gnt[order[0]]) begin
        int m;
        m = order[0];
        hold[m]--;
        if (hold[m] == 0) begin
          #1 req[m] = 0; void'(order.pop_front()); served++; cool[m] = 2;
        end
      end
    end
    checks++;
    if (served < 200) begin failures++; $display("FAIL only %0d served", served); end
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
