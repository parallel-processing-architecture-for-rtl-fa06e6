// tb_rr_sched: random ready masks; checks that the grant goes to the first
// ready requester after the last one served, cyclically, and that no grant is
// given when none is ready.
module tb_rr_sched;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 4;
  logic [N-1:0] ready = '0;
  logic take = 0, gnt_valid;
  logic [1:0] gnt_id;
  int last = N - 1;

  rr_sched #(.N(N)) dut (.clk, .rst_n, .ready, .take, .gnt_valid, .gnt_id);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int exp;
      @(negedge clk);
      ready = N'($urandom);
      take  = $urandom_range(0, 3) != 0;
      exp = -1;
      for (int k = 1; k <= N; k++) if (exp < 0 && ready[(last + k) % N]) exp = (last + k) % N;
      #1;
      checks++;
      if (gnt_valid != (exp >= 0) || (exp >= 0 && int'(gnt_id) != exp)) begin
        failures++; $display("FAIL t=%0d ready=%b last=%0d got %b/%0d exp %0d", t, ready, last, gnt_valid, gnt_id, exp);
      end
      @(posedge clk);
      if (take && exp >= 0) last = exp;
    end
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
