// tb_sync_fifo: random writes and reads against a queue model. Checks the
// fall-through read data, the empty/full flags and the occupancy count every
// clock, and that a write while full is refused (the testbench never issues
// one, since the block asserts on it; full is checked instead).
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 5;
  logic wr = 0, rd = 0, empty, full;
  logic [11:0] wdata = 0, rdata;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [11:0] model [$];

  sync_fifo #(.T(logic [11:0]), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr, .wdata, .rd, .rdata, .empty, .full, .count);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (count != model.size() || empty != (model.size() == 0) || full != (model.size() == DEPTH)) begin
        failures++; $display("FAIL flags t=%0d count=%0d model=%0d", t, count, model.size());
      end
      if (model.size() != 0) begin
        checks++;
        if (rdata != model[0]) begin failures++; $display("FAIL data t=%0d got %h exp %h", t, rdata, model[0]); end
      end
      wr = ($urandom_range(0, 99) < ((t / 500) % 2 ? 70 : 35)) && !full;
      rd = $urandom_range(0, 99) < 50;
      wdata = 12'($urandom);
      @(posedge clk);
      if (rd && model.size() != 0) void'(model.pop_front());
      if (wr) model.push_back(wdata);
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
