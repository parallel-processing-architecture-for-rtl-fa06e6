// tb_buffer_mem: fills the data buffer memory through the random-access
// (host) port, then reads it back through the serial port the transmitter
// uses: load a start address, then one octet per read strobe. Also checks
// the random-access read port, and that a serial read continues across a
// write to another address.
module tb_buffer_mem;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ra_we = 0, ser_load = 0, ser_rd = 0;
  logic [15:0] ra_addr = 0, ser_addr = 0;
  logic [7:0] ra_wdata = 0, ra_rdata, ser_data;
  logic [7:0] model [65536];

  buffer_mem dut (.clk, .rst_n, .ra_we, .ra_addr, .ra_wdata, .ra_rdata, .ser_load, .ser_addr, .ser_rd, .ser_data);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      ra_we = 1; ra_addr = 16'(i * 16 + 5); ra_wdata = 8'(i * 7 + 1); model[i * 16 + 5] = ra_wdata;
    end
    @(negedge clk); ra_we = 0;
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(0, 4095) * 16 + 5;
      @(negedge clk); ra_addr = 16'(a); #1;
      checks++;
      if (ra_rdata != model[a]) begin failures++; $display("FAIL ra %h", a); end
    end
    // Serial read of a run of consecutive addresses.
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk); ra_we = 1; ra_addr = 16'(40000 + i); ra_wdata = 8'($urandom); model[40000 + i] = ra_wdata;
    end
    @(negedge clk); ra_we = 0; ser_load = 1; ser_addr = 16'd40000;
    @(negedge clk); ser_load = 0;
    for (int i = 0; i < 2000; i++) begin
      checks++;
      if (ser_data != model[40000 + i]) begin failures++; $display("FAIL ser %0d got %h exp %h", i, ser_data, model[40000 + i]); end
      ser_rd = 1;
      if (i == 700) begin ra_we = 1; ra_addr = 16'd10; ra_wdata = 8'h5A; model[10] = 8'h5A; end
      else ra_we = 0;
      @(negedge clk);
      ser_rd = 0; ra_we = 0;
      if (i % 5 == 0) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
