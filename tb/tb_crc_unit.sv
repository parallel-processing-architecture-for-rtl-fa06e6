// tb_crc_unit: checks the serial CRC unit in both of its uses on the bus,
// the 8-bit header check sequence (x^8+x^2+x+1) and the 10-bit payload CRC
// (x^10+x^9+x^5+x^4+x+1). Random octet strings, with a random number of
// bits in the last octet, are fed one octet per clock; the result is compared
// with a bit-serial reference computed in the testbench. The reference does
// not share code with the unit: it shifts one bit at a time through a
// polynomial division written out directly.
module tb_crc_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic init8, en8, init10, en10;
  logic [3:0] nb;
  logic [7:0] din;
  logic [7:0] crc8;
  logic [9:0] crc10;

  crc_unit #(.L(8),  .POLY(8'h07))   u8  (.clk, .rst_n, .init(init8),  .en(en8),  .nbits(nb), .din, .crc(crc8));
  crc_unit #(.L(10), .POLY(10'h233)) u10 (.clk, .rst_n, .init(init10), .en(en10), .nbits(nb), .din, .crc(crc10));

  function automatic logic [15:0] ref_crc(input byte unsigned m[], input int lastbits, input int L, input logic [15:0] poly);
    logic [15:0] r = 0;
    for (int i = 0; i < m.size(); i++) begin
      int nbits = (i == m.size() - 1) ? lastbits : 8;
      for (int b = 0; b < nbits; b++) begin
        logic fb;
        fb = r[L-1] ^ m[i][7-b];
        r = (r << 1) & ((16'd1 << L) - 1);
        if (fb) r = r ^ poly;
      end
    end
    return r;
  endfunction

  initial begin
    init8 = 0; en8 = 0; init10 = 0; en10 = 0; nb = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      byte unsigned m[];
      int n, lb;
      n  = 1 + $urandom_range(0, 50);
      lb = (t % 3 == 0) ? 6 : 8;
      m = new[n];
      foreach (m[i]) m[i] = 8'($urandom);
      @(negedge clk); init8 = 1; init10 = 1;
      @(negedge clk); init8 = 0; init10 = 0;
      for (int i = 0; i < n; i++) begin
        en8 = 1; en10 = 1; din = m[i]; nb = (i == n - 1) ? 4'(lb) : 4'd8;
        @(negedge clk);
      end
      en8 = 0; en10 = 0;
      checks++;
      if (crc10 !== ref_crc(m, lb, 10, 16'h233)) begin
        failures++; $display("FAIL crc10 t=%0d got %h exp %h", t, crc10, ref_crc(m, lb, 10, 16'h233));
      end
      checks++;
      if (crc8 !== ref_crc(m, lb, 8, 16'h07)) begin
        failures++; $display("FAIL crc8 t=%0d got %h exp %h", t, crc8, ref_crc(m, lb, 8, 16'h07));
      end
    end
    // A known value: CRC-8 (poly 07, zero start) of ASCII "123456789" is F4.
    begin
      byte unsigned m[];
      m = new[9];
      foreach (m[i]) m[i] = 8'h31 + 8'(i);
      @(negedge clk); init8 = 1;
      @(negedge clk); init8 = 0;
      foreach (m[i]) begin en8 = 1; din = m[i]; nb = 8; @(negedge clk); end
      en8 = 0;
      checks++;
      if (crc8 !== 8'hF4) begin failures++; $display("FAIL crc8 check value %h", crc8); end
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
