// crc_unit: feedback shift register that divides the incoming bit string by
// the generator g(D) and keeps the remainder, c(D) = Rem[s(D) D^L / g(D)].
//
// This is the circuit of the document's CRC unit (one storage cell per
// remainder bit, modulo-2 adders fed back through the g_i taps), widened so
// that up to eight bits, most significant first, are taken per clock. With
// `nbits` below 8 only the top `nbits` bits of `din` are shifted in, which
// lets a caller stop inside an octet (the 10-bit payload CRC starts 6 bits
// into the last DMPDU octet). `init` clears the register; the remainder is
// `crc`, valid the clock after the last `en`. The register starts at zero,
// which is what the division formula implies; no inversion is applied.
// Used as CRC-8 (segment header HCS) and CRC-10 (DMPDU payload CRC).
module crc_unit #(
  parameter int          L    = 10,
  parameter logic [L-1:0] POLY = 10'h233
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         en,
  input  logic [3:0]   nbits,
  input  logic [7:0]   din,
  output logic [L-1:0] crc
);

  logic [L-1:0] nxt;

  always_comb begin
    nxt = crc;
    for (int i = 0; i < 8; i++) begin
      if (i < int'(nbits)) begin
        if (nxt[L-1] ^ din[7-i]) nxt = (nxt << 1) ^ POLY;
        else                     nxt = nxt << 1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc <= '0;
    else if (init) crc <= '0;
    else if (en)   crc <= nxt;
  end

endmodule
