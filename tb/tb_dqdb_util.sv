// tb_dqdb_util: reference models shared by the testbenches.
//
// Bit-serial reference CRCs (long division of the bit string times D^L by
// g(D), most significant bit first) and builders for slots and IMPDUs laid
// out as IEEE 802.6 places the fields. They are written from the field
// definitions, not from the RTL, so that the testbenches check the RTL
// against an independent statement of the formats.
package tb_dqdb_util;

  typedef byte unsigned bytes_t [$];

  function automatic logic [15:0] crc_bits(input bytes_t b, input int nbits, input int L,
                                           input logic [15:0] poly);
    logic [15:0] r;
    r = '0;
    for (int i = 0; i < nbits; i++) begin
      logic bit_in, top;
      bit_in = b[i / 8][7 - (i % 8)];
      top    = r[L-1];
      r      = (r << 1) & ((16'h1 << L) - 1);
      if (top ^ bit_in) r = r ^ poly;
    end
    return r;
  endfunction

  function automatic logic [7:0] hcs_of(input logic [19:0] vci, input logic [3:0] ptpri);
    bytes_t h;
    logic [7:0] b2;
    b2 = {vci[3:0], ptpri};
    h = {};
    h.push_back(vci[19:12]); h.push_back(vci[11:4]); h.push_back(b2);
    return 8'(crc_bits(h, 24, 8, 16'h07));
  endfunction

  // 53-octet QA slot carrying one DMPDU.
  function automatic bytes_t make_slot(input logic [19:0] vci, input logic [1:0] st,
                                       input logic [3:0] seq, input logic [9:0] mid,
                                       input logic [5:0] plen, input bytes_t unit,
                                       input bit bad_hcs = 0, input bit bad_crc = 0);
    bytes_t s, d;
    logic [9:0] c;
    logic [7:0] t;
    s = {};
    s.push_back(8'h80); s.push_back(vci[19:12]); s.push_back(vci[11:4]);
    t = {vci[3:0], 4'h0};
    s.push_back(t);
    s.push_back(hcs_of(vci, 4'h0) ^ (bad_hcs ? 8'h01 : 8'h00));
    t = {st, seq, mid[9:8]};
    d = {};
    d.push_back(t); d.push_back(mid[7:0]);
    for (int i = 0; i < 44; i++) d.push_back(i < unit.size() ? unit[i] : 8'h00);
    t = {plen, 2'b00};
    d.push_back(t);
    c = 10'(crc_bits(d, 46 * 8 + 6, 10, 16'h233));
    if (bad_crc) c = c ^ 10'h001;
    t = {plen, c[9:8]};
    d[46] = t;
    d.push_back(c[7:0]);
    foreach (d[i]) s.push_back(d[i]);
    return s;
  endfunction

  // MSDU test pattern: octet 0 identifies the message.
  function automatic byte unsigned msdu_octet(input int id, input int i);
    return (i == 0) ? 8'(id) : 8'(id * 37 + i * 11 + 3);
  endfunction

  // Whole IMPDU (header, MSDU, PAD, trailer) for an MSDU of n octets.
  function automatic bytes_t make_impdu(input int id, input int n, input logic [63:0] da,
                                        input logic [63:0] sa, input logic [7:0] betag,
                                        input logic [7:0] betag_trl);
    bytes_t b;
    int pad, len;
    pad = (4 - n % 4) % 4;
    len = 20 + n + pad;
    b = {};
    b.push_back(8'h00); b.push_back(betag); b.push_back(8'(len >> 8)); b.push_back(8'(len));
    for (int i = 7; i >= 0; i--) b.push_back(da[i*8 +: 8]);
    for (int i = 7; i >= 0; i--) b.push_back(sa[i*8 +: 8]);
    b.push_back(8'd4 + 8'(pad));
    b.push_back(8'h00);
    b.push_back(8'h00); b.push_back(8'h00);
    for (int i = 0; i < n; i++) b.push_back(msdu_octet(id, i));
    for (int i = 0; i < pad; i++) b.push_back(8'h00);
    b.push_back(8'h00); b.push_back(betag_trl); b.push_back(8'(len >> 8)); b.push_back(8'(len));
    return b;
  endfunction

endpackage
