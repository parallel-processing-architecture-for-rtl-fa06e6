// t2_proc: transmit processor T2 (segment builder).
//
// Receives one segmentation-unit description from T1, computes the segment
// header check sequence (HCS, CRC-8 over the VCI, payload type 00 and
// segment priority 00) and then, when it is its turn (`turn`, which keeps the
// segments in the order T1 issued them), writes the segment's control blocks
// into the OLLP FIFO, one octet per clock while the FIFO has room:
//   block 1, inline: segment header and DMPDU header (segment type, sequence
//            number, MID), followed for a BOM/SSM by the 24 IMPDU header octets
//   block 2, memory: address and count of the MSDU octets in the data memory
//            (left out when the unit carries none)
//   block 3, inline, end of segment: PAD, common PDU trailer, zero fill to 44
//            octets, and the DMPDU trailer (payload length, CRC field 0 - the
//            OLLP inserts the CRC-10 while sending)
// A control block is 4 octets: TYPE, number of octets, 16-bit data-memory
// offset (Fig 3.6 of the document). TYPE bits [1:0] are 1 (inline) or 2
// (memory); bit 7 marks the last block of a segment, bit 6 the last segment
// taken from a block (the OLLP then releases it) and bit 3 the connection;
// these flag bits are this design's encoding.
module t2_proc
  import dqdb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        job_valid,
  input  t2_job_t     job_in,
  output logic        idle,
  input  logic [19:0] tx_vci,
  input  logic        turn,
  input  logic        out_full,
  output logic        out_wr,
  output logic [7:0]  out_data,
  output logic        seg_done
);

  typedef enum logic [1:0] {J_IDLE, J_HCS, J_WAIT, J_OUT} jst_e;

  jst_e        st;
  t2_job_t     j;
  logic [1:0]  hc;
  logic [6:0]  b;       // octet index within the segment's FIFO record
  logic [19:0] vci;

  wire [7:0] sh0 = vci[19:12];
  wire [7:0] sh1 = vci[11:4];
  wire [7:0] sh2 = {vci[3:0], 2'b00, 2'b00};

  logic [7:0] hcs;
  crc_unit #(.L(8), .POLY(HCS_POLY)) u_hcs (
    .clk, .rst_n,
    .init (st == J_IDLE),
    .en   (st == J_HCS),
    .nbits(4'd8),
    .din  ((hc == 2'd0) ? sh0 : (hc == 2'd1) ? sh1 : sh2),
    .crc  (hcs)
  );

  // record layout
  wire [6:0] n1   = j.has_hdr ? 7'd30 : 7'd6;
  wire [6:0] nd   = {1'b0, j.data_n};
  wire [6:0] ntr  = j.has_trl ? 7'd4 : 7'd0;
  wire [6:0] fill = 7'd44 - (j.has_hdr ? 7'd24 : 7'd0) - nd - {5'd0, j.pad_n} - ntr;
  wire [6:0] n3   = {5'd0, j.pad_n} + ntr + fill + 7'd2;
  wire [6:0] e1   = 7'd4 + n1;
  wire [6:0] e2   = e1 + ((nd != 0) ? 7'd4 : 7'd0);
  wire [6:0] e3   = e2 + 7'd4;
  wire [6:0] tot  = e3 + n3;

  wire [7:0] type1 = {1'b0, 1'b0, 2'b00, j.conn, 1'b0, CB_INLINE};
  wire [7:0] type2 = {1'b0, 1'b0, 2'b00, j.conn, 1'b0, CB_MEMORY};
  wire [7:0] type3 = {1'b1, j.last, 2'b00, j.conn, 1'b0, CB_INLINE};

  logic [7:0] ob;
  always_comb begin
    logic [6:0] k;
    k  = '0;
    ob = 8'h00;
    if (b < 7'd4) begin
      case (b[1:0])
        2'd0: ob = type1;
        2'd1: ob = {1'b0, n1};
        default: ob = 8'h00;
      endcase
    end else if (b < e1) begin
      k = b - 7'd4;
      case (k)
        7'd0: ob = sh0;
        7'd1: ob = sh1;
        7'd2: ob = sh2;
        7'd3: ob = hcs;
        7'd4: ob = {j.st, j.seq, j.mid[9:8]};
        7'd5: ob = j.mid[7:0];
        default: ob = j.hdr[(24 - 1 - (int'(k) - 6)) * 8 +: 8];
      endcase
    end else if (b < e2) begin
      case (b - e1)
        7'd0: ob = type2;
        7'd1: ob = {2'b00, j.data_n};
        7'd2: ob = j.data_addr[15:8];
        default: ob = j.data_addr[7:0];
      endcase
    end else if (b < e3) begin
      case (b - e2)
        7'd0: ob = type3;
        7'd1: ob = {1'b0, n3};
        default: ob = 8'h00;
      endcase
    end else begin
      k = b - e3;   // PAD, trailer, fill, DMPDU trailer
      if (k >= {5'd0, j.pad_n} && k < {5'd0, j.pad_n} + ntr)
        ob = j.trl[(3 - int'(k - {5'd0, j.pad_n})) * 8 +: 8];
      else if (k == n3 - 7'd2)
        ob = {j.plen, 2'b00};
      else
        ob = 8'h00;
    end
  end

  assign idle     = (st == J_IDLE);
  assign out_wr   = (st == J_OUT) && !out_full;
  assign out_data = ob;
  assign seg_done = out_wr && (b == tot - 7'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= J_IDLE; j <= '0; hc <= '0; b <= '0; vci <= '0;
    end else begin
      case (st)
        J_IDLE: if (job_valid) begin
          j <= job_in; vci <= tx_vci; hc <= '0; st <= J_HCS;
        end
        J_HCS: begin
          hc <= hc + 1'b1;
          if (hc == 2'd2) st <= J_WAIT;
        end
        J_WAIT: if (turn) begin b <= '0; st <= J_OUT; end
        J_OUT: if (out_wr) begin
          b <= b + 1'b1;
          if (seg_done) st <= J_IDLE;
        end
        default: st <= J_IDLE;
      endcase
    end
  end

endmodule
