// illp: Input Low Level Processor, the read tap on the forward bus.
//
// Follows the octet stream slot by slot. At the ACF it classifies the slot:
// an empty QA slot (busy 0, slot type 0) is reported to the distributed
// queue state machine on `empty_slot`; a busy QA slot (busy 1, type 0) is
// read. The segment header octets run through a CRC-8 unit; at the HCS octet
// the ILLP checks the HCS and looks the VCI up in the node's programmed list
// (plus the all-ones default VCI of the MAC service). If both pass and an R1
// processor is ready, the next ready R1 in round-robin order is assigned
// (`assign_valid`/`assign_id`, with the ACF and header octets on `hdr`), and
// the 48 payload octets are written into that R1's packet buffer at octet
// positions 5..52 (`wr_en`, `wr_addr`, `wr_data`). The same octets are fed
// to a CRC-10 unit; the remainder over the DMPDU up to the CRC field is
// handed over with `done` after the last octet. Otherwise the segment is
// dropped and counted. All decisions follow the document; the counters and
// the drop when no R1 is ready are this design's choices.
module illp
  import dqdb_pkg::*;
#(
  parameter int N_R1 = 4,
  parameter int NVCI = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  bus_octet_t              bus_in,
  input  logic [19:0]             vci_tab   [NVCI],
  input  logic [NVCI-1:0]         vci_valid,
  input  logic [N_R1-1:0]         r1_ready,
  output logic                    empty_slot,
  output logic                    assign_valid,
  output logic [$clog2(N_R1)-1:0] assign_id,
  output logic [39:0]             hdr,
  output logic                    wr_en,
  output logic [$clog2(N_R1)-1:0] wr_id,
  output logic [5:0]              wr_addr,
  output logic [7:0]              wr_data,
  output logic                    done,
  output logic [9:0]              crc_rem,
  output logic [15:0]             n_accepted,
  output logic [15:0]             n_drop_vci,
  output logic [15:0]             n_drop_hcs,
  output logic [15:0]             n_drop_busy
);

  localparam int IW = $clog2(N_R1);

  logic [5:0]  pos;       // octet position of bus_in within its slot
  logic        in_slot;
  logic        qa_busy;
  logic [31:0] hdr_sr;
  logic [7:0]  acf_q;
  logic        accepting;
  logic [IW-1:0] cur;

  // position: sof marks 0
  wire [5:0] p = bus_in.sof ? 6'd0 : pos;

  assign empty_slot = bus_in.sof && !bus_in.d[ACF_BUSY] && !bus_in.d[ACF_TYPE];

  // CRC-8 over the first three header octets
  logic [7:0] hcs;
  crc_unit #(.L(8), .POLY(HCS_POLY)) u_hcs (
    .clk, .rst_n,
    .init (bus_in.sof),
    .en   (in_slot && qa_busy && p >= 6'd1 && p <= 6'd3),
    .nbits(4'd8),
    .din  (bus_in.d),
    .crc  (hcs)
  );

  // CRC-10 over DMPDU octets 0..45 and the top 6 bits of octet 46
  logic [9:0] crc10;
  crc_unit #(.L(10), .POLY(CRC10_POLY)) u_crc10 (
    .clk, .rst_n,
    .init (bus_in.sof),
    .en   (accepting && p >= 6'd5 && p <= 6'd51),
    .nbits((p == 6'd51) ? 4'd6 : 4'd8),
    .din  (bus_in.d),
    .crc  (crc10)
  );

  // VCI lookup on the completed header
  wire [19:0] vci = hdr_sr[23:4];
  logic vci_hit;
  always_comb begin
    vci_hit = (vci == VCI_DEFAULT);
    for (int i = 0; i < NVCI; i++)
      if (vci_valid[i] && vci_tab[i] == vci) vci_hit = 1'b1;
  end

  logic          rr_valid;
  logic [IW-1:0] rr_id;
  wire at_hcs  = in_slot && qa_busy && (p == 6'd4);
  wire hcs_ok  = (hcs == bus_in.d);
  wire take    = at_hcs && hcs_ok && vci_hit && rr_valid;

  rr_sched #(.N(N_R1)) u_rr (
    .clk, .rst_n, .ready(r1_ready), .take(take),
    .gnt_valid(rr_valid), .gnt_id(rr_id)
  );

  assign assign_valid = take;
  assign assign_id    = rr_id;
  assign hdr          = {acf_q, hdr_sr[23:0], bus_in.d};

  assign wr_en   = accepting && p >= 6'd5 && p <= 6'd52;
  assign wr_id   = cur;
  assign wr_addr = p;
  assign wr_data = bus_in.d;
  assign done    = accepting && p == 6'd52;
  assign crc_rem = crc10;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; in_slot <= 1'b0; qa_busy <= 1'b0; hdr_sr <= '0; acf_q <= '0;
      accepting <= 1'b0; cur <= '0;
      n_accepted <= '0; n_drop_vci <= '0; n_drop_hcs <= '0; n_drop_busy <= '0;
    end else begin
      pos <= (p == 6'd52) ? 6'd0 : p + 1'b1;
      if (bus_in.sof) begin
        in_slot   <= 1'b1;
        qa_busy   <= bus_in.d[ACF_BUSY] && !bus_in.d[ACF_TYPE];
        acf_q     <= bus_in.d;
        accepting <= 1'b0;
      end
      if (in_slot && p >= 6'd1 && p <= 6'd3) hdr_sr <= {hdr_sr[23:0], bus_in.d};
      if (at_hcs) begin
        if (!hcs_ok)        n_drop_hcs  <= n_drop_hcs + 1'b1;
        else if (!vci_hit)  n_drop_vci  <= n_drop_vci + 1'b1;
        else if (!rr_valid) n_drop_busy <= n_drop_busy + 1'b1;
        else begin
          n_accepted <= n_accepted + 1'b1;
          accepting  <= 1'b1;
          cur        <= rr_id;
        end
      end
      if (done) accepting <= 1'b0;
    end
  end

endmodule
