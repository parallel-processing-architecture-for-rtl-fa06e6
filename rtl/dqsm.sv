// dqsm: Distributed Queue State Machine for one transmit bus.
//
// Keeps, for every priority level I, a request counter RQ_I and a countdown
// counter CD_I. While the node has no segment queued at level I, RQ_I counts
// up for each level-I REQ bit seen on the reverse bus and down for each empty
// QA slot (busy and slot-type bits both 0) seen on the transmit bus. When a
// segment is queued at level I (`q_req`), RQ_I moves into CD_I, RQ_I clears
// and one REQ at level I is scheduled for the reverse bus (`req_want`, cleared
// by `req_sent` when the OLLP has written it). While queued, CD_I counts up
// for each REQ of a higher level and down for each empty slot; new level-I
// REQs go on accumulating in RQ_I. With CD_I at zero the next empty slot is
// taken: `tx_grant` is raised in the same clock as `empty_slot`.
// Bandwidth balancing: after every BWB_MOD own transmissions at level I, RQ_I
// is incremented once, so that one empty slot is left for downstream nodes
// (0 disables it). The counter rules follow the document; the balancing rule
// and its default of 8 follow IEEE 802.6, as the document gives no value.
// One segment is queued at a time.
module dqsm #(
  parameter int NPRIO   = 3,
  parameter int CNT_W   = 14,
  parameter int BWB_MOD = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     empty_slot,   // empty QA slot at the read tap of the transmit bus
  input  logic [NPRIO-1:0]         req_seen,     // REQ bits in the ACF passing on the reverse bus
  input  logic                     q_req,        // queue one segment
  input  logic [$clog2(NPRIO)-1:0] q_prio,
  output logic                     queued,
  output logic                     tx_grant,     // use the empty slot seen this clock
  output logic [NPRIO-1:0]         req_want,
  input  logic [NPRIO-1:0]         req_sent,
  output logic [CNT_W-1:0]         rq [NPRIO],
  output logic [CNT_W-1:0]         cd [NPRIO],
  output logic [CNT_W-1:0]         bwb_skips
);

  localparam int PW = $clog2(NPRIO);
  localparam int BW = (BWB_MOD > 1) ? $clog2(BWB_MOD + 1) : 1;

  logic [PW-1:0] qp;
  logic [3:0]    pend [NPRIO];
  logic [BW-1:0] bwb_cnt;

  assign tx_grant = queued && empty_slot && (cd[qp] == '0);

  always_comb
    for (int i = 0; i < NPRIO; i++) req_want[i] = (pend[i] != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      queued    <= 1'b0;
      qp        <= '0;
      bwb_cnt   <= '0;
      bwb_skips <= '0;
      for (int i = 0; i < NPRIO; i++) begin
        rq[i] <= '0; cd[i] <= '0; pend[i] <= '0;
      end
    end else begin
      logic bwb_hit;
      bwb_hit = 1'b0;
      if (tx_grant && BWB_MOD > 0) begin
        if (int'(bwb_cnt) >= BWB_MOD - 1) begin
          bwb_cnt <= '0;
          bwb_hit = 1'b1;
          bwb_skips <= bwb_skips + 1'b1;
        end else begin
          bwb_cnt <= bwb_cnt + 1'b1;
        end
      end

      for (int i = 0; i < NPRIO; i++) begin
        logic [CNT_W-1:0] r, c;
        logic             higher;
        r = rq[i];
        c = cd[i];
        higher = 1'b0;
        for (int j = i + 1; j < NPRIO; j++) higher |= req_seen[j];

        if (queued && PW'(i) == qp) begin
          // queued at this level
          if (req_seen[i] && r != '1) r = r + 1'b1;
          if (higher && c != '1)      c = c + 1'b1;
          if (empty_slot && c != '0)  c = c - 1'b1;
          if (tx_grant && bwb_hit && r != '1) r = r + 1'b1;
        end else begin
          if (req_seen[i] && r != '1) r = r + 1'b1;
          if (empty_slot && r != '0)  r = r - 1'b1;
        end

        if (q_req && !queued && PW'(i) == q_prio) begin
          c = r;
          r = '0;
        end
        rq[i] <= r;
        cd[i] <= c;

        if (q_req && !queued && PW'(i) == q_prio) begin
          if (!req_sent[i]) pend[i] <= pend[i] + 1'b1;
        end else if (req_sent[i] && pend[i] != 0) begin
          pend[i] <= pend[i] - 1'b1;
        end
      end

      if (q_req && !queued) begin
        queued <= 1'b1;
        qp     <= q_prio;
      end else if (tx_grant) begin
        queued <= 1'b0;
      end
    end
  end

endmodule
