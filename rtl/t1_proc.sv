// t1_proc: transmit processor T1 (host side of the transmitter).
//
// Serves one host transmit request (MA-UNITDATA request: connection,
// destination and source address, MSDU length, QoS) at a time:
//  1. takes the next free block of the connection's buffer list and tells
//     the host its data-memory address (`hgrant_*`); waits while none is free;
//  2. after the host has copied the MSDU into the block (`host_done`), builds
//     the 24-octet IMPDU header (reserved 0, BE tag, BAsize, DA, SA, PI = 1
//     with the PAD length, QoS, CIB = 0, HEL = 0, bridging 0) and the common
//     PDU trailer (reserved 0, BE tag, Length);
//  3. segments the IMPDU (header, MSDU, 0-3 PAD octets, trailer) logically
//     into 44-octet units: for each unit it works out the segment type
//     (SSM/BOM/COM/EOM), payload length, and which header, data (address and
//     count in the data memory), PAD and trailer octets it holds, and hands
//     that description to the next idle T2 processor in round-robin order.
// The MSDU itself is never copied. BAsize and Length both carry the octet
// count from the MCP header to the end of the PAD, so the receiver's checks
// (Length = BAsize = received - 8) hold; the document's own BAsize formula
// leaves the PAD out, this design follows the IEEE 802.6 rule. The BE tag
// and the sequence number are free-running; the MID comes from `tx_mid`
// (SSMs use MID 0).
module t1_proc
  import dqdb_pkg::*;
#(
  parameter int N_T2 = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    hreq_valid,
  input  tx_req_t                 hreq,
  output logic                    hreq_ready,
  output logic                    hgrant_valid,
  output logic [15:0]             hgrant_addr,
  input  logic                    host_done,
  input  logic [9:0]              tx_mid,
  // buffer list
  output logic                    alloc,
  output logic                    alloc_conn,
  input  logic                    alloc_ok,
  input  logic [15:0]             alloc_addr,
  // T2 dispatch
  input  logic [N_T2-1:0]         t2_idle,
  output logic                    job_valid,
  output logic [$clog2(N_T2)-1:0] job_id,
  output t2_job_t                 job,
  output logic [15:0]             n_impdu
);

  typedef enum logic [1:0] {T_IDLE, T_ALLOC, T_WAITD, T_SEG} tst_e;

  tst_e        st;
  tx_req_t     q;
  logic [15:0] blk;
  logic [7:0]  betag;
  logic [3:0]  seq;
  logic [15:0] pos;

  wire [15:0] m   = {2'b00, q.nbytes};
  wire [1:0]  pad = 2'(-q.nbytes);
  wire [15:0] len = 16'd20 + m + {14'd0, pad};      // BAsize = Length
  wire [15:0] tot = len + 16'd8;                    // whole IMPDU
  wire [15:0] rem = tot - pos;
  wire        lastu = (rem <= 16'd44);

  logic [24*8-1:0] hdr;
  assign hdr = {8'h00, betag, len, q.da, q.sa, {6'd1, pad},
                {q.qos_delay, q.qos_loss, 1'b0, 3'd0}, 16'h0000};

  logic rr_valid;
  logic [$clog2(N_T2)-1:0] rr_id;
  rr_sched #(.N(N_T2)) u_rr (
    .clk, .rst_n, .ready(t2_idle), .take(st == T_SEG),
    .gnt_valid(rr_valid), .gnt_id(rr_id)
  );

  assign hreq_ready   = (st == T_IDLE);
  assign alloc        = (st == T_ALLOC);
  assign alloc_conn   = q.conn;
  assign job_valid    = (st == T_SEG) && rr_valid;
  assign job_id       = rr_id;

  always_comb begin
    logic [15:0] ds, de;
    job         = '0;
    job.st      = (tot <= 16'd44) ? ST_SSM : (pos == 0) ? ST_BOM : lastu ? ST_EOM : ST_COM;
    job.seq     = seq;
    job.mid     = (tot <= 16'd44) ? 10'd0 : tx_mid;
    job.plen    = lastu ? rem[5:0] : 6'd44;
    job.has_hdr = (pos == 0);
    job.hdr     = hdr;
    ds = (pos > 16'd24) ? pos : 16'd24;
    de = (16'd24 + m < pos + 16'd44) ? 16'd24 + m : pos + 16'd44;
    job.data_n    = (de > ds) ? 6'(de - ds) : 6'd0;
    job.data_addr = blk + ds - 16'd24;
    job.pad_n     = (16'd24 + m >= pos && 16'd24 + m < pos + 16'd44) ? pad : 2'd0;
    job.has_trl   = lastu;
    job.trl       = {8'h00, betag, len};
    job.conn      = q.conn;
    job.last      = lastu;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; q <= '0; blk <= '0; betag <= '0; seq <= '0; pos <= '0;
      hgrant_valid <= 1'b0; hgrant_addr <= '0; n_impdu <= '0;
    end else begin
      hgrant_valid <= 1'b0;
      case (st)
        T_IDLE: if (hreq_valid) begin q <= hreq; st <= T_ALLOC; end
        T_ALLOC: if (alloc_ok) begin
          blk          <= alloc_addr;
          hgrant_valid <= 1'b1;
          hgrant_addr  <= alloc_addr;
          st           <= T_WAITD;
        end
        T_WAITD: if (host_done) begin pos <= '0; st <= T_SEG; end
        T_SEG: if (rr_valid) begin
          seq <= seq + 1'b1;
          pos <= pos + 16'd44;
          if (lastu) begin
            st      <= T_IDLE;
            betag   <= betag + 1'b1;
            n_impdu <= n_impdu + 1'b1;
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end

endmodule
