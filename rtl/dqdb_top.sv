// dqdb_top: DQDB access unit built as a parallel processing architecture.
//
// Receive assembly: the ILLP reads the forward bus (bus A) and hands each
// accepted QA segment, in round-robin order, to one of N_R1 R1 processors,
// which check it in parallel and keep it in their local packet buffers. R1s
// send BOM/COM/EOM segments to the R2 reassembly processor and complete
// single-segment messages to the Host Interface Processor; R2 sends
// reassembled messages to the HIP as well. All of these writes share one bus,
// granted first come first served. The HIP's DMA moves the MSDUs from the R1
// buffers to host memory, reports each message's addresses and QOS with its
// length, and frees the buffers.
// Transmit assembly: T1 takes host requests, allocates a block of the dual
// port buffer memory from the connection's buffer list, lets the host copy
// the MSDU there, builds the IMPDU header and trailer and hands the 44-octet
// units round robin to N_T2 T2 processors. The T2s write control blocks, in
// issue order, into the OLLP FIFO. The OLLP builds each segment from the
// FIFO and the buffer memory, queues it with the DQSM, writes it by OR into
// the first empty QA slot the distributed queue allows on bus A, writes REQ
// bits on the reverse bus (bus B) and PSR bits on bus A.
// Buses are octet streams with a slot-start marker; both pass with one
// clock of delay. Layer management (MID allocation, VCI and address set-up)
// is represented by the configuration inputs. Only bus A carries data in
// this instance; a node on both buses uses two instances crossed over.
module dqdb_top
  import dqdb_pkg::*;
#(
  parameter int N_R1        = 4,
  parameter int N_T2        = 2,
  parameter int NBUF        = 54,
  parameter int CYC_PER_OP  = 4,
  parameter int NVCI        = 4,
  parameter int NREASM      = 4,
  parameter int MAXSEG      = 210,
  parameter int BWB_MOD     = 8,
  parameter int DATA_DEPTH  = 65536,
  parameter int NCELL       = 3,
  parameter int BLOCK_BYTES = 9216,
  parameter int CB_DEPTH    = 128
) (
  input  logic          clk,
  input  logic          rst_n,
  input  bus_octet_t    bus_a_in,
  output bus_octet_t    bus_a_out,
  input  bus_octet_t    bus_b_in,
  output bus_octet_t    bus_b_out,
  // configuration (from layer management)
  input  logic [63:0]   msap_addr,
  input  logic [63:0]   group_addr,
  input  logic [19:0]   vci_tab [NVCI],
  input  logic [NVCI-1:0] vci_valid,
  input  logic          psr_en,
  input  logic [19:0]   tx_vci,
  input  logic [9:0]    tx_mid,
  input  logic [1:0]    tx_prio,
  // host, transmit side
  input  logic          hreq_valid,
  input  tx_req_t       hreq,
  output logic          hreq_ready,
  output logic          hgrant_valid,
  output logic [15:0]   hgrant_addr,
  input  logic          host_done,
  input  logic          hd_we,
  input  logic [15:0]   hd_addr,
  input  logic [7:0]    hd_data,
  // host, receive side
  input  logic          host_busy,
  input  logic [31:0]   rx_base,
  output logic          hw_valid,
  output logic [31:0]   hw_addr,
  output logic [7:0]    hw_data,
  output logic          rx_done,
  output logic [31:0]   rx_addr,
  output logic [15:0]   rx_len,
  output logic [63:0]   rx_da,
  output logic [63:0]   rx_sa,
  output logic [2:0]    rx_qos,
  output stats_t        stats
);

  localparam int IW = (N_R1 > 1) ? $clog2(N_R1) : 1;
  localparam int TW = (N_T2 > 1) ? $clog2(N_T2) : 1;

  // ------------------------------------------------------------ receive side
  logic          empty_slot;
  logic          as_valid;
  logic [IW-1:0] as_id, wr_id;
  logic [39:0]   il_hdr;
  logic          il_wr, il_done;
  logic [5:0]    il_addr;
  logic [7:0]    il_data;
  logic [9:0]    il_crc;
  logic [N_R1-1:0] r1_ready;

  illp #(.N_R1(N_R1), .NVCI(NVCI)) u_illp (
    .clk, .rst_n, .bus_in(bus_a_in), .vci_tab, .vci_valid, .r1_ready,
    .empty_slot, .assign_valid(as_valid), .assign_id(as_id), .hdr(il_hdr),
    .wr_en(il_wr), .wr_id, .wr_addr(il_addr), .wr_data(il_data),
    .done(il_done), .crc_rem(il_crc),
    .n_accepted(stats.rx_accepted), .n_drop_vci(stats.rx_drop_vci),
    .n_drop_hcs(stats.rx_drop_hcs), .n_drop_busy(stats.rx_drop_busy)
  );

  logic [NREASM-1:0] act_valid, act_indiv;
  logic [19:0]       act_vci [NREASM];
  logic [9:0]        act_mid [NREASM];

  logic [N_R1:0]     sreq, sgnt;
  logic [$clog2(N_R1+1)-1:0] sgnt_id;
  logic [N_R1-1:0]   r1_to_hip, r1_psr;
  r2_msg_t           r1_r2msg  [N_R1];
  hip_req_t          r1_hipmsg [N_R1];
  logic [7:0]        dma_data  [N_R1];
  logic [15:0]       d_crc [N_R1], d_addr [N_R1], d_ssm [N_R1];

  logic              free_valid;
  logic [PROC_W-1:0] free_proc;
  logic [BUF_W-1:0]  free_buf, dma_buf;
  logic [5:0]        dma_addr;

  for (genvar g = 0; g < N_R1; g++) begin : g_r1
    r1_proc #(.NBUF(NBUF), .CYC_PER_OP(CYC_PER_OP), .NVCI(NVCI), .NREASM(NREASM),
              .PROC_ID(g)) u_r1 (
      .clk, .rst_n,
      .assign_valid(as_valid && as_id == IW'(g)), .hdr(il_hdr),
      .wr_en(il_wr && wr_id == IW'(g)), .wr_addr(il_addr), .wr_data(il_data),
      .done(il_done && wr_id == IW'(g)), .crc_rem(il_crc), .ready(r1_ready[g]),
      .msap_addr, .group_addr, .vci_tab, .vci_valid, .psr_en,
      .act_valid, .act_vci, .act_mid, .act_indiv,
      .sbus_req(sreq[g]), .sbus_gnt(sgnt[g]), .to_hip(r1_to_hip[g]),
      .r2_msg(r1_r2msg[g]), .hip_msg(r1_hipmsg[g]), .psr(r1_psr[g]),
      .free_valid(free_valid && free_proc == PROC_W'(g)), .free_buf,
      .dma_buf, .dma_addr, .dma_data(dma_data[g]),
      .n_drop_crc(d_crc[g]), .n_drop_addr(d_addr[g]), .n_drop_ssm(d_ssm[g]), .n_free()
    );
  end

  always_comb begin
    stats.rx_drop_crc = '0; stats.rx_drop_addr = '0; stats.rx_drop_ssm = '0;
    for (int i = 0; i < N_R1; i++) begin
      stats.rx_drop_crc  += d_crc[i];
      stats.rx_drop_addr += d_addr[i];
      stats.rx_drop_ssm  += d_ssm[i];
    end
  end

  // shared bus: R1s and R2, first come first served
  logic r2_full, hip_full;
  fcfs_arbiter #(.N(N_R1 + 1)) u_sbus (
    .clk, .rst_n, .req(sreq), .gnt_en(!r2_full && !hip_full), .gnt(sgnt), .gnt_id(sgnt_id)
  );

  hip_req_t r2_hipmsg;
  logic     r2_wr, hip_wr;
  r2_msg_t  r2_in;
  hip_req_t hip_in;
  always_comb begin
    r2_wr  = 1'b0;
    hip_wr = 1'b0;
    r2_in  = r1_r2msg[0];
    hip_in = r2_hipmsg;
    for (int i = 0; i < N_R1; i++)
      if (sgnt[i]) begin
        r2_in  = r1_r2msg[i];
        hip_in = r1_hipmsg[i];
        if (r1_to_hip[i]) hip_wr = 1'b1;
        else              r2_wr  = 1'b1;
      end
    if (sgnt[N_R1]) hip_wr = 1'b1;
  end

  logic [RID_W-1:0]  sl_rid, rel_rid;
  logic [SEG_W-1:0]  sl_idx;
  logic [PROC_W-1:0] sl_proc;
  logic [BUF_W-1:0]  sl_buf;
  logic              rel_valid;

  r2_proc #(.NREASM(NREASM), .MAXSEG(MAXSEG)) u_r2 (
    .clk, .rst_n, .msg_wr(r2_wr), .msg_in(r2_in), .msg_full(r2_full),
    .act_valid, .act_vci, .act_mid, .act_indiv,
    .sbus_req(sreq[N_R1]), .sbus_gnt(sgnt[N_R1]), .hip_msg(r2_hipmsg),
    .sl_rid, .sl_idx, .sl_proc, .sl_buf, .rel_valid, .rel_rid,
    .n_done(stats.reasm_done), .n_fail(stats.reasm_fail)
  );

  hip_dma #(.N_R1(N_R1)) u_hip (
    .clk, .rst_n, .req_wr(hip_wr), .req_in(hip_in), .req_full(hip_full),
    .free_valid, .free_proc, .free_buf, .dma_buf, .dma_addr, .dma_data,
    .sl_rid, .sl_idx, .sl_proc, .sl_buf, .rel_valid, .rel_rid,
    .host_busy, .rx_base, .hw_valid, .hw_addr, .hw_data, .rx_done, .rx_addr, .rx_len,
    .rx_da, .rx_sa, .rx_qos,
    .n_stall(stats.dma_stall)
  );

  // ----------------------------------------------------------- transmit side
  logic        alloc, alloc_conn, alloc_ok;
  logic [15:0] alloc_addr;
  logic        rel_blk, rel_conn;

  buffer_list #(.NCONN(2), .NCELL(NCELL), .BLOCK_BYTES(BLOCK_BYTES)) u_blist (
    .clk, .rst_n, .alloc, .alloc_conn, .alloc_ok, .alloc_addr,
    .release_blk(rel_blk), .rel_conn, .busy_cnt(), .n_blocked(stats.tx_blocked)
  );

  logic [N_T2-1:0] t2_idle, t2_wr, t2_done;
  logic [7:0]      t2_data [N_T2];
  logic            job_valid;
  logic [TW-1:0]   job_id, turn_id;
  t2_job_t         job;
  logic            ord_empty, cb_full;

  t1_proc #(.N_T2(N_T2)) u_t1 (
    .clk, .rst_n, .hreq_valid, .hreq, .hreq_ready, .hgrant_valid, .hgrant_addr,
    .host_done, .tx_mid, .alloc, .alloc_conn, .alloc_ok, .alloc_addr,
    .t2_idle, .job_valid, .job_id, .job, .n_impdu(stats.tx_impdu)
  );

  // order in which the T2s may write the OLLP FIFO: the order T1 issued them
  sync_fifo #(.T(logic [TW-1:0]), .DEPTH(2 * N_T2)) u_order (
    .clk, .rst_n, .wr(job_valid), .wdata(job_id), .rd(|t2_done), .rdata(turn_id),
    .empty(ord_empty), .full(), .count()
  );

  for (genvar g = 0; g < N_T2; g++) begin : g_t2
    t2_proc u_t2 (
      .clk, .rst_n, .job_valid(job_valid && job_id == TW'(g)), .job_in(job),
      .idle(t2_idle[g]), .tx_vci, .turn(!ord_empty && turn_id == TW'(g)),
      .out_full(cb_full), .out_wr(t2_wr[g]), .out_data(t2_data[g]), .seg_done(t2_done[g])
    );
  end

  logic [7:0] cb_wdata;
  always_comb begin
    cb_wdata = t2_data[0];
    for (int i = 0; i < N_T2; i++) if (t2_wr[i]) cb_wdata = t2_data[i];
  end

  logic       cb_empty, cb_rd;
  logic [7:0] cb_data;
  sync_fifo #(.T(logic [7:0]), .DEPTH(CB_DEPTH)) u_cbfifo (
    .clk, .rst_n, .wr(|t2_wr), .wdata(cb_wdata), .rd(cb_rd), .rdata(cb_data),
    .empty(cb_empty), .full(cb_full), .count()
  );

  logic        ser_load, ser_rd;
  logic [15:0] ser_addr;
  logic [7:0]  ser_data;
  buffer_mem #(.DEPTH(DATA_DEPTH)) u_bmem (
    .clk, .rst_n, .ra_we(hd_we), .ra_addr(hd_addr), .ra_wdata(hd_data), .ra_rdata(),
    .ser_load, .ser_addr, .ser_rd, .ser_data
  );

  logic       q_req, tx_grant;
  logic [1:0] q_prio;
  logic [2:0] req_want, req_sent, req_seen;
  logic [13:0] rq [3], cd [3];
  logic [13:0] bwb;

  dqsm #(.NPRIO(3), .CNT_W(14), .BWB_MOD(BWB_MOD)) u_dqsm (
    .clk, .rst_n, .empty_slot, .req_seen, .q_req, .q_prio, .queued(), .tx_grant,
    .req_want, .req_sent, .rq, .cd, .bwb_skips(bwb)
  );
  assign stats.bwb_skips = {2'b00, bwb};

  ollp #(.NPRIO(3)) u_ollp (
    .clk, .rst_n, .cb_empty, .cb_data, .cb_rd, .ser_load, .ser_addr, .ser_rd, .ser_data,
    .tx_prio, .q_req, .q_prio, .tx_grant, .req_want, .req_sent, .req_seen,
    .bus_a_in, .bus_a_out, .bus_b_in, .bus_b_out, .psr_req(|r1_psr),
    .release_blk(rel_blk), .rel_conn, .n_tx(stats.tx_segments), .n_psr(stats.tx_psr)
  );

endmodule
