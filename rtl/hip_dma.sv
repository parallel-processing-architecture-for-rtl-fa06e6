// hip_dma: Host Interface Processor with its HIP_FIFO and DMA process.
//
// Requests from the R1 processors (single-segment messages) and from R2
// (reassembled messages, or discards) are queued in the HIP_FIFO and served
// first come first served. For a copy request the DMA walks the message's
// segments in order (the segment list is read from R2, or is the one buffer
// named in the request), reads the segmentation-unit octets straight out of
// the R1 packet buffers and writes the MSDU octets [off, off+len) to host
// memory, one octet per clock, starting at `rx_base` plus the octets already
// delivered. It steals only idle host-bus cycles: while `host_busy` is high
// it waits. Each segment's buffer is freed (`free_valid`) once passed; at the
// end `rx_done` gives the host address and length, and R2's process is
// released. The IMPDU header octets are read on the way to the MSDU; the
// destination and source addresses and the QOS delay field are captured
// from them and reported with `rx_done` as the parameters of the data
// indication to the host (`rx_da`, `rx_sa`, `rx_qos`). A discard request
// only frees the buffers. The octet-wide host
// port and the consecutive placement in host memory are this design's
// choices; the document gives the request contents (host address, byte count,
// where the segments are) but not the host bus.
module hip_dma
  import dqdb_pkg::*;
#(
  parameter int N_R1       = 4,
  parameter int FIFO_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_wr,
  input  hip_req_t          req_in,
  output logic              req_full,
  // to the R1 processors
  output logic              free_valid,
  output logic [PROC_W-1:0] free_proc,
  output logic [BUF_W-1:0]  free_buf,
  output logic [BUF_W-1:0]  dma_buf,
  output logic [5:0]        dma_addr,
  input  logic [7:0]        dma_data [N_R1],
  // to R2
  output logic [RID_W-1:0]  sl_rid,
  output logic [SEG_W-1:0]  sl_idx,
  input  logic [PROC_W-1:0] sl_proc,
  input  logic [BUF_W-1:0]  sl_buf,
  output logic              rel_valid,
  output logic [RID_W-1:0]  rel_rid,
  // host bus
  input  logic              host_busy,
  input  logic [31:0]       rx_base,
  output logic              hw_valid,
  output logic [31:0]       hw_addr,
  output logic [7:0]        hw_data,
  output logic              rx_done,
  output logic [31:0]       rx_addr,
  output logic [15:0]       rx_len,
  output logic [63:0]       rx_da,
  output logic [63:0]       rx_sa,
  output logic [2:0]        rx_qos,
  output logic [15:0]       n_stall
);

  typedef enum logic [1:0] {H_IDLE, H_COPY, H_FREE, H_FIN} hst_e;

  hst_e        st;
  hip_req_t    r, head;
  logic        empty;
  logic [SEG_W-1:0] s;
  logic [5:0]  u;
  logic [15:0] p;
  logic [31:0] rx_ptr;
  logic [63:0] da_sh, sa_sh;
  logic [2:0]  qos_q;

  sync_fifo #(.T(hip_req_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr(req_wr), .wdata(req_in), .rd(st == H_IDLE && !empty),
    .rdata(head), .empty(empty), .full(req_full), .count()
  );

  wire [PROC_W-1:0] cur_proc = r.single ? r.proc    : sl_proc;
  wire [BUF_W-1:0]  cur_buf  = r.single ? r.buf_idx : sl_buf;
  wire [15:0]       p_end    = r.off + r.len;
  wire              last_seg = (s == r.nseg - 1'b1);
  wire              in_msdu  = (p >= r.off);
  wire              stall    = (st == H_COPY) && in_msdu && host_busy;
  wire              msdu_end = (p + 1'b1 == p_end);

  assign sl_rid   = r.rid;
  assign sl_idx   = s;
  assign dma_buf  = cur_buf;
  assign dma_addr = 6'd7 + u;

  assign hw_valid = (st == H_COPY) && in_msdu && !host_busy;
  assign hw_addr  = rx_base + rx_ptr + 32'(p - r.off);
  assign hw_data  = dma_data[cur_proc[$clog2(N_R1)-1:0]];

  always_comb begin
    free_valid = 1'b0;
    if (st == H_FREE) free_valid = 1'b1;
    if (st == H_COPY && !stall && (msdu_end || u == 6'd43)) free_valid = 1'b1;
  end
  assign free_proc = cur_proc;
  assign free_buf  = cur_buf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= H_IDLE; r <= '0; s <= '0; u <= '0; p <= '0; rx_ptr <= '0;
      rel_valid <= 1'b0; rel_rid <= '0; rx_done <= 1'b0; rx_addr <= '0; rx_len <= '0;
      n_stall <= '0; da_sh <= '0; sa_sh <= '0; qos_q <= '0;
      rx_da <= '0; rx_sa <= '0; rx_qos <= '0;
    end else begin
      rel_valid <= 1'b0;
      rx_done   <= 1'b0;
      if (stall) n_stall <= n_stall + 1'b1;
      case (st)
        H_IDLE: if (!empty) begin
          r <= head; s <= '0; u <= '0; p <= '0;
          st <= (head.discard || head.len == 0) ? H_FREE : H_COPY;
        end
        H_COPY: if (!stall) begin
          // IMPDU header: DA in octets 4..11, SA in 12..19, QOS in 21
          if (s == '0 && p >= 16'd4  && p < 16'd12) da_sh <= {da_sh[55:0], hw_data};
          if (s == '0 && p >= 16'd12 && p < 16'd20) sa_sh <= {sa_sh[55:0], hw_data};
          if (s == '0 && p == 16'd21) qos_q <= hw_data[7:5];
          if (msdu_end) begin
            s  <= s + 1'b1;
            st <= last_seg ? H_FIN : H_FREE;
          end else if (u == 6'd43) begin
            s <= s + 1'b1; u <= '0; p <= p + 1'b1;
            if (last_seg) st <= H_FIN;
          end else begin
            u <= u + 1'b1; p <= p + 1'b1;
          end
        end
        H_FREE: begin
          s <= s + 1'b1;
          if (last_seg) st <= H_FIN;
        end
        H_FIN: begin
          st        <= H_IDLE;
          rel_valid <= !r.single;
          rel_rid   <= r.rid;
          if (!r.discard) begin
            rx_done <= 1'b1;
            rx_addr <= rx_base + rx_ptr;
            rx_len  <= r.len;
            rx_da   <= da_sh;
            rx_sa   <= sa_sh;
            rx_qos  <= qos_q;
            rx_ptr  <= rx_ptr + 32'(r.len);
          end
        end
        default: st <= H_IDLE;
      endcase
    end
  end

endmodule
