// r2_proc: reassembly processor (R2).
//
// Takes reassembly requests from the R1 processors out of its FIFO and keeps
// up to NREASM reassembly processes, one per MID/VCI pair. A BOM opens a
// process and keeps the IMPDU header fields of its unit (BE tag, BAsize, PAD
// length, HEL, CIB, individual/group destination); each COM/EOM with the
// expected sequence number is appended to the process's segment list (which
// R1 buffer holds it). At the EOM the process is validated as the document
// describes: the Length of the common PDU trailer must equal the octets
// received minus the 8 octets of common header and trailer, and must equal
// BAsize, and the two BE tags must match. The MSDU position (after the 24
// header octets and the header extension) and length (Length minus the MCP
// header, header extension, PAD and optional CRC-32) are then queued to the
// HIP as a copy request; a failed process, a wrong sequence number or an
// unexpected segment is queued as a discard request, which frees the
// buffers. The optional CRC-32 is not checked. The active MID/VCI pairs are
// fed back to the R1 processors (`act_*`). After EOM the process no longer
// matches, but its segment list is kept until the HIP `rel_valid`s it.
// HIP requests go over the shared bus (`sbus_req` held until `sbus_gnt`).
module r2_proc
  import dqdb_pkg::*;
#(
  parameter int NREASM     = 4,
  parameter int MAXSEG     = 210,
  parameter int FIFO_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               msg_wr,
  input  r2_msg_t            msg_in,
  output logic               msg_full,
  output logic [NREASM-1:0]  act_valid,
  output logic [19:0]        act_vci   [NREASM],
  output logic [9:0]         act_mid   [NREASM],
  output logic [NREASM-1:0]  act_indiv,
  output logic               sbus_req,
  input  logic               sbus_gnt,
  output hip_req_t           hip_msg,
  input  logic [RID_W-1:0]   sl_rid,
  input  logic [SEG_W-1:0]   sl_idx,
  output logic [PROC_W-1:0]  sl_proc,
  output logic [BUF_W-1:0]   sl_buf,
  input  logic               rel_valid,
  input  logic [RID_W-1:0]   rel_rid,
  output logic [15:0]        n_done,
  output logic [15:0]        n_fail
);

  typedef enum logic [1:0] {E_FREE, E_ACTIVE, E_DRAIN} est_e;

  est_e        est    [NREASM];
  logic [3:0]  nseq   [NREASM];
  logic [7:0]  betag  [NREASM];
  logic [15:0] basize [NREASM];
  logic [1:0]  pl     [NREASM];
  logic [2:0]  hel    [NREASM];
  logic        cib    [NREASM];
  logic [15:0] octets [NREASM];
  logic [SEG_W-1:0] nseg [NREASM];
  logic [PROC_W+BUF_W-1:0] sl [NREASM][MAXSEG];

  r2_msg_t m;
  logic    empty;
  logic    pop;
  logic    sending;

  sync_fifo #(.T(r2_msg_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr(msg_wr), .wdata(msg_in), .rd(pop), .rdata(m),
    .empty(empty), .full(msg_full), .count()
  );

  always_comb
    for (int i = 0; i < NREASM; i++) act_valid[i] = (est[i] == E_ACTIVE);

  assign sbus_req = sending;
  assign {sl_proc, sl_buf} = sl[sl_rid][sl_idx];

  // lookup of the head message
  logic             hit, has_free;
  logic [RID_W-1:0] hit_id, free_id;
  always_comb begin
    hit = 1'b0; hit_id = '0; has_free = 1'b0; free_id = '0;
    for (int i = NREASM - 1; i >= 0; i--) begin
      if (est[i] == E_ACTIVE && act_vci[i] == m.vci && act_mid[i] == m.mid) begin
        hit = 1'b1; hit_id = RID_W'(i);
      end
      if (est[i] == E_FREE) begin has_free = 1'b1; free_id = RID_W'(i); end
    end
  end

  wire [7:0]  u1 = unit_octet(m.unit, 1);
  wire [15:0] u23 = {unit_octet(m.unit, 2), unit_octet(m.unit, 3)};
  logic [7:0]  t_be;
  logic [15:0] t_len;
  always_comb begin
    t_be = '0; t_len = '0;
    for (int i = 0; i < UNIT_OCTETS; i++) begin
      if (i == int'(m.plen) - 3) t_be = unit_octet(m.unit, i);
      if (i == int'(m.plen) - 2) t_len[15:8] = unit_octet(m.unit, i);
      if (i == int'(m.plen) - 1) t_len[7:0] = unit_octet(m.unit, i);
    end
  end

  always_ff @(posedge clk) begin
    if (!empty && !sending) begin
      if (m.st == ST_BOM && !hit && has_free)
        sl[free_id][0] <= {m.proc, m.buf_idx};
      else if ((m.st == ST_COM || m.st == ST_EOM) && hit)
        sl[hit_id][nseg[hit_id]] <= {m.proc, m.buf_idx};
    end
  end

  always_comb begin
    pop = 1'b0;
    if (!empty && !sending) pop = !(m.st == ST_BOM && hit);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending <= 1'b0; hip_msg <= '0; n_done <= '0; n_fail <= '0;
      for (int i = 0; i < NREASM; i++) begin
        est[i] <= E_FREE; act_vci[i] <= '0; act_mid[i] <= '0; act_indiv[i] <= 1'b0;
        nseq[i] <= '0; betag[i] <= '0; basize[i] <= '0; pl[i] <= '0; hel[i] <= '0;
        cib[i] <= 1'b0; octets[i] <= '0; nseg[i] <= '0;
      end
    end else begin
      if (sending && sbus_gnt) sending <= 1'b0;
      if (rel_valid) est[rel_rid] <= E_FREE;

      if (!empty && !sending) begin
        hip_req_t h;
        h = '0;
        h.discard = 1'b1;
        h.single  = 1'b1;
        h.proc    = m.proc;
        h.buf_idx = m.buf_idx;
        h.nseg    = SEG_W'(1);
        case (m.st)
          ST_BOM: begin
            if (hit) begin
              // a new message on a pair still being reassembled: drop the old one
              h.single = 1'b0; h.rid = hit_id; h.nseg = nseg[hit_id];
              est[hit_id] <= E_DRAIN;
              n_fail  <= n_fail + 1'b1;
              sending <= 1'b1;
            end else if (has_free) begin
              est[free_id]       <= E_ACTIVE;
              act_vci[free_id]   <= m.vci;
              act_mid[free_id]   <= m.mid;
              act_indiv[free_id] <= m.indiv;
              nseq[free_id]      <= m.seq + 1'b1;
              betag[free_id]     <= u1;
              basize[free_id]    <= u23;
              pl[free_id]        <= unit_octet(m.unit, 20)[1:0];
              hel[free_id]       <= unit_octet(m.unit, 21)[2:0];
              cib[free_id]       <= unit_octet(m.unit, 21)[3];
              octets[free_id]    <= 16'(m.plen);
              nseg[free_id]      <= SEG_W'(1);
            end else begin
              n_fail  <= n_fail + 1'b1;
              sending <= 1'b1;
            end
          end
          ST_COM, ST_EOM: begin
            if (hit) begin
              logic [15:0]      oct;
              logic [SEG_W-1:0] ns;
              logic             seq_ok, last;
              oct    = octets[hit_id] + 16'(m.plen);
              ns     = nseg[hit_id] + 1'b1;
              seq_ok = (m.seq == nseq[hit_id]);
              last   = (m.st == ST_EOM) || !seq_ok || (int'(ns) >= MAXSEG);
              nseg[hit_id]   <= ns;
              octets[hit_id] <= oct;
              nseq[hit_id]   <= nseq[hit_id] + 1'b1;
              h.single = 1'b0; h.rid = hit_id; h.nseg = ns;
              if (last) begin
                est[hit_id] <= E_DRAIN;
                sending     <= 1'b1;
                if (m.st == ST_EOM && seq_ok && t_be == betag[hit_id] &&
                    t_len == basize[hit_id] && t_len == oct - 16'd8) begin
                  h.discard = 1'b0;
                  h.off = 16'd24 + {11'd0, hel[hit_id], 2'b00};
                  h.len = t_len - 16'd20 - {11'd0, hel[hit_id], 2'b00} - {14'd0, pl[hit_id]}
                          - {13'd0, cib[hit_id], 2'b00};
                  n_done <= n_done + 1'b1;
                end else begin
                  n_fail <= n_fail + 1'b1;
                end
              end
            end else begin
              n_fail  <= n_fail + 1'b1;
              sending <= 1'b1;
            end
          end
          default: begin
            n_fail  <= n_fail + 1'b1;
            sending <= 1'b1;
          end
        endcase
        hip_msg <= h;
      end
    end
  end

endmodule
