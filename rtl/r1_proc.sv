// r1_proc: receive packet processor (R1) with its local packet buffers.
//
// The ILLP writes each accepted slot (ACF, segment header and the 48-octet
// DMPDU) into one of NBUF packet buffers of 56 octets and raises `done` with
// the CRC-10 remainder it computed; that sets the packet flip-flop. The
// processor then runs the document's state diagram:
//   I   wait; `ready` to the ILLP while no packet is assigned
//   II  read the packet (14 words), the CRC remainder and the PSR setting
//   III compare the remainder with the DMPDU's CRC field; mismatch -> drop
//   IV  decode the segment type; compare MID, VCI and (BOM/SSM) the MCP
//       destination address; COM/EOM need a matching active reassembly
//   V   COM/EOM: request reassembly from R2 (reassembly request message)
//   VI  BOM: write the whole unit to R2
//   VII SSM: check payload length, BE tags, length fields and HEL, then
//       queue a HIP request that moves the MSDU to the host
// Each state lasts the number of operations Table 1 gives for it, times
// CYC_PER_OP clocks, so the five paths take 19, 28, 32, 39 and 37 operations.
// CYC_PER_OP = 4 is derived from the document's figures (an operation of about
// 210 ns against 51 ns per octet of the line). Messages to R2 and the HIP go
// over the shared bus: `sbus_req` is held until `sbus_gnt`, and the message
// is taken in the grant clock. A packet stays in its buffer until the HIP
// frees it (`free_valid`) after the DMA; dropped packets are freed at once.
// `psr` pulses when a segment for an individual address was accepted and
// `psr_en` (previous-segment-received service) is on. Messages are written as
// one wide transfer, and the group-address and MID=0 rules are this design's
// reading of the document.
module r1_proc
  import dqdb_pkg::*;
#(
  parameter int NBUF       = 54,
  parameter int CYC_PER_OP = 4,
  parameter int NVCI       = 4,
  parameter int NREASM     = 4,
  parameter int PROC_ID    = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  // from the ILLP
  input  logic               assign_valid,
  input  logic [39:0]        hdr,
  input  logic               wr_en,
  input  logic [5:0]         wr_addr,
  input  logic [7:0]         wr_data,
  input  logic               done,
  input  logic [9:0]         crc_rem,
  output logic               ready,
  // node configuration
  input  logic [63:0]        msap_addr,
  input  logic [63:0]        group_addr,
  input  logic [19:0]        vci_tab   [NVCI],
  input  logic [NVCI-1:0]    vci_valid,
  input  logic               psr_en,
  // active reassembly processes, from R2
  input  logic [NREASM-1:0]  act_valid,
  input  logic [19:0]        act_vci   [NREASM],
  input  logic [9:0]         act_mid   [NREASM],
  input  logic [NREASM-1:0]  act_indiv,
  // shared bus
  output logic               sbus_req,
  input  logic               sbus_gnt,
  output logic               to_hip,
  output r2_msg_t            r2_msg,
  output hip_req_t           hip_msg,
  output logic               psr,
  // buffer release and DMA read port
  input  logic               free_valid,
  input  logic [BUF_W-1:0]   free_buf,
  input  logic [BUF_W-1:0]   dma_buf,
  input  logic [5:0]         dma_addr,
  output logic [7:0]         dma_data,
  output logic [15:0]        n_drop_crc,
  output logic [15:0]        n_drop_addr,
  output logic [15:0]        n_drop_ssm,
  output logic [BUF_W:0]     n_free
);

  typedef enum logic [2:0] {S_I, S_II, S_III, S_IV, S_V, S_VI, S_VII, S_BUS} state_e;

  function automatic int ops(state_e s);
    case (s)
      S_I:     return 1;
      S_II:    return 16;
      S_III:   return 2;
      S_IV:    return 9;
      S_V:     return 4;
      S_VI:    return 11;
      S_VII:   return 9;
      default: return 1;
    endcase
  endfunction

  localparam int SUB_W = (CYC_PER_OP > 1) ? $clog2(CYC_PER_OP) : 1;

  logic [7:0]       mem [NBUF][56];
  logic [9:0]       crc_mem [NBUF];
  logic [NBUF-1:0]  busy_buf;
  logic [BUF_W-1:0] wbuf;     // buffer being filled by the ILLP
  logic [BUF_W-1:0] pbuf;     // buffer being processed
  logic             assigned, pkt_ff, psr_ff, indiv_q;
  state_e           state;
  logic [4:0]       op;
  logic [SUB_W-1:0] sub;
  logic [7:0]       pk [56];
  logic [9:0]       rem_q;

  // lowest free buffer
  logic             any_free;
  logic [BUF_W-1:0] first_free;
  always_comb begin
    any_free   = 1'b0;
    first_free = '0;
    for (int i = NBUF - 1; i >= 0; i--)
      if (!busy_buf[i]) begin any_free = 1'b1; first_free = BUF_W'(i); end
  end

  always_comb begin
    n_free = '0;
    for (int i = 0; i < NBUF; i++) n_free += {{BUF_W{1'b0}}, !busy_buf[i]};
  end

  assign ready = (state == S_I) && !assigned && !pkt_ff && any_free;

  wire sub_end = (int'(sub) == CYC_PER_OP - 1);
  wire st_end  = sub_end && (int'(op) == ops(state) - 1);

  // ---- decoded fields of the packet registers
  wire seg_type_e  st    = seg_type_e'(pk[5][7:6]);
  wire [3:0]       seq   = pk[5][5:2];
  wire [9:0]       mid   = {pk[5][1:0], pk[6]};
  wire [19:0]      vci   = {pk[1], pk[2], pk[3][7:4]};
  wire [5:0]       plen  = pk[51][7:2];
  wire [9:0]       crc_f = {pk[51][1:0], pk[52]};
  function automatic logic [7:0] u(input int i);
    return pk[7 + i];
  endfunction
  wire [63:0] da = {u(4), u(5), u(6), u(7), u(8), u(9), u(10), u(11)};
  wire da_group  = (da[63:60] == ADDR_GROUP);
  wire da_ok     = (da == msap_addr) || (da_group && (da == group_addr || da[59:0] == '1));

  logic vci_ok;
  always_comb begin
    vci_ok = (vci == VCI_DEFAULT);
    for (int i = 0; i < NVCI; i++) if (vci_valid[i] && vci_tab[i] == vci) vci_ok = 1'b1;
  end

  logic act_hit, act_ind;
  always_comb begin
    act_hit = 1'b0; act_ind = 1'b0;
    for (int i = 0; i < NREASM; i++)
      if (act_valid[i] && act_vci[i] == vci && act_mid[i] == mid) begin
        act_hit = 1'b1; act_ind = act_indiv[i];
      end
  end

  logic addr_ok;
  always_comb begin
    case (st)
      ST_BOM:  addr_ok = vci_ok && (mid != 0) && da_ok;
      ST_SSM:  addr_ok = vci_ok && (mid == 0) && da_ok;
      default: addr_ok = vci_ok && act_hit;
    endcase
  end

  // SSM validation (state VII)
  logic [7:0]  t_be;
  logic [15:0] t_len;
  always_comb begin
    t_be  = '0; t_len = '0;
    for (int i = 0; i < UNIT_OCTETS; i++) begin
      if (i == int'(plen) - 3) t_be = u(i);
      if (i == int'(plen) - 2) t_len[15:8] = u(i);
      if (i == int'(plen) - 1) t_len[7:0] = u(i);
    end
  end
  wire [15:0] basize = {u(2), u(3)};
  wire [2:0]  hel    = u(21)[2:0];
  wire        cib    = u(21)[3];
  wire [1:0]  pl     = u(20)[1:0];
  wire ssm_ok = (plen >= 6'd28) && (plen <= 6'd44) && (plen[1:0] == 2'b00) &&
                (t_be == u(1)) && (t_len == basize) && (t_len == 16'(plen) - 16'd8) &&
                (hel <= 3'd5);
  wire [15:0] msdu_off = 16'd24 + {11'd0, hel, 2'b00};
  wire [15:0] msdu_len = t_len - 16'd20 - {11'd0, hel, 2'b00} - {14'd0, pl} - {13'd0, cib, 2'b00};

  logic [UNIT_OCTETS*8-1:0] unit_bits;
  always_comb
    for (int i = 0; i < UNIT_OCTETS; i++) unit_bits[(UNIT_OCTETS-1-i)*8 +: 8] = u(i);

  // ---- outgoing messages
  always_comb begin
    r2_msg         = '0;
    r2_msg.st      = st;
    r2_msg.seq     = seq;
    r2_msg.mid     = mid;
    r2_msg.vci     = vci;
    r2_msg.plen    = plen;
    r2_msg.proc    = PROC_W'(PROC_ID);
    r2_msg.buf_idx = pbuf;
    r2_msg.indiv   = !da_group;
    r2_msg.unit    = unit_bits;
    hip_msg         = '0;
    hip_msg.single  = 1'b1;
    hip_msg.proc    = PROC_W'(PROC_ID);
    hip_msg.buf_idx = pbuf;
    hip_msg.nseg    = SEG_W'(1);
    hip_msg.off     = msdu_off;
    hip_msg.len     = msdu_len;
  end

  assign sbus_req = (state == S_BUS);
  assign dma_data = mem[dma_buf][dma_addr];

  // ---- buffer memory writes
  always_ff @(posedge clk) begin
    if (assign_valid) begin
      mem[first_free][0] <= hdr[39:32];
      mem[first_free][1] <= hdr[31:24];
      mem[first_free][2] <= hdr[23:16];
      mem[first_free][3] <= hdr[15:8];
      mem[first_free][4] <= hdr[7:0];
      mem[first_free][53] <= 8'h00;
      mem[first_free][54] <= 8'h00;
      mem[first_free][55] <= 8'h00;
    end
    if (wr_en) mem[wbuf][wr_addr] <= wr_data;
    if (done)  crc_mem[wbuf] <= crc_rem;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_I; op <= '0; sub <= '0;
      busy_buf <= '0; wbuf <= '0; pbuf <= '0;
      assigned <= 1'b0; pkt_ff <= 1'b0; psr_ff <= 1'b0; indiv_q <= 1'b0;
      rem_q <= '0; to_hip <= 1'b0; psr <= 1'b0;
      n_drop_crc <= '0; n_drop_addr <= '0; n_drop_ssm <= '0;
      for (int i = 0; i < 56; i++) pk[i] <= '0;
    end else begin
      logic [NBUF-1:0] bb;
      bb  = busy_buf;
      psr <= 1'b0;

      if (assign_valid) begin
        assigned <= 1'b1;
        wbuf     <= first_free;
        bb[first_free] = 1'b1;
      end
      if (done) begin
        assigned <= 1'b0;
        pkt_ff   <= 1'b1;
      end

      // operation timing
      if (state != S_BUS) begin
        if (st_end) begin op <= '0; sub <= '0; end
        else if (sub_end) begin op <= op + 1'b1; sub <= '0; end
        else sub <= sub + 1'b1;
      end

      case (state)
        S_I: if (st_end && pkt_ff && !done) begin
          pkt_ff <= 1'b0;
          pbuf   <= wbuf;
          state  <= S_II;
        end
        S_II: begin
          if (sub == '0) begin
            if (op < 5'd14)
              for (int b = 0; b < 4; b++) pk[int'(op)*4 + b] <= mem[pbuf][int'(op)*4 + b];
            else if (op == 5'd14) rem_q  <= crc_mem[pbuf];
            else                  psr_ff <= psr_en;
          end
          if (st_end) state <= S_III;
        end
        S_III: if (st_end) begin
          if (rem_q == crc_f) state <= S_IV;
          else begin
            n_drop_crc <= n_drop_crc + 1'b1;
            bb[pbuf] = 1'b0;
            state <= S_I;
          end
        end
        S_IV: if (st_end) begin
          if (!addr_ok) begin
            n_drop_addr <= n_drop_addr + 1'b1;
            bb[pbuf] = 1'b0;
            state <= S_I;
          end else begin
            indiv_q <= (st == ST_BOM || st == ST_SSM) ? !da_group : act_ind;
            case (st)
              ST_BOM:  state <= S_VI;
              ST_SSM:  state <= S_VII;
              default: state <= S_V;
            endcase
          end
        end
        S_V, S_VI: if (st_end) begin
          psr    <= psr_ff && indiv_q;
          to_hip <= 1'b0;
          state  <= S_BUS;
        end
        S_VII: if (st_end) begin
          if (ssm_ok) begin
            psr    <= psr_ff && indiv_q;
            to_hip <= 1'b1;
            state  <= S_BUS;
          end else begin
            n_drop_ssm <= n_drop_ssm + 1'b1;
            bb[pbuf] = 1'b0;
            state <= S_I;
          end
        end
        S_BUS: if (sbus_gnt) begin
          state <= S_I;
          op <= '0; sub <= '0;
        end
        default: state <= S_I;
      endcase

      if (free_valid) bb[free_buf] = 1'b0;
      busy_buf <= bb;
    end
  end

endmodule
