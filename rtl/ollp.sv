// ollp: Output Low Level Processor, the write connection on both buses.
//
// Segment assembly: reads 4-octet control blocks from the OLLP FIFO. An
// inline block is followed in the FIFO by its octets; a memory block names
// an offset and count in the buffer memory, which are streamed from its
// serial port. The octets fill a 52-octet segment buffer; octets 4..50
// (DMPDU octets 0..46, the last one only up to the CRC field) also run
// through a CRC-10 unit, and when the block marked end-of-segment is done
// the remainder is written into the DMPDU trailer. The segment is then
// queued with the distributed queue state machine at priority `tx_prio`.
// Forward bus (registered, one clock of delay): every octet passes through,
// ORed with what this node writes. When the DQSM grants the empty QA slot
// seen at the ACF, the busy bit is set and the 52 segment octets are ORed
// into the slot. A pending PSR request sets the PSR bit of the next slot.
// When a segment marked last-of-block has gone out the block is released to
// the buffer list.
// Reverse bus (registered): the REQ bits of each passing ACF are reported to
// the DQSM (`req_seen`, before this node writes), and a REQ the DQSM wants
// sent at level I is written into the first slot whose REQ_I bit is 0.
// Writing by OR onto the bus follows the document; one segment buffer (no
// assembly of the next segment while one waits) is this design's choice.
module ollp
  import dqdb_pkg::*;
#(
  parameter int NPRIO = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // control block FIFO
  input  logic                     cb_empty,
  input  logic [7:0]               cb_data,
  output logic                     cb_rd,
  // buffer memory serial port
  output logic                     ser_load,
  output logic [15:0]              ser_addr,
  output logic                     ser_rd,
  input  logic [7:0]               ser_data,
  // distributed queue state machine
  input  logic [$clog2(NPRIO)-1:0] tx_prio,
  output logic                     q_req,
  output logic [$clog2(NPRIO)-1:0] q_prio,
  input  logic                     tx_grant,
  input  logic [NPRIO-1:0]         req_want,
  output logic [NPRIO-1:0]         req_sent,
  output logic [NPRIO-1:0]         req_seen,
  // buses
  input  bus_octet_t               bus_a_in,
  output bus_octet_t               bus_a_out,
  input  bus_octet_t               bus_b_in,
  output bus_octet_t               bus_b_out,
  input  logic                     psr_req,
  // buffer list
  output logic                     release_blk,
  output logic                     rel_conn,
  output logic [15:0]              n_tx,
  output logic [15:0]              n_psr
);

  typedef enum logic [2:0] {A_IDLE, A_CB, A_INL, A_MLOAD, A_MEM, A_CRC, A_QUEUE, A_WAIT} ast_e;

  ast_e        ast;
  logic [7:0]  seg [SEG_OCTETS];
  logic [5:0]  wp;          // next octet of the segment buffer
  logic [1:0]  cbi;
  logic [7:0]  cb_type, cb_n, cb_left;
  logic [15:0] cb_addr;
  logic        eom_q, conn_q;

  // octet written into the segment buffer this clock
  logic       wr_byte;
  logic [7:0] wr_val;
  always_comb begin
    wr_byte = 1'b0;
    wr_val  = cb_data;
    if (ast == A_INL && !cb_empty) wr_byte = 1'b1;
    if (ast == A_MEM) begin wr_byte = 1'b1; wr_val = ser_data; end
  end

  logic [9:0] crc;
  crc_unit #(.L(10), .POLY(CRC10_POLY)) u_crc (
    .clk, .rst_n,
    .init (ast == A_IDLE && wp == 6'd0),
    .en   (wr_byte && wp >= 6'd4 && wp <= 6'd50),
    .nbits((wp == 6'd50) ? 4'd6 : 4'd8),
    .din  (wr_val),
    .crc  (crc)
  );

  assign cb_rd    = ((ast == A_CB) || (ast == A_INL)) && !cb_empty;
  assign ser_load = (ast == A_MLOAD);
  assign ser_addr = cb_addr;
  assign ser_rd   = (ast == A_MEM);
  assign q_req    = (ast == A_QUEUE);
  assign q_prio   = tx_prio;

  // ---- forward bus
  logic [5:0] pa;
  logic       txing, psr_pend;
  wire  [5:0] pa_now = bus_a_in.sof ? 6'd0 : pa;

  // ---- reverse bus
  always_comb begin
    req_seen = '0;
    req_sent = '0;
    if (bus_b_in.sof)
      for (int i = 0; i < NPRIO; i++) begin
        req_seen[i] = bus_b_in.d[i];
        req_sent[i] = req_want[i] && !bus_b_in.d[i];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_b_out <= '0;
    end else begin
      bus_b_out.sof <= bus_b_in.sof;
      bus_b_out.d   <= bus_b_in.d | {{(8-NPRIO){1'b0}}, req_sent};
    end
  end

  wire tx_end = txing && pa_now == 6'd52;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_a_out <= '0; pa <= '0; txing <= 1'b0; psr_pend <= 1'b0;
      n_tx <= '0; n_psr <= '0;
    end else begin
      logic [7:0] d;
      d = bus_a_in.d;
      pa <= (pa_now == 6'd52) ? 6'd0 : pa_now + 1'b1;
      if (bus_a_in.sof) begin
        if (tx_grant) begin
          d[ACF_BUSY] = 1'b1;
          txing <= 1'b1;
          n_tx  <= n_tx + 1'b1;
        end
        if (psr_pend) begin
          d[ACF_PSR] = 1'b1;
          n_psr <= n_psr + 1'b1;
        end
      end else if (txing && pa_now >= 6'd1) begin
        d = d | seg[pa_now - 6'd1];
      end
      if (tx_end) txing <= 1'b0;
      psr_pend <= (psr_pend && !bus_a_in.sof) || psr_req;
      bus_a_out.sof <= bus_a_in.sof;
      bus_a_out.d   <= d;
    end
  end

  // ---- segment assembly
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ast <= A_IDLE; wp <= '0; cbi <= '0; cb_type <= '0; cb_n <= '0; cb_left <= '0;
      cb_addr <= '0; eom_q <= 1'b0; conn_q <= 1'b0;
      release_blk <= 1'b0; rel_conn <= 1'b0;
      for (int i = 0; i < SEG_OCTETS; i++) seg[i] <= '0;
    end else begin
      release_blk <= 1'b0;
      if (wr_byte) begin
        seg[wp] <= wr_val;
        wp <= wp + 1'b1;
      end
      case (ast)
        A_IDLE: if (!cb_empty) begin cbi <= '0; ast <= A_CB; end
        A_CB: if (!cb_empty) begin
          cbi <= cbi + 1'b1;
          case (cbi)
            2'd0: cb_type <= cb_data;
            2'd1: cb_n    <= cb_data;
            2'd2: cb_addr[15:8] <= cb_data;
            default: begin
              cb_addr[7:0] <= cb_data;
              cb_left      <= cb_n;
              if (cb_type[1:0] == CB_MEMORY) ast <= A_MLOAD;
              else if (cb_n == 0)            ast <= cb_type[CB_EOS] ? A_CRC : A_IDLE;
              else                           ast <= A_INL;
            end
          endcase
        end
        A_INL: if (!cb_empty) begin
          cb_left <= cb_left - 1'b1;
          if (cb_left == 8'd1) ast <= cb_type[CB_EOS] ? A_CRC : A_IDLE;
        end
        A_MLOAD: ast <= (cb_left == 0) ? (cb_type[CB_EOS] ? A_CRC : A_IDLE) : A_MEM;
        A_MEM: begin
          cb_left <= cb_left - 1'b1;
          if (cb_left == 8'd1) ast <= cb_type[CB_EOS] ? A_CRC : A_IDLE;
        end
        A_CRC: begin
          seg[50] <= {seg[50][7:2], crc[9:8]};
          seg[51] <= crc[7:0];
          eom_q   <= cb_type[CB_EOM];
          conn_q  <= cb_type[CB_CONN];
          ast     <= A_QUEUE;
        end
        A_QUEUE: ast <= A_WAIT;
        A_WAIT: if (tx_end) begin
          release_blk <= eom_q;
          rel_conn    <= conn_q;
          wp  <= '0;
          ast <= A_IDLE;
        end
        default: ast <= A_IDLE;
      endcase
    end
  end

endmodule
