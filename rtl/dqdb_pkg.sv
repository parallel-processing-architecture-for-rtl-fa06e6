// dqdb_pkg: types and constants shared by the DQDB access-unit RTL.
//
// The bus is modelled as a continuous octet stream, one octet per clock, with
// a slot-start marker on the Access Control Field (ACF) octet. A slot is 53
// octets: ACF, a 4-octet segment header and a 48-octet segment payload. For
// queued-arbitrated (QA) traffic the payload is a Derived MAC PDU (DMPDU):
// 2 header octets, a 44-octet segmentation unit and 2 trailer octets.
// Field sizes (53/52/48/44 octets, 10-bit MID, 20-bit VCI, 3 REQ bits, CRC-10
// payload check, segment type codes) follow the document. Bit positions inside
// the ACF and the segment header, the HCS/CRC-10 polynomials and the address
// type code of a group address follow IEEE 802.6 and are this design's choice
// where the document is silent.
package dqdb_pkg;

  localparam int SLOT_OCTETS = 53;
  localparam int SEG_OCTETS  = 52;
  localparam int UNIT_OCTETS = 44;
  localparam int NPRIO       = 3;

  // Width of processor and packet-buffer identifiers.
  localparam int PROC_W = 3;
  localparam int BUF_W  = 6;
  localparam int RID_W  = 3;
  localparam int SEG_W  = 8;   // up to 255 DMPDUs per IMPDU (document: 210)

  // ACF bit positions.
  localparam int ACF_BUSY = 7;
  localparam int ACF_TYPE = 6;   // slot type: 0 = QA, 1 = PA
  localparam int ACF_PSR  = 5;   // previous segment received

  // Segment type codes of the DMPDU header.
  typedef enum logic [1:0] {
    ST_COM = 2'b00,
    ST_EOM = 2'b01,
    ST_BOM = 2'b10,
    ST_SSM = 2'b11
  } seg_type_e;

  // Generator polynomials, highest term implied.
  localparam logic [7:0] HCS_POLY   = 8'h07;    // x^8+x^2+x+1
  localparam logic [9:0] CRC10_POLY = 10'h233;  // x^10+x^9+x^5+x^4+x+1

  localparam logic [19:0] VCI_DEFAULT = 20'hFFFFF; // all-ones: MAC service to LLC

  // One octet of a bus.
  typedef struct packed {
    logic       sof;   // this octet is the ACF of a slot
    logic [7:0] d;
  } bus_octet_t;

  // R1 -> R2 reassembly request (written over the shared bus).
  typedef struct packed {
    seg_type_e                 st;
    logic [3:0]                seq;
    logic [9:0]                mid;
    logic [19:0]               vci;
    logic [5:0]                plen;
    logic [PROC_W-1:0]         proc;
    logic [BUF_W-1:0]          buf_idx;
    logic                      indiv;  // BOM: destination is an individual address
    logic [UNIT_OCTETS*8-1:0]  unit;   // segmentation unit, octet 0 in the top bits
  } r2_msg_t;

  // Request queued in the HIP_FIFO: move (or drop) one received MSDU.
  typedef struct packed {
    logic              discard;  // free the buffers without copying
    logic              single;   // one segment, held in proc/buf_idx
    logic [PROC_W-1:0] proc;
    logic [BUF_W-1:0]  buf_idx;
    logic [RID_W-1:0]  rid;      // reassembly process holding the segment list
    logic [SEG_W-1:0]  nseg;
    logic [15:0]       off;      // MSDU start within the concatenated units
    logic [15:0]       len;      // MSDU length in octets
  } hip_req_t;

  // Host transmit request (MA-UNITDATA request).
  typedef struct packed {
    logic        conn;
    logic [63:0] da;
    logic [63:0] sa;
    logic [13:0] nbytes;
    logic [2:0]  qos_delay;
    logic        qos_loss;
  } tx_req_t;

  // One segmentation unit handed from T1 to a T2 processor.
  typedef struct packed {
    seg_type_e         st;
    logic [3:0]        seq;
    logic [9:0]        mid;
    logic [5:0]        plen;
    logic              has_hdr;   // unit starts with the 24-octet IMPDU header
    logic [24*8-1:0]   hdr;
    logic [15:0]       data_addr; // data memory offset of the MSDU octets
    logic [5:0]        data_n;
    logic [1:0]        pad_n;
    logic              has_trl;   // unit ends with the common PDU trailer
    logic [31:0]       trl;
    logic              conn;
    logic              last;      // last unit of the IMPDU: release the block
  } t2_job_t;

  // Control block type codes (Fig 3.6): TYPE octet bits [1:0].
  localparam logic [1:0] CB_INLINE = 2'd1;  // bytes follow in the FIFO
  localparam logic [1:0] CB_MEMORY = 2'd2;  // bytes are in the data memory
  localparam int CB_EOS = 7;  // TYPE bit: last block of the segment
  localparam int CB_EOM = 6;  // TYPE bit: last segment of the IMPDU
  localparam int CB_CONN = 3; // TYPE bit: connection of the block

  // 64-bit MAC address: top 4 bits give the address type.
  localparam logic [3:0] ADDR_GROUP = 4'b1110;

  // Event counters of the whole access unit.
  typedef struct packed {
    logic [15:0] rx_accepted;   // slots copied to an R1 by the ILLP
    logic [15:0] rx_drop_vci;   // VCI not programmed
    logic [15:0] rx_drop_hcs;   // header check failed
    logic [15:0] rx_drop_busy;  // no R1 ready (overflow)
    logic [15:0] rx_drop_crc;   // payload CRC-10 failed (all R1s)
    logic [15:0] rx_drop_addr;  // MID/VCI/address mismatch (all R1s)
    logic [15:0] rx_drop_ssm;   // SSM validation failed (all R1s)
    logic [15:0] reasm_done;    // IMPDUs reassembled by R2
    logic [15:0] reasm_fail;    // reassemblies or segments discarded by R2
    logic [15:0] dma_stall;     // DMA clocks lost to a busy host bus
    logic [15:0] tx_segments;   // segments written onto the forward bus
    logic [15:0] tx_psr;        // PSR bits written
    logic [15:0] tx_impdu;      // IMPDUs segmented by T1
    logic [15:0] tx_blocked;    // clocks a host request waited for a block
    logic [15:0] bwb_skips;     // bandwidth-balancing slot skips
  } stats_t;

  function automatic logic [7:0] unit_octet(input logic [UNIT_OCTETS*8-1:0] u, input int i);
    return u[(UNIT_OCTETS-1-i)*8 +: 8];
  endfunction

endpackage
