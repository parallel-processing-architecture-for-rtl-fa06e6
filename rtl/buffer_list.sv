// buffer_list: per-connection list of data memory blocks, kept in the shared
// memory and used by T1 (allocate) and the OLLP (release).
//
// Each connection owns a ring of NCELL cells; a cell holds the pointer to the
// next cell and the data-memory address of its block (BLOCK_BYTES octets).
// The record of a connection holds first_free, first_busy and last_busy.
// `alloc` takes the block at first_free (its address is on `alloc_addr` in
// the same clock), makes it last_busy and advances first_free. `release`,
// when the OLLP has sent the last segment taken from a block, advances
// first_busy. When every cell is busy the list is full and the host request
// waits (`alloc_ok` low). The cells are set up as a ring at reset. A busy
// count tells a full ring from an empty one, where the document compares
// first_free with first_busy only; the sizes are this design's choice.
module buffer_list #(
  parameter int NCONN       = 2,
  parameter int NCELL       = 3,
  parameter int BLOCK_BYTES = 9216
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     alloc,
  input  logic [$clog2(NCONN)-1:0] alloc_conn,
  output logic                     alloc_ok,
  output logic [15:0]              alloc_addr,
  input  logic                     release_blk,
  input  logic [$clog2(NCONN)-1:0] rel_conn,
  output logic [$clog2(NCELL+1)-1:0] busy_cnt [NCONN],
  output logic [15:0]              n_blocked
);

  localparam int CW = (NCELL > 1) ? $clog2(NCELL) : 1;
  localparam int KW = $clog2(NCELL + 1);

  logic [CW-1:0] cell_next [NCONN][NCELL];
  logic [15:0]   cell_addr [NCONN][NCELL];
  logic [CW-1:0] first_free [NCONN];
  logic [CW-1:0] first_busy [NCONN];
  logic [CW-1:0] last_busy  [NCONN];

  assign alloc_ok   = (busy_cnt[alloc_conn] != KW'(NCELL));
  assign alloc_addr = cell_addr[alloc_conn][first_free[alloc_conn]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_blocked <= '0;
      for (int c = 0; c < NCONN; c++) begin
        first_free[c] <= '0;
        first_busy[c] <= '0;
        last_busy[c]  <= '0;
        busy_cnt[c]   <= '0;
        for (int i = 0; i < NCELL; i++) begin
          cell_next[c][i] <= CW'((i + 1) % NCELL);
          cell_addr[c][i] <= 16'((c * NCELL + i) * BLOCK_BYTES);
        end
      end
    end else begin
      for (int c = 0; c < NCONN; c++) begin
        logic a, r;
        a = alloc && alloc_ok && (alloc_conn == ($clog2(NCONN))'(c));
        r = release_blk && (rel_conn == ($clog2(NCONN))'(c)) && busy_cnt[c] != 0;
        if (a) begin
          last_busy[c]  <= first_free[c];
          first_free[c] <= cell_next[c][first_free[c]];
        end
        if (r) first_busy[c] <= cell_next[c][first_busy[c]];
        busy_cnt[c] <= busy_cnt[c] + (a ? 1'b1 : 1'b0) - (r ? 1'b1 : 1'b0);
      end
      if (alloc && !alloc_ok) n_blocked <= n_blocked + 1'b1;
    end
  end

endmodule
