// sync_fifo: single-clock first-in first-out queue.
//
// Used for the request queues of the design: the R2 reassembly queue, the
// HIP_FIFO and the OLLP control-block FIFO, all of which the document has
// served first come first served. `wr` while not full stores `wdata`; `rd`
// while not empty removes the head, which is always visible on `rdata`
// (first-word fall-through). Depth and word type are parameters; the depth
// is not given by the document.
module sync_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr,
  input  T     wdata,
  input  logic rd,
  output T     rdata,
  output logic empty,
  output logic full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rdata = mem[rp];

  wire do_wr = wr && !full;
  wire do_rd = rd && !empty;

  always_ff @(posedge clk) if (do_wr) mem[wp] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (do_wr ? 1'b1 : 1'b0) - (do_rd ? 1'b1 : 1'b0);
    end
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr && full && !rd))
    else $error("sync_fifo: write while full");
`endif

endmodule
