// buffer_mem: dual-port buffer (data) memory of the transmitter.
//
// Models the dual-ported video RAM of the document: a random-access port,
// used by the host to copy the data to be sent, and a serial port from which
// the OLLP streams a block without sending an address per octet. The serial
// port is loaded with a start address (`ser_load`); each `ser_rd` then moves
// on by one octet and `ser_data` always shows the octet at the current
// position. Both ports work in the same clock; reads are combinational. The
// octet width and the 64 KiB size (the 16-bit offset of the control block)
// are this design's reading of the document.
module buffer_mem #(
  parameter int DEPTH = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  // random access port (host)
  input  logic        ra_we,
  input  logic [15:0] ra_addr,
  input  logic [7:0]  ra_wdata,
  output logic [7:0]  ra_rdata,
  // serial port (OLLP)
  input  logic        ser_load,
  input  logic [15:0] ser_addr,
  input  logic        ser_rd,
  output logic [7:0]  ser_data
);

  localparam int AW = $clog2(DEPTH);

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] sptr;

  assign ra_rdata = mem[ra_addr[AW-1:0]];
  assign ser_data = mem[sptr];

  always_ff @(posedge clk) if (ra_we) mem[ra_addr[AW-1:0]] <= ra_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sptr <= '0;
    else if (ser_load) sptr <= ser_addr[AW-1:0];
    else if (ser_rd)   sptr <= sptr + 1'b1;
  end

endmodule
