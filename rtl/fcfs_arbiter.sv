// fcfs_arbiter: first-come first-served arbiter for the shared bus.
//
// The document queues all requests for a shared resource and grants them in
// the order they were received. A master raises `req` and holds it; a new
// request is appended to an arrival queue (simultaneous arrivals in index
// order). The master at the head of the queue gets `gnt` while `gnt_en` is
// high, and keeps it until it drops `req`; the queue then advances. A master
// that only needs one transfer drops `req` the clock after it sees `gnt`.
module fcfs_arbiter #(
  parameter int N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 gnt_en,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_id
);

  localparam int W = $clog2(N);

  logic [W-1:0]   q [N];
  logic [W:0]     cnt;
  logic [N-1:0]   queued;

  wire pop = (cnt != 0) && !req[q[0]];

  always_comb begin
    gnt    = '0;
    gnt_id = q[0];
    if (cnt != 0 && gnt_en && req[q[0]]) gnt[q[0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      queued <= '0;
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else begin
      logic [W-1:0] nq [N];
      logic [W:0]   nc;
      logic [N-1:0] nqd;
      nc  = cnt;
      nqd = queued;
      for (int i = 0; i < N; i++) nq[i] = q[i];
      if (pop) begin
        nqd[q[0]] = 1'b0;
        for (int i = 0; i < N - 1; i++) nq[i] = q[i+1];
        nc = nc - 1'b1;
      end
      for (int m = 0; m < N; m++) begin
        if (req[m] && !nqd[m] && !(pop && W'(m) == q[0])) begin
          nq[nc[W-1:0]] = W'(m);
          nc = nc + 1'b1;
          nqd[m] = 1'b1;
        end
      end
      for (int i = 0; i < N; i++) q[i] <= nq[i];
      cnt    <= nc;
      queued <= nqd;
    end
  end

endmodule
