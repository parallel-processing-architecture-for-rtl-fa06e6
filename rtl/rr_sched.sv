// rr_sched: round-robin choice of the next ready processor.
//
// The document assigns incoming packets to the receive processors, and
// segmentation units to the transmit processors, in round-robin order. Given
// the `ready` mask, `gnt_id` names the first ready processor after the one
// chosen last (`gnt_valid` says one exists); `take` commits the choice and
// moves the pointer. Skipping a busy processor, rather than waiting for it,
// is this design's choice.
module rr_sched #(
  parameter int N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         ready,
  input  logic                 take,
  output logic                 gnt_valid,
  output logic [$clog2(N)-1:0] gnt_id
);

  localparam int W = $clog2(N);
  logic [W-1:0] last;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_id    = '0;
    for (int k = N; k >= 1; k--) begin
      if (ready[(int'(last) + k) % N]) begin
        gnt_valid = 1'b1;
        gnt_id    = W'((int'(last) + k) % N);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  last <= W'(N-1);
    else if (take && gnt_valid)  last <= gnt_id;
  end

endmodule
