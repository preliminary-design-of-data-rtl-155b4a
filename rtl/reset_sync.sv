// Reset synchroniser: asserts its output asynchronously with the input
// reset and releases it only after STAGES rising edges of the local clock,
// so every flip-flop of a clock domain leaves reset on the same edge.
// Active-low in and out. This is a standard construction; the design uses
// one per clock domain.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic [STAGES-1:0] sync_q;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) sync_q <= '0;
    else         sync_q <= {sync_q[STAGES-2:0], 1'b1};
  end

  assign rst_n = sync_q[STAGES-1];
endmodule
