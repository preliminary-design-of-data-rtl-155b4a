// Two-flop synchroniser for a single-bit level signal entering a clock
// domain (control inputs such as run/stop or the Aurora channel status).
// The output follows the input two rising edges later. Resets to 0.
module sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_q <= 1'b0;
      q      <= 1'b0;
    end else begin
      meta_q <= d;
      q      <= meta_q;
    end
  end
endmodule
