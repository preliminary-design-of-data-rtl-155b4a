// Dual-clock FIFO used for both FIFOs of the firmware: between the data
// generator and the Aurora transmitter, and between the data width
// convertor and the FT601 data transmission module. Besides buffering, it
// carries the data across the clock boundary on each side.
//
// How it works: DEPTH (a power of two) words are held in a memory array.
// Each side keeps a binary pointer one bit wider than the address and its
// gray-coded copy; the gray copy crosses to the other clock through a
// two-flop synchroniser. Full is detected on the write side when the
// synchronised read pointer equals the write pointer with its two top
// bits inverted; empty on the read side when the synchronised write pointer
// equals the read pointer. Both flags are therefore pessimistic for two or
// three cycles after the other side moves, never optimistic.
//
// Interface: valid/ready on both sides. Write: a word is stored when
// w_valid && w_ready (w_ready = not full). Read: first-word fall-through,
// r_data shows the oldest word whenever r_valid is high and it is removed
// on r_valid && r_ready. w_count is the fill level as the write side sees
// it. Latency from write to r_valid is about three read clocks. Depth,
// width and the dual-clock construction are this design's choices.
module async_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 512
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic [WIDTH-1:0] w_data,
  input  logic             w_valid,
  output logic             w_ready,
  output logic [$clog2(DEPTH):0] w_count,

  input  logic             rclk,
  input  logic             rrst_n,
  output logic [WIDTH-1:0] r_data,
  output logic             r_valid,
  input  logic             r_ready
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic        w_fire;
  logic [AW:0] wbin_next;

  assign w_ready   = (wgray_q != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign w_fire    = w_valid && w_ready;
  assign wbin_next = wbin_q + (AW+1)'(w_fire);
  assign w_count   = wbin_q - gray2bin(rgray_w2);

  always_ff @(posedge wclk) begin
    if (w_fire) mem[wbin_q[AW-1:0]] <= w_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin_q   <= wbin_next;
      wgray_q  <= bin2gray(wbin_next);
      rgray_w1 <= rgray_q;
      rgray_w2 <= rgray_w1;
    end
  end

  // ---------------- read side ----------------
  logic        r_fire;
  logic [AW:0] rbin_next;

  assign r_valid   = (rgray_q != wgray_r2);
  assign r_fire    = r_valid && r_ready;
  assign rbin_next = rbin_q + (AW+1)'(r_fire);
  assign r_data    = mem[rbin_q[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin_q   <= '0;
      rgray_q  <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin_q   <= rbin_next;
      rgray_q  <= bin2gray(rbin_next);
      wgray_r1 <= wgray_q;
      wgray_r2 <= wgray_r1;
    end
  end

  initial assert (DEPTH >= 4 && (1 << AW) == DEPTH)
    else $error("DEPTH must be a power of two, at least 4");
endmodule
