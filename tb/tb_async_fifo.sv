// Testbench of async_fifo: two unrelated clocks (10 ns write, 13 ns read),
// random valid and ready on both sides. Every word must come out once, in
// order; the FIFO must fill (w_ready low, w_count = DEPTH) and drain; and
// w_count must never exceed DEPTH. Run at a small depth so that full is
// reached often.
module tb_async_fifo;
  localparam int W = 32, D = 16;
  logic wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b0, rrst_n = 1'b0;
  logic [W-1:0] w_data, r_data;
  logic w_valid = 1'b0, w_ready, r_valid, r_ready = 1'b0;
  logic [$clog2(D):0] w_count;
  int checks = 0, failures = 0;
  int sent = 0, recvd = 0, full_seen = 0, max_count = 0;
  logic [W-1:0] wseq = '0, rseq = '0;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 wclk = ~wclk;
  always #6.5 rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // data written is a scrambled sequence number
  function automatic logic [W-1:0] pat(input logic [W-1:0] n);
    return (n * 32'h9E3779B1) ^ 32'h5A5A0F0F;
  endfunction

  int phase = -1;  // -1: idle, 0: balanced, 1: reader slow (fill), 2: writer slow (drain)
  assign w_data = pat(wseq);

  always @(posedge wclk) if (wrst_n) begin
    if (w_valid && w_ready) begin wseq <= wseq + 1; sent++; end
    if (!w_ready) full_seen++;
    if (int'(w_count) > max_count) max_count = int'(w_count);
    check(int'(w_count) <= D, "count within depth");
    w_valid <= (phase < 0) ? 1'b0 : (phase == 2) ? (($urandom % 8) == 0) : (($urandom % 4) != 0);
  end

  always @(posedge rclk) if (rrst_n) begin
    if (r_valid && r_ready) begin
      check(r_data == pat(rseq), "order and value");
      rseq <= rseq + 1; recvd++;
    end
    r_ready <= (phase == 1) ? (($urandom % 8) == 0) : (($urandom % 4) != 0);
  end

  initial begin
    repeat (4) @(posedge rclk);
    wrst_n = 1'b1; rrst_n = 1'b1;
    repeat (10) @(posedge rclk);
    check(!r_valid, "empty after reset");
    for (int k = 0; k < 6; k++) begin
      phase = 1; repeat (2000) @(posedge rclk);
      phase = 2; repeat (2000) @(posedge rclk);
      phase = 0; repeat (2000) @(posedge rclk);
    end
    // drain
    @(posedge wclk); phase = 3;
    force w_valid = 1'b0;
    repeat (200) @(posedge rclk);
    check(sent == recvd, "all words out");
    check(!r_valid, "empty at end");
    check(full_seen > 0, "FIFO reached full");
    check(max_count == D, "w_count reached DEPTH");
    $display("sent=%0d recvd=%0d full_cycles=%0d", sent, recvd, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
