// Testbench of data_gen: the stream must be the 16-bit ramp 0,1,2,... with
// four samples per 64-bit word, first sample in the low bits, across the
// wrap at 65535, with no gap or repeat under random back-pressure and
// start/stop, and one word per cycle when never stalled.
module tb_data_gen;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, m_ready = 1'b0;
  logic [63:0] m_data;
  logic m_valid;
  int checks = 0, failures = 0;
  logic [15:0] expect_s = 16'd0;
  int words = 0, wraps = 0;

  data_gen dut (.clk, .rst_n, .en, .m_data, .m_valid, .m_ready);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // scoreboard: every accepted word continues the ramp
  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    for (int i = 0; i < 4; i++) begin
      check(m_data[16*i +: 16] == expect_s, "ramp value");
      if (expect_s == 16'hFFFF) wraps++;
      expect_s = expect_s + 16'd1;
    end
    words++;
  end

  // a word offered and not taken must stay
  logic [63:0] last_data; logic last_stall = 1'b0;
  always @(posedge clk) begin
    if (rst_n && last_stall) check(m_valid && m_data == last_data, "hold under stall");
    last_stall <= m_valid && !m_ready;
    last_data  <= m_data;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!m_valid, "idle while en low");
    // random back-pressure and start/stop, long enough to wrap twice
    repeat (80000) begin
      @(posedge clk);
      m_ready <= ($urandom % 4) != 0;
      if (($urandom % 64) == 0) en <= ~en; else if (($urandom % 8) == 0) en <= 1'b1;
    end
    check(wraps >= 1, "ramp wrapped at 65535");
    // full rate: en and ready held high -> one word per cycle
    en <= 1'b1; m_ready <= 1'b1;
    repeat (4) @(posedge clk);
    begin
      int w0; w0 = words;
      repeat (1000) @(posedge clk);
      check(words - w0 == 1000, "one word per cycle");
    end
    $display("words=%0d wraps=%0d", words, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
