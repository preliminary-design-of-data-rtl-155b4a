// Testbench of data_width_conv: random 64-bit words in, random valid and
// ready. Every input word must come out as two 32-bit words, low half
// first, in order; a stalled output must hold; and with both sides always
// willing the output must carry one 32-bit word every cycle.
module tb_data_width_conv;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [63:0] s_data;
  logic s_valid = 1'b0, s_ready, m_valid, m_ready = 1'b0;
  logic [31:0] m_data;
  int checks = 0, failures = 0, in_words = 0, out_words = 0;
  logic [31:0] q[$];
  bit hi_rate = 0;

  data_width_conv dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [31:0] last_data; logic last_stall = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) begin
      q.push_back(s_data[31:0]);
      q.push_back(s_data[63:32]);
      in_words++;
    end
    if (m_valid && m_ready) begin
      check(q.size() > 0 && m_data == q[0], "order and value");
      if (q.size() > 0) void'(q.pop_front());
      out_words++;
    end
    if (last_stall) check(m_valid && m_data == last_data, "hold under stall");
    last_stall <= m_valid && !m_ready;
    last_data  <= m_data;
    if (!s_valid || s_ready) begin
      s_valid <= hi_rate || ($urandom % 3 != 0);
      s_data  <= {$urandom, $urandom};
    end
    m_ready <= hi_rate || ($urandom % 4 != 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20000) @(posedge clk);
    hi_rate = 1;
    repeat (10) @(posedge clk);
    begin
      int o0; o0 = out_words;
      repeat (1000) @(posedge clk);
      check(out_words - o0 == 1000, "one narrow word per cycle");
    end
    check(in_words > 5000, "enough traffic");
    $display("in=%0d out=%0d", in_words, out_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
