// Testbench of ft601_tx against the FT601 write rule: a word counts as
// written at a rising CLK edge where TXE_N and WR_N are both low. TXE_N
// toggles at random; the FIFO side offers words at random. Each word must
// reach the FT601 exactly once and in order, with BE = 4'hF, RD_N and OE_N
// high; and while TXE_N stays low and data is always there, one word must
// be written every CLK cycle (400 MB/s at 100 MHz).
module tb_ft601_tx;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] s_data, ft_data_o, word_count;
  logic s_valid = 1'b0, s_ready, ft_data_oe, ft_wr_n, ft_rd_n, ft_oe_n;
  logic ft_txe_n = 1'b1;
  logic [3:0] ft_be_o;
  int checks = 0, failures = 0, written = 0, stalls = 0;
  logic [31:0] q[$];
  bit hi_rate = 0;

  ft601_tx dut (.*);

  always #5 clk = ~clk;   // 100 MHz FT601 CLK

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    // the FT601 side: sample pins at the edge
    if (!ft_wr_n && !ft_txe_n) begin
      check(q.size() > 0 && ft_data_o == q[0], "word order and value");
      check(ft_be_o == 4'hF && ft_data_oe, "byte enables and drive");
      if (q.size() > 0) void'(q.pop_front());
      written++;
    end
    if (!ft_wr_n && ft_txe_n) stalls++;
    check(ft_rd_n && ft_oe_n, "read strobes idle");
    // the FIFO side
    if (s_valid && s_ready) q.push_back(s_data);
    if (!s_valid || s_ready) begin
      s_valid <= hi_rate || ($urandom % 3 != 0);
      s_data  <= $urandom;
    end
    ft_txe_n <= hi_rate ? 1'b0 : ($urandom % 4 == 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20000) @(posedge clk);
    hi_rate = 1;
    repeat (10) @(posedge clk);
    begin
      int w0; w0 = written;
      repeat (1000) @(posedge clk);
      check(written - w0 == 1000, "one word per CLK cycle");
    end
    check(stalls > 100, "TXE_N stalls exercised");
    check(word_count == 32'(written), "word_count");
    $display("written=%0d stalls=%0d", written, stalls);
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
