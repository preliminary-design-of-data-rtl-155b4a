// Workload testbench: the stored files of the original loopback test.
// The PC stored the incoming stream in 8192 KB binary files and found them
// equal to the generated ramp. Here qsfp_usb_top (default sizes) runs with
// the Aurora loopback and FT601 models, the USB side draining 7 of every 8
// CLK cycles (350 MB/s at 100 MHz), for ten files (0.bin .. 9.bin) of
// 8192 KB = 2,097,152 32-bit words each. Every 16-bit value is compared with the ramp
// (error count must be 0), the file must hold 64 complete ramps of 65536
// values, and the rate over the file must be at least 300 MB/s. The number
// of files can be changed with +files=N.
module tb_file_transfer;
  localparam int FILE_WORDS = 8192 * 1024 / 4;

  logic gen_clk = 1'b0, user_clk = 1'b0, ft_clk, rst_n = 1'b0;
  logic gen_en = 1'b0, channel_up, usb_drain = 1'b0;
  logic [63:0] tx_tdata, rx_tdata;
  logic tx_tvalid, tx_tready, rx_tvalid, rx_tready, rx_overflow;
  logic [31:0] ft_data_o, ft_word_count, got_data;
  logic ft_data_oe, ft_wr_n, ft_rd_n, ft_oe_n, ft_txe_n, got_valid;
  logic [3:0] ft_be_o, got_be;

  int checks = 0, failures = 0, files = 10;
  longint words = 0, value_errors = 0, wraps = 0, cycles = 0;
  logic [15:0] exp_s = 16'd0;

  qsfp_usb_top dut (
    .gen_clk, .user_clk, .ft_clk, .rst_n, .gen_en, .channel_up,
    .tx_tdata, .tx_tvalid, .tx_tready, .rx_tdata, .rx_tvalid, .rx_tready,
    .rx_can_stall(1'b1), .rx_overflow,
    .ft_data_o, .ft_data_oe, .ft_be_o, .ft_wr_n, .ft_rd_n, .ft_oe_n, .ft_txe_n, .ft_word_count
  );

  aurora_loopback_model u_aurora (
    .user_clk, .rst_n, .honor_ready(1'b1), .channel_up,
    .tx_tdata, .tx_tvalid, .tx_tready, .rx_tdata, .rx_tvalid, .rx_tready
  );

  ft601_model u_ft601 (
    .clk(ft_clk), .rst_n, .usb_drain, .data(ft_data_o), .be(ft_be_o), .wr_n(ft_wr_n),
    .txe_n(ft_txe_n), .got_valid, .got_data, .got_be
  );

  always #4 gen_clk  = ~gen_clk;
  always #3 user_clk = ~user_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge ft_clk) begin
    usb_drain <= ($urandom % 8) != 0;
    if (rst_n && gen_en) cycles++;
    if (got_valid) begin
      if (got_data[15:0]  != exp_s)         value_errors++;
      if (got_data[31:16] != exp_s + 16'd1) value_errors++;
      if (exp_s == 16'hFFFE) wraps++;
      exp_s = got_data[31:16] + 16'd1;
      words++;
    end
  end

  initial begin
    void'($value$plusargs("files=%d", files));
    repeat (5) @(posedge ft_clk);
    rst_n = 1'b1;
    gen_en = 1'b1;
    for (int f = 0; f < files; f++) begin
      longint w0, c0, e0, r0;
      w0 = words; c0 = cycles; e0 = value_errors; r0 = wraps;
      wait (words >= w0 + longint'(FILE_WORDS));
      $display("file %0d.bin: %0d words, %0d value errors, %0d MB/s at 100 MHz",
               f, words - w0, value_errors - e0, (words - w0) * 4 * 100 / (cycles - c0));
      checks++;
      if (value_errors != e0) failures++;
      check((words - w0) * 4 >= (cycles - c0) * 3, "rate at least 300 MB/s");
      check(wraps - r0 == 64, "64 complete ramps per file");
    end
    check(!rx_overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    repeat (files * 3_000_000) @(posedge ft_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
