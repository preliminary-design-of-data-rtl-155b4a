// End-to-end testbench of qsfp_usb_top at its default sizes, with the
// Aurora core plus optical loopback and the FT601 replaced by behavioural
// models. It reproduces the self-loopback test: the generated ramp goes
// out on the Aurora TX stream, comes back on RX, is narrowed to 32 bits
// and written into the FT601, and every word the FT601 takes is checked
// against the 16-bit ramp 0,1,2,...,65535,0,... (two samples per word,
// first sample in bits 15:0). Phases:
//   1. random USB drain at 7/8 (350 MB/s at 100 MHz) with long drain
//      pauses, so that TXE_N stalls the bus and back-pressure reaches the
//      generator; runs through two wraps of the ramp;
//   2. continuous drain: the FT601 bus must take one word per CLK
//      (400 MB/s), then 7/8 drain: the sustained rate must stay above
//      300 MB/s;
//   3. stop, drain, and check word counts match across the 64 -> 32 split;
//   4. an Aurora RX that ignores rx_tready with the USB side stopped: the
//      sticky rx_overflow flag must rise (and not before this phase).
// Each mechanism is counted and a failure is counted for any that never
// happened. Clocks: gen 125 MHz (8 ns), Aurora user 166 MHz (6 ns),
// FT601 100 MHz (10 ns), in time units of the simulator.
module tb_qsfp_usb_top;
  logic gen_clk = 1'b0, user_clk = 1'b0, ft_clk, rst_n = 1'b0;
  logic gen_en = 1'b0, channel_up, honor_ready = 1'b1, usb_drain = 1'b0;
  logic [63:0] tx_tdata, rx_tdata;
  logic tx_tvalid, tx_tready, rx_tvalid, rx_tready, rx_overflow;
  logic [31:0] ft_data_o, ft_word_count, got_data;
  logic ft_data_oe, ft_wr_n, ft_rd_n, ft_oe_n, ft_txe_n, got_valid;
  logic [3:0] ft_be_o, got_be;

  int checks = 0, failures = 0;
  int ft_words = 0, rx_words = 0, tx_words = 0;
  int n_wrap = 0, n_txe_stall = 0, n_rx_bp = 0, n_tx_bp = 0, n_gen_stall = 0;
  bit ramp_check = 1'b1;
  logic [15:0] exp_s = 16'd0;

  qsfp_usb_top dut (
    .gen_clk, .user_clk, .ft_clk, .rst_n, .gen_en, .channel_up,
    .tx_tdata, .tx_tvalid, .tx_tready, .rx_tdata, .rx_tvalid, .rx_tready, .rx_can_stall(honor_ready), .rx_overflow,
    .ft_data_o, .ft_data_oe, .ft_be_o, .ft_wr_n, .ft_rd_n, .ft_oe_n, .ft_txe_n, .ft_word_count
  );

  aurora_loopback_model u_aurora (
    .user_clk, .rst_n, .honor_ready, .channel_up,
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

  // scoreboard on the words the FT601 took
  always @(posedge ft_clk) if (got_valid) begin
    ft_words++;
    if (ramp_check) begin
      check(got_data[15:0] == exp_s && got_data[31:16] == exp_s + 16'd1, "ramp on USB");
      check(got_be == 4'hF, "byte enables");
      if (exp_s == 16'hFFFE) n_wrap++;
      exp_s = got_data[31:16] + 16'd1;   // resynchronise after a reported error
    end
  end

  always @(posedge ft_clk) if (rst_n) begin
    if (!ft_wr_n && ft_txe_n) n_txe_stall++;
    check(ft_rd_n && ft_oe_n, "FT601 read strobes idle");
  end
  always @(posedge user_clk) if (rst_n) begin
    if (rx_tvalid && rx_tready) rx_words++;
    if (tx_tvalid && tx_tready) tx_words++;
    if (rx_tvalid && !rx_tready && honor_ready) n_rx_bp++;
    if (tx_tvalid && !tx_tready) n_tx_bp++;
  end
  always @(posedge gen_clk) if (rst_n) begin
    if (dut.gen_valid && !dut.gen_ready) n_gen_stall++;
  end

  // USB drain pattern: mode 0 = stopped, 1 = always, 2 = 7 of 8 cycles
  int drain_mode = 0;
  always @(posedge ft_clk) begin
    case (drain_mode)
      0: usb_drain <= 1'b0;
      1: usb_drain <= 1'b1;
      default: usb_drain <= ($urandom % 8) != 0;
    endcase
  end

  task automatic ft_cycles(input int n);
    repeat (n) @(posedge ft_clk);
  endtask

  initial begin
    int w0;
    ft_cycles(5);
    rst_n = 1'b1;
    gen_en = 1'b1;
    // ---- phase 1: through two wraps of the ramp with stalls ----
    while (ft_words < 70000) begin
      drain_mode = 2; ft_cycles(15000);
      drain_mode = 0; ft_cycles(3000);
    end
    check(!rx_overflow, "no overflow while RX honours ready");
    // ---- phase 2: bus rate ----
    drain_mode = 1; ft_cycles(2000);
    w0 = ft_words; ft_cycles(2000);
    check(ft_words - w0 == 2000, "one word per FT601 CLK (400 MB/s)");
    $display("continuous drain: %0d words in 2000 cycles", ft_words - w0);
    drain_mode = 2; ft_cycles(3000);
    w0 = ft_words; ft_cycles(20000);
    $display("7/8 drain: %0d words in 20000 cycles = %0d MB/s at 100 MHz",
             ft_words - w0, (ft_words - w0) * 4 * 100 / 20000);
    check((ft_words - w0) * 4 >= 20000 * 3, "sustained rate at least 300 MB/s");
    // ---- phase 3: stop and drain, counts must agree ----
    gen_en = 1'b0; drain_mode = 1; ft_cycles(3000);
    check(ft_words == 2 * rx_words, "two FT601 words per Aurora word");
    check(rx_words == tx_words, "loop returned every word");
    check(ft_word_count == 32'(ft_words), "ft_word_count");
    // ---- phase 4: RX that cannot be stalled ----
    ramp_check = 1'b0;
    honor_ready = 1'b0; drain_mode = 0; gen_en = 1'b1;
    ft_cycles(20000);
    check(rx_overflow, "rx_overflow raised");
    $display("ft_words=%0d rx_words=%0d wraps=%0d txe_stalls=%0d rx_backpressure=%0d tx_backpressure=%0d gen_stalls=%0d overflow=%0d",
             ft_words, rx_words, n_wrap, n_txe_stall, n_rx_bp, n_tx_bp, n_gen_stall, rx_overflow);
    check(n_wrap >= 2,       "mechanism: ramp wrap");
    check(n_txe_stall > 0,   "mechanism: TXE_N stall");
    check(n_rx_bp > 0,       "mechanism: RX FIFO full back-pressure");
    check(n_tx_bp > 0,       "mechanism: Aurora TX not ready");
    check(n_gen_stall > 0,   "mechanism: generator stalled by full TX FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge ft_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
