// FPGA firmware of the QSFP-to-USB3.0 data exchange module.
//
// The board moves data arriving on a QSFP optical link to a PC over USB3.0
// through an FT601 USB-to-FIFO bridge. In the test configuration built
// here the FPGA generates its own data and sends it around the optical
// loop:
//
//   data_gen -> tx FIFO -> [Aurora 64B/66B TX -> QSFP loopback -> Aurora RX]
//            -> data_width_conv (64 -> 32) -> rx FIFO -> ft601_tx -> FT601
//
// The Aurora 64B/66B core and the optical module are outside this module:
// their 64-bit user-interface streams are the tx_* and rx_* ports. The
// chain of blocks, the two FIFOs and the self-loopback test follow the
// original design; widths, depths, clocking and flow control are this
// design's choices.
//
// Clocks: gen_clk (data generator), user_clk (Aurora user interface, width
// convertor) and ft_clk (driven by the FT601). The two FIFOs are
// dual-clock and carry the data across. rst_n is asynchronous and is
// synchronised into each domain.
//
// Flow control: valid/ready throughout. tx_tready from the Aurora core
// stalls the generator through the tx FIFO, and the FT601 throttles the
// receive chain through TXE_N. The receive side offers rx_tready. Set
// rx_can_stall when the RX source honours it (a link with flow control, or
// a simulation loop): back-pressure then reaches the generator and nothing
// is lost. A plain Aurora RX interface cannot be stalled: with
// rx_can_stall low, a word offered while rx_tready is low is lost and sets
// the sticky rx_overflow flag, so the source rate must stay below the USB
// rate.
// Throughput limit: one 32-bit word per ft_clk, 400 MB/s at 100 MHz.
module qsfp_usb_top
  import qsfp_usb_pkg::*;
#(
  parameter int unsigned TX_FIFO_DEPTH = 512,
  parameter int unsigned RX_FIFO_DEPTH = 1024
) (
  input  logic                gen_clk,
  input  logic                user_clk,
  input  logic                ft_clk,
  input  logic                rst_n,

  input  logic                gen_en,
  input  logic                channel_up,

  // Aurora 64B/66B TX user interface
  output logic [AURORA_W-1:0] tx_tdata,
  output logic                tx_tvalid,
  input  logic                tx_tready,
  // Aurora 64B/66B RX user interface
  input  logic [AURORA_W-1:0] rx_tdata,
  input  logic                rx_tvalid,
  output logic                rx_tready,
  input  logic                rx_can_stall,
  output logic                rx_overflow,

  // FT601 245 synchronous FIFO bus
  output logic [FT_W-1:0]     ft_data_o,
  output logic                ft_data_oe,
  output logic [FT_W/8-1:0]   ft_be_o,
  output logic                ft_wr_n,
  output logic                ft_rd_n,
  output logic                ft_oe_n,
  input  logic                ft_txe_n,
  output logic [31:0]         ft_word_count
);
  logic gen_rst_n, user_rst_n, ft_rst_n;

  reset_sync u_rst_gen  (.clk(gen_clk),  .arst_n(rst_n), .rst_n(gen_rst_n));
  reset_sync u_rst_user (.clk(user_clk), .arst_n(rst_n), .rst_n(user_rst_n));
  reset_sync u_rst_ft   (.clk(ft_clk),   .arst_n(rst_n), .rst_n(ft_rst_n));

  // ---------------- generator domain ----------------
  logic         gen_en_s, chan_up_s;
  aurora_word_t gen_data;
  logic         gen_valid, gen_ready;

  sync_2ff u_sync_en (.clk(gen_clk), .rst_n(gen_rst_n), .d(gen_en),     .q(gen_en_s));
  sync_2ff u_sync_up (.clk(gen_clk), .rst_n(gen_rst_n), .d(channel_up), .q(chan_up_s));

  data_gen #(.DATA_W(AURORA_W), .SAMPLE_W(GEN_SAMPLE_W)) u_gen (
    .clk    (gen_clk),
    .rst_n  (gen_rst_n),
    .en     (gen_en_s && chan_up_s),
    .m_data (gen_data),
    .m_valid(gen_valid),
    .m_ready(gen_ready)
  );

  async_fifo #(.WIDTH(AURORA_W), .DEPTH(TX_FIFO_DEPTH)) u_tx_fifo (
    .wclk   (gen_clk),
    .wrst_n (gen_rst_n),
    .w_data (gen_data),
    .w_valid(gen_valid),
    .w_ready(gen_ready),
    .w_count(),
    .rclk   (user_clk),
    .rrst_n (user_rst_n),
    .r_data (tx_tdata),
    .r_valid(tx_tvalid),
    .r_ready(tx_tready)
  );

  // ---------------- Aurora user-clock domain ----------------
  ft_word_t conv_data;
  logic     conv_valid, conv_ready;

  data_width_conv #(.IN_W(AURORA_W), .OUT_W(FT_W)) u_conv (
    .clk    (user_clk),
    .rst_n  (user_rst_n),
    .s_data (rx_tdata),
    .s_valid(rx_tvalid),
    .s_ready(rx_tready),
    .m_data (conv_data),
    .m_valid(conv_valid),
    .m_ready(conv_ready)
  );

  always_ff @(posedge user_clk or negedge user_rst_n) begin
    if (!user_rst_n)    rx_overflow <= 1'b0;
    else if (rx_tvalid && !rx_tready && !rx_can_stall)
                        rx_overflow <= 1'b1;
  end

  // ---------------- FT601 clock domain ----------------
  ft_word_t ft_fifo_data;
  logic     ft_fifo_valid, ft_fifo_ready;

  async_fifo #(.WIDTH(FT_W), .DEPTH(RX_FIFO_DEPTH)) u_rx_fifo (
    .wclk   (user_clk),
    .wrst_n (user_rst_n),
    .w_data (conv_data),
    .w_valid(conv_valid),
    .w_ready(conv_ready),
    .w_count(),
    .rclk   (ft_clk),
    .rrst_n (ft_rst_n),
    .r_data (ft_fifo_data),
    .r_valid(ft_fifo_valid),
    .r_ready(ft_fifo_ready)
  );

  ft601_tx #(.DATA_W(FT_W)) u_ft (
    .clk       (ft_clk),
    .rst_n     (ft_rst_n),
    .s_data    (ft_fifo_data),
    .s_valid   (ft_fifo_valid),
    .s_ready   (ft_fifo_ready),
    .ft_data_o (ft_data_o),
    .ft_data_oe(ft_data_oe),
    .ft_be_o   (ft_be_o),
    .ft_wr_n   (ft_wr_n),
    .ft_rd_n   (ft_rd_n),
    .ft_oe_n   (ft_oe_n),
    .ft_txe_n  (ft_txe_n),
    .word_count(ft_word_count)
  );
endmodule
