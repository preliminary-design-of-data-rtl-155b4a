// Data transmission module: writes the data stream into the FT601
// USB3.0-to-FIFO bridge, which forwards it to the PC over SuperSpeed USB.
//
// FT601 write rule (245 synchronous FIFO mode, from the chip's datasheet):
// the FT601 drives CLK; it takes DATA/BE on a rising CLK edge at which both
// TXE_N (its "room in the transmit FIFO" flag, active low) and WR_N are low.
//
// How it works: DATA, BE and WR_N come straight from flip-flops clocked by
// the FT601 CLK. A word is loaded into the output register with WR_N low
// and held there until an edge at which TXE_N is low; that edge is the
// FT601's acceptance, and in the same edge the next word from the FIFO is
// loaded. So while TXE_N stays low one 32-bit word moves per CLK cycle
// (400 MB/s at 100 MHz), and when TXE_N rises the current word simply waits:
// nothing is lost and nothing is written twice.
//
// Interface: valid/ready input stream (s_ready is high when the output
// register is empty or is being accepted); FT601 pins as separate output
// value and drive enable for the DATA/BE pads. The module only writes:
// RD_N and OE_N stay high, so the FT601 never drives the bus. BE is all
// ones (every word is a full 4 bytes). word_count counts accepted words.
// The register-held handshake and write-only use are this design's choices.
module ft601_tx
  import qsfp_usb_pkg::*;
#(
  parameter int unsigned DATA_W = FT_W
) (
  input  logic                clk,        // FT601 CLK
  input  logic                rst_n,
  input  logic [DATA_W-1:0]   s_data,
  input  logic                s_valid,
  output logic                s_ready,
  output logic [DATA_W-1:0]   ft_data_o,
  output logic                ft_data_oe,
  output logic [DATA_W/8-1:0] ft_be_o,
  output logic                ft_wr_n,
  output logic                ft_rd_n,
  output logic                ft_oe_n,
  input  logic                ft_txe_n,
  output logic [31:0]         word_count
);
  logic accepted;

  assign accepted = !ft_wr_n && !ft_txe_n;
  assign s_ready  = ft_wr_n || !ft_txe_n;
  assign ft_rd_n  = 1'b1;
  assign ft_oe_n  = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ft_data_o  <= '0;
      ft_be_o    <= '0;
      ft_wr_n    <= 1'b1;
      ft_data_oe <= 1'b0;
      word_count <= '0;
    end else begin
      ft_data_oe <= 1'b1;
      if (s_valid && s_ready) begin
        ft_data_o <= s_data;
        ft_be_o   <= '1;
        ft_wr_n   <= 1'b0;
      end else if (accepted) begin
        ft_wr_n   <= 1'b1;
      end
      if (accepted) word_count <= word_count + 32'd1;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    !ft_wr_n && ft_txe_n |=> !ft_wr_n && $stable(ft_data_o));
endmodule
