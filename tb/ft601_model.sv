// Behavioural model, not synthesizable: the FIFO side of an FT601 in 245
// synchronous FIFO mode, write direction only. It drives CLK (100 MHz),
// takes DATA on a rising CLK edge where TXE_N and WR_N are both low, and
// keeps the words in a BUF-word transmit buffer that the USB side empties
// by one word on a cycle when usb_drain is high. TXE_N is a register that
// goes high when the buffer would be full after the current edge, so a
// word is never offered room that does not exist. Each accepted word is
// shown on got_valid/got_data for one cycle.
module ft601_model #(
  parameter int BUF = 1024
) (
  output logic        clk,
  input  logic        rst_n,
  input  logic        usb_drain,
  input  logic [31:0] data,
  input  logic [3:0]  be,
  input  logic        wr_n,
  output logic        txe_n,
  output logic        got_valid,
  output logic [31:0] got_data,
  output logic [3:0]  got_be
);
  int fill = 0;

  initial begin
    clk = 1'b0; txe_n = 1'b1; got_valid = 1'b0; got_data = '0; got_be = '0;
  end
  always #5 clk = ~clk;

  always @(posedge clk) begin
    int nfill;
    nfill = fill;
    got_valid <= 1'b0;
    if (!rst_n) begin
      nfill = 0;
    end else begin
      if (!wr_n && !txe_n) begin
        nfill++;
        got_valid <= 1'b1; got_data <= data; got_be <= be;
      end
      if (usb_drain && nfill > 0) nfill--;
    end
    fill  <= nfill;
    txe_n <= !rst_n || (nfill >= BUF);
  end
endmodule
