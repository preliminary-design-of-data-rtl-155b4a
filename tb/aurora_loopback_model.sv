// Behavioural model, not synthesizable: stands in for the Aurora 64B/66B
// core together with an optical module looped back on itself. Words taken
// from the TX user interface reappear on the RX user interface LATENCY
// user clocks later, in order. channel_up rises UP_DELAY clocks after
// reset. tx_tready drops for one cycle in every TX_GAP (the core's idle and
// clock-compensation slots). With honor_ready set the RX side waits for
// rx_tready and the TX side stops taking words while its in-flight store
// holds CAPACITY words; with honor_ready clear RX words are delivered
// regardless, as a real Aurora RX interface does.
module aurora_loopback_model #(
  parameter int LATENCY  = 20,
  parameter int UP_DELAY = 50,
  parameter int TX_GAP   = 32,
  parameter int CAPACITY = 64
) (
  input  logic        user_clk,
  input  logic        rst_n,
  input  logic        honor_ready,
  output logic        channel_up,
  input  logic [63:0] tx_tdata,
  input  logic        tx_tvalid,
  output logic        tx_tready,
  output logic [63:0] rx_tdata,
  output logic        rx_tvalid,
  input  logic        rx_tready
);
  logic [63:0] data_q[$];
  longint      due_q[$];
  longint      cyc = 0;
  int          up_cnt = 0;

  initial begin
    channel_up = 1'b0; tx_tready = 1'b0; rx_tvalid = 1'b0; rx_tdata = '0;
  end

  always @(posedge user_clk) begin
    if (!rst_n) begin
      up_cnt <= 0; channel_up <= 1'b0; tx_tready <= 1'b0; rx_tvalid <= 1'b0;
      data_q.delete(); due_q.delete();
    end else begin
      cyc = cyc + 1;
      if (up_cnt < UP_DELAY) up_cnt <= up_cnt + 1;
      channel_up <= (up_cnt >= UP_DELAY);
      // RX side: current word leaves when taken (or unconditionally)
      if (rx_tvalid && (rx_tready || !honor_ready)) begin
        void'(data_q.pop_front()); void'(due_q.pop_front());
      end
      // TX side
      if (tx_tvalid && tx_tready) begin
        data_q.push_back(tx_tdata); due_q.push_back(cyc + longint'(LATENCY));
      end
      tx_tready <= channel_up && ((cyc % longint'(TX_GAP)) != 0) && (data_q.size() < CAPACITY);
      // present the next due word
      rx_tvalid <= 1'b0;
      if (data_q.size() > 0 && due_q[0] <= cyc) begin
        rx_tvalid <= 1'b1; rx_tdata <= data_q[0];
      end
    end
  end
endmodule
