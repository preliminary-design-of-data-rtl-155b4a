// Data generation module: the test source of the data exchange firmware.
//
// It produces continuously growing data: a free-running SAMPLE_W-bit counter
// whose consecutive values are packed DATA_W/SAMPLE_W at a time into one
// output word, the first value in the least significant bits. Read on the PC
// as a little-endian stream of 16-bit words the data is the ramp
// 0, 1, 2, ..., 65535, 0, 1, ... The ramp and its wrap at 2^16 follow the
// read-out data of the original test; the packing order is this design's
// choice.
//
// Interface: valid/ready stream. m_valid is high whenever en is high; the
// counter advances by DATA_W/SAMPLE_W only when a word is taken
// (m_valid && m_ready), so back-pressure never leaves a gap in the ramp.
// With m_ready held high one word leaves per clock cycle. Clearing en stops
// the stream after the word in flight is taken; the ramp resumes where it
// stopped.
module data_gen
  import qsfp_usb_pkg::*;
#(
  parameter int unsigned DATA_W   = AURORA_W,
  parameter int unsigned SAMPLE_W = GEN_SAMPLE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  output logic [DATA_W-1:0] m_data,
  output logic              m_valid,
  input  logic              m_ready
);
  localparam int unsigned LANES = DATA_W / SAMPLE_W;

  logic [SAMPLE_W-1:0] base_q;   // value carried in the lowest lane

  always_comb begin
    for (int unsigned i = 0; i < LANES; i++)
      m_data[i*SAMPLE_W +: SAMPLE_W] = base_q + SAMPLE_W'(i);
  end

  // m_valid is a register so that the stream rule below holds: once raised
  // it stays until the word is taken.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_q  <= '0;
      m_valid <= 1'b0;
    end else begin
      if (m_valid && m_ready) base_q <= base_q + SAMPLE_W'(LANES);
      if (!m_valid || m_ready) m_valid <= en;
    end
  end

  initial assert (DATA_W % SAMPLE_W == 0)
    else $error("DATA_W must be a multiple of SAMPLE_W");

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_data));
endmodule
