// Data width convertor: turns each IN_W-bit word received over the Aurora
// 64B/66B link into IN_W/OUT_W words for the OUT_W-bit FT601 bus, least
// significant part first. With the generator's little-endian packing this
// keeps the 16-bit samples in counting order on the USB byte stream.
//
// How it works: one IN_W-bit holding register and a part counter. The
// holding register is loaded when it is empty or when its last part leaves
// in the same cycle, so the convertor emits one narrow word every cycle
// while the input keeps up: it accepts at most one wide word per
// IN_W/OUT_W cycles.
//
// Interface: valid/ready streams on both sides; s_ready is high when the
// holding register is empty or its last part is being taken. Output latency
// is one clock. The widths (64 to 32) and the part order are this design's
// reading of the convertor named in the firmware block diagram.
module data_width_conv
  import qsfp_usb_pkg::*;
#(
  parameter int unsigned IN_W  = AURORA_W,
  parameter int unsigned OUT_W = FT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  s_data,
  input  logic             s_valid,
  output logic             s_ready,
  output logic [OUT_W-1:0] m_data,
  output logic             m_valid,
  input  logic             m_ready
);
  localparam int unsigned PARTS = IN_W / OUT_W;
  localparam int unsigned PW    = (PARTS > 1) ? $clog2(PARTS) : 1;

  logic [IN_W-1:0] hold_q;
  logic [PW-1:0]   part_q;
  logic            last_part;

  assign last_part = (part_q == PW'(PARTS - 1));
  assign m_data    = hold_q[part_q*OUT_W +: OUT_W];
  assign s_ready   = !m_valid || (m_ready && last_part);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q  <= '0;
      part_q  <= '0;
      m_valid <= 1'b0;
    end else if (s_valid && s_ready) begin
      hold_q  <= s_data;
      part_q  <= '0;
      m_valid <= 1'b1;
    end else if (m_valid && m_ready) begin
      if (last_part) m_valid <= 1'b0;
      else           part_q  <= part_q + PW'(1);
    end
  end

  initial assert (IN_W % OUT_W == 0 && PARTS >= 2)
    else $error("IN_W must be at least twice OUT_W and a multiple of it");

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_data));
endmodule
