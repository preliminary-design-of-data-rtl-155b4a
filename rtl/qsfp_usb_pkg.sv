// Shared widths and types of the QSFP-to-USB3.0 data exchange firmware.
//
// The datapath carries 16-bit test samples. Four of them fill one 64-bit
// word on the Aurora 64B/66B user interface; the FT601 FIFO bus is 32 bits
// wide, so each Aurora word becomes two FT601 words. The 16-bit sample width
// follows the ramp seen in the read-out data (values 0..65535 that wrap);
// the bus widths are those of the Aurora user interface and the FT601 chip.
package qsfp_usb_pkg;
  localparam int unsigned AURORA_W = 64;        // Aurora 64B/66B user word
  localparam int unsigned FT_W     = 32;        // FT601 DATA[31:0]
  localparam int unsigned GEN_SAMPLE_W = 16;    // one generated test value

  typedef logic [AURORA_W-1:0] aurora_word_t;
  typedef logic [FT_W-1:0]     ft_word_t;
  typedef logic [GEN_SAMPLE_W-1:0] sample_t;
endpackage
