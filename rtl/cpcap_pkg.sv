// cpcap_pkg: constants and types shared by the cPCAP self-reconfiguration core.
//
// The compressed bitstream format read by cpcap_decompressor is defined here.
// The byte stream is a sequence of tokens:
//   b            (b != RLE_ESC)  one literal byte b
//   RLE_ESC 0x00                 one literal byte equal to RLE_ESC
//   RLE_ESC n v  (n = 1..255)    byte v repeated n times
// Runs of three or more bytes decode without any output bubble. The format is
// this design's own choice: the compression algorithm itself is not specified
// by the original description, only that decompression happens on the fly at
// the configuration byte rate.
//
// SelectMAP constants: NOOP is the 32-bit Type-1 no-operation packet of the
// Xilinx configuration packet format, sent most significant byte first as the
// "null ops" after the last bitstream byte.
package cpcap_pkg;

  // Escape byte that introduces a run token. Chosen as a value that is rare in
  // configuration data (not 0x00, 0xFF or part of the sync word AA995566).
  localparam logic [7:0] RLE_ESC_DEFAULT = 8'hC3;

  // Type-1 NOOP configuration packet.
  localparam logic [31:0] SELECTMAP_NOOP = 32'h2000_0000;

  // Mode pins M2 M1 M0 for slave parallel (SelectMAP) mode.
  localparam logic [2:0] SELECTMAP_MODE = 3'b110;

  // States of the configuration control flow.
  typedef enum logic [2:0] {
    CTRL_IDLE,       // port released: RDWR_B and CSI_B high
    CTRL_RDWR,       // RDWR_B asserted (low), CSI_B still high
    CTRL_STREAM,     // CSI_B low for every cycle with a valid byte on D
    CTRL_NULLOPS,    // NOOP bytes after the final address
    CTRL_CS_OFF      // CSI_B deasserted, RDWR_B released one cycle later
  } ctrl_state_t;

  // Pins the core drives on the SelectMAP port.
  typedef struct packed {
    logic [7:0] d;       // data byte, bit 7 goes to pin D0 (MSB-first pin order)
    logic       csi_b;   // chip select, active low
    logic       rdwr_b;  // 0 = write into the configuration logic
  } selectmap_out_t;

endpackage
