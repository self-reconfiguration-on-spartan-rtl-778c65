// cpcap_core: the compressed Parallel Configuration Access Port (cPCAP) core.
//
// A stand-alone soft core that lets an FPGA without an internal configuration
// port reconfigure itself: it reads a compressed partial bitstream from block
// RAM, decompresses it on the fly and writes it, one byte per clock, into the
// device's own slave SelectMAP port, which is wired back to the FPGA's pins
// (the device acts as master and slave at once). The core's clock is also the
// configuration clock CCLK and is forwarded to the port; in the original board
// a DCM makes it (CLK0, 50 MHz), here it enters as clk.
//
// Blocks: cpcap_decompressor (address counter, look-ahead buffer, run-length
// decoder) and cpcap_ctrl (the SelectMAP write sequence). The block RAM itself
// is outside the core, on the mem_* read port.
//
// Interface: pulse start with start_addr/final_addr, the first and last byte
// address of one compressed bitstream in the RAM; busy stays high until the
// port is released and done pulses once. error is set when the compressed
// stream ended inside a token. Timing: RDWR_B falls one clock after start,
// CSI_B follows once the decompressor is primed (a few clocks), then one byte
// per clock, NULL_CYCLES NOOP bytes, CSI_B high, RDWR_B high one clock later.
// smap_busy is the port's BUSY pin; it is ignored unless USE_BUSY is set.
//
// The core's structure follows the original design; the compression format
// and everything described as such in the two sub-blocks are this design's own.
module cpcap_core
  import cpcap_pkg::*;
#(
  parameter int unsigned ADDR_W      = 11,
  parameter logic [7:0]  RLE_ESC     = RLE_ESC_DEFAULT,
  parameter int unsigned RDWR_SETUP  = 1,
  parameter int unsigned NULL_CYCLES = 8,
  parameter bit          USE_BUSY    = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] start_addr,
  input  logic [ADDR_W-1:0] final_addr,
  output logic              busy,
  output logic              done,
  output logic              error,
  // block RAM read port
  output logic              mem_rd_en,
  output logic [ADDR_W-1:0] mem_rd_addr,
  input  logic [7:0]        mem_rd_data,
  // SelectMAP port
  output logic              cclk,
  input  logic              smap_busy,
  output selectmap_out_t    smap
);

  logic              dec_start, dec_primed, dec_done, dec_valid, dec_ready;
  logic              dec_busy;
  logic [7:0]        dec_data;

  cpcap_decompressor #(
    .ADDR_W  (ADDR_W),
    .RLE_ESC (RLE_ESC)
  ) u_dec (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (dec_start),
    .start_addr  (start_addr),
    .final_addr  (final_addr),
    .busy        (dec_busy),
    .primed      (dec_primed),
    .done        (dec_done),
    .error       (error),
    .mem_rd_en   (mem_rd_en),
    .mem_rd_addr (mem_rd_addr),
    .mem_rd_data (mem_rd_data),
    .out_valid   (dec_valid),
    .out_data    (dec_data),
    .out_ready   (dec_ready)
  );

  cpcap_ctrl #(
    .RDWR_SETUP  (RDWR_SETUP),
    .NULL_CYCLES (NULL_CYCLES),
    .USE_BUSY    (USE_BUSY)
  ) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (start),
    .busy           (busy),
    .done           (done),
    .dec_start      (dec_start),
    .dec_primed     (dec_primed),
    .dec_done       (dec_done),
    .dec_valid      (dec_valid),
    .dec_data       (dec_data),
    .dec_ready      (dec_ready),
    .smap_busy      (smap_busy),
    .smap           (smap)
  );

  // CCLK is the core clock, forwarded to the SelectMAP pin.
  assign cclk = clk;

  // The controller only starts a job when the decompressor is idle.
  assert property (@(posedge clk) dec_start |-> !dec_busy);

endmodule
