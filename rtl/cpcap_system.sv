// cpcap_system: a self-reconfiguring FPGA built around the cPCAP core.
//
// Everything inside one device: a block RAM holding compressed partial
// bitstreams, the cPCAP core that decompresses one of them and writes it out
// on the SelectMAP pins, and the example user circuit, a 4-bit up-down counter
// in the reconfigurable area. On the board the SelectMAP outputs (D[0:7],
// CSI_B, RDWR_B, CCLK) are looped back by external wires to the same device's
// configuration port, which is set to slave parallel mode by the mode pins
// M2 M1 M0 = 1 1 0 (brought out as the constant mode output). That port and
// the DCMs are hard device blocks and stay outside this module. The port's
// BUSY pin may come back in as smap_busy; it is used only with USE_BUSY = 1,
// off by default because BUSY is not needed up to 50 MHz. clk is the 50 MHz
// configuration clock (DCM CLK0), app_clk the reconfigurable DCM output that
// runs the counter at 5 or 50 MHz depending on which bitstream was written
// last.
//
// Interface: load_* writes the block RAM (in the device its contents come with
// the initial configuration); reconfig_start with reconfig_start_addr and
// reconfig_final_addr writes the compressed bitstream stored between those
// addresses; reconfig_busy/done/error report on it. smap_d carries the byte
// with bit 7 on pin D0. Timing is that of cpcap_core: one configuration byte
// per clk, i.e. 50 MByte/s at 50 MHz.
//
// The partition and the loopback follow the original system; the load port,
// the counter's enable and direction inputs are this design's own.
module cpcap_system
  import cpcap_pkg::*;
#(
  parameter int unsigned BRAM_DEPTH  = 2048,
  parameter int unsigned ADDR_W      = $clog2(BRAM_DEPTH),
  parameter string       INIT_FILE   = "",
  parameter logic [7:0]  RLE_ESC     = RLE_ESC_DEFAULT,
  parameter int unsigned NULL_CYCLES = 8,
  parameter bit          USE_BUSY    = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // block RAM load
  input  logic              load_en,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [7:0]        load_data,
  // reconfiguration request
  input  logic              reconfig_start,
  input  logic [ADDR_W-1:0] reconfig_start_addr,
  input  logic [ADDR_W-1:0] reconfig_final_addr,
  output logic              reconfig_busy,
  output logic              reconfig_done,
  output logic              reconfig_error,
  // SelectMAP loopback pins
  output logic [7:0]        smap_d,
  output logic              smap_csi_b,
  output logic              smap_rdwr_b,
  output logic              smap_cclk,
  input  logic              smap_busy,
  output logic [2:0]        smap_mode,
  // example user circuit
  input  logic              app_clk,
  input  logic              app_rst_n,
  input  logic              app_en,
  input  logic              app_up,
  output logic [3:0]        app_count
);

  logic              mem_rd_en;
  logic [ADDR_W-1:0] mem_rd_addr;
  logic [7:0]        mem_rd_data;
  selectmap_out_t    smap;

  cpcap_bram #(
    .DEPTH     (BRAM_DEPTH),
    .ADDR_W    (ADDR_W),
    .INIT_FILE (INIT_FILE)
  ) u_bram (
    .clk     (clk),
    .rd_en   (mem_rd_en),
    .rd_addr (mem_rd_addr),
    .rd_data (mem_rd_data),
    .wr_en   (load_en),
    .wr_addr (load_addr),
    .wr_data (load_data)
  );

  cpcap_core #(
    .ADDR_W      (ADDR_W),
    .RLE_ESC     (RLE_ESC),
    .NULL_CYCLES (NULL_CYCLES),
    .USE_BUSY    (USE_BUSY)
  ) u_core (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (reconfig_start),
    .start_addr  (reconfig_start_addr),
    .final_addr  (reconfig_final_addr),
    .busy        (reconfig_busy),
    .done        (reconfig_done),
    .error       (reconfig_error),
    .mem_rd_en   (mem_rd_en),
    .mem_rd_addr (mem_rd_addr),
    .mem_rd_data (mem_rd_data),
    .cclk        (smap_cclk),
    .smap_busy   (smap_busy),
    .smap        (smap)
  );

  assign smap_d      = smap.d;
  assign smap_csi_b  = smap.csi_b;
  assign smap_rdwr_b = smap.rdwr_b;
  assign smap_mode   = SELECTMAP_MODE;

  updown_counter4 #(.WIDTH(4)) u_counter (
    .clk   (app_clk),
    .rst_n (app_rst_n),
    .en    (app_en),
    .up    (app_up),
    .q     (app_count)
  );

endmodule
