// cpcap_bram: on-chip block RAM that stores the compressed partial bitstreams.
//
// A byte-wide, dual-port synchronous RAM in the shape of one Spartan-3 block
// RAM used in 2K x 8 mode (2048 bytes; the parity bits are not used). Port A is
// the read port of the cPCAP core: an address presented at one rising edge
// gives its byte after that edge (one cycle latency), one byte per clock.
// Port B is a write port: in the device the contents are fixed by the initial
// configuration bitstream, so port B only serves to load the memory from
// surrounding logic or a testbench. INIT_FILE, when not empty, names a hex file
// read at time zero in place of a configuration-time initialisation.
//
// The one-RAM size and the byte-wide read follow the original design; the
// write port and INIT_FILE are this design's own.
module cpcap_bram #(
  parameter int unsigned DEPTH     = 2048,
  parameter int unsigned ADDR_W    = $clog2(DEPTH),
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  // port A: read
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [7:0]        rd_data,
  // port B: write (load)
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [7:0]        wr_data
);

  logic [7:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
