// selectmap_model: behavioural model of the slave SelectMAP configuration port
// of a Spartan-3 device, as seen from its pins, for testbenches.
//
// Not synthesizable and not a model of the configuration memory: on every
// rising CCLK edge with CSI_B and RDWR_B both low and BUSY low it captures D into the
// captured queue (bit 7 of d is pin D0). It checks the pin protocol: RDWR_B
// must not change while CSI_B is low (that would be an abort), and CSI_B must
// not fall in the same cycle as RDWR_B. It also follows the packet stream far
// enough to notice the sync word AA995566 and counts the write sessions
// (groups of consecutive captured bytes) and the pauses inside a session
// (CSI_B high while RDWR_B stays low between two written bytes). With
// BUSY_PERCENT above zero it drives BUSY high in that share of the clocks, at
// random; a byte presented while BUSY is high is not taken.
module selectmap_model #(
  parameter int BUSY_PERCENT = 0
) (
  input  logic       cclk,
  input  logic [7:0] d,
  input  logic       csi_b,
  input  logic       rdwr_b,
  output logic       busy
);

  int busy_cycles = 0;

  // BUSY changes after the falling CCLK edge; a byte is taken only at a rising
  // edge that finds BUSY low.
  initial busy = 1'b0;
  always @(negedge cclk) begin
    busy = (BUSY_PERCENT > 0) && (int'($urandom % 100) < BUSY_PERCENT);
  end

  logic [7:0]  captured[$];
  int          protocol_errors = 0;
  int          sync_seen = 0;
  int          pauses = 0;
  int          sessions = 0;
  logic [31:0] shreg = '0;
  logic        prev_csi_b = 1'b1;
  logic        prev_rdwr_b = 1'b1;
  logic        wrote_in_session = 1'b0;

  always @(posedge cclk) begin
    if (!prev_csi_b && rdwr_b != prev_rdwr_b) protocol_errors++;
    if (!csi_b && prev_csi_b && rdwr_b != prev_rdwr_b) protocol_errors++;
    if (!rdwr_b && prev_rdwr_b) begin
      sessions++;
      wrote_in_session = 1'b0;
    end
    if (!csi_b && prev_csi_b && !rdwr_b && wrote_in_session) pauses++;
    if (!csi_b && !rdwr_b && busy) busy_cycles++;
    if (!csi_b && !rdwr_b && !busy) begin
      captured.push_back(d);
      shreg = {shreg[23:0], d};
      if (shreg == 32'hAA99_5566) sync_seen++;
      wrote_in_session = 1'b1;
    end
    prev_csi_b  = csi_b;
    prev_rdwr_b = rdwr_b;
  end

endmodule
