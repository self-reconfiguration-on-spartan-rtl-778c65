// cpcap_ctrl: configuration control flow of the cPCAP core on the SelectMAP
// port.
//
// The controller steps through the write sequence of a slave SelectMAP port:
//   1. assert RDWR_B (drive it low, meaning write) and start the decompressor;
//   2. at least RDWR_SETUP clocks later, and once the decompressor has primed
//      its buffer, assert CSI_B and present one byte on D per clock while the
//      decompressor walks the compressed bitstream up to its final address;
//   3. after the final byte keep CSI_B asserted for NULL_CYCLES more clocks,
//      sending NOOP packets (0x20000000, most significant byte first) so the
//      configuration logic flushes its pipeline;
//   4. deassert CSI_B, and one clock later deassert RDWR_B.
// The SelectMAP port captures D on each rising CCLK edge while CSI_B is low;
// CCLK is the clock of this module, so the port sees every registered output
// at the next edge. BUSY is not needed at CCLK up to 50 MHz, where the port
// never holds off a byte, and is ignored by default (USE_BUSY = 0). With
// USE_BUSY = 1, a rising CCLK edge that finds BUSY high while CSI_B is low
// means the byte on D was not taken, and the controller holds D, CSI_B and its
// own state for that clock; this is the optional BUSY path for faster clocks.
// If the decompressor has no byte in some cycle, CSI_B is raised for that
// cycle only (RDWR_B stays low, so this is a pause and not an abort).
//
// Interface: start begins one reconfiguration when idle (the bitstream
// addresses go straight to the decompressor, which dec_start launches); busy
// is high until the port is released; done pulses for one clock at the end;
// smap_busy is the port's BUSY pin, synchronous to CCLK. All SelectMAP
// outputs come straight from flip-flops.
//
// The step order, the 8 null-op cycles, the one-cycle gaps and leaving BUSY
// unused by default follow the original control flow; the pause on a missing
// byte, the priming wait, the NOOP byte pattern and the BUSY hold rule are
// this design's own.
module cpcap_ctrl
  import cpcap_pkg::*;
#(
  parameter int unsigned RDWR_SETUP  = 1,
  parameter int unsigned NULL_CYCLES = 8,
  parameter bit          USE_BUSY    = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // request
  input  logic              start,
  output logic              busy,
  output logic              done,
  // decompressor
  output logic              dec_start,
  input  logic              dec_primed,
  input  logic              dec_done,
  input  logic              dec_valid,
  input  logic [7:0]        dec_data,
  output logic              dec_ready,
  // SelectMAP port
  input  logic              smap_busy,
  output selectmap_out_t    smap
);

  localparam int unsigned CNT_W = $clog2(NULL_CYCLES + RDWR_SETUP + 1) + 1;

  ctrl_state_t       state;
  logic [CNT_W-1:0]  cnt;
  logic              hold;

  // With BUSY in use, a byte presented while the port reports BUSY was not
  // taken: everything stays as it is for that clock.
  assign hold = USE_BUSY && smap_busy && !smap.csi_b;

  function automatic logic [7:0] noop_byte(input logic [1:0] k);
    unique case (k)
      2'd0:    return SELECTMAP_NOOP[31:24];
      2'd1:    return SELECTMAP_NOOP[23:16];
      2'd2:    return SELECTMAP_NOOP[15:8];
      default: return SELECTMAP_NOOP[7:0];
    endcase
  endfunction

  assign dec_start      = (state == CTRL_IDLE) && start;
  assign dec_ready      = (state == CTRL_STREAM) && !hold;
  assign busy           = (state != CTRL_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= CTRL_IDLE;
      cnt         <= '0;
      done        <= 1'b0;
      smap.d      <= 8'hFF;
      smap.csi_b  <= 1'b1;
      smap.rdwr_b <= 1'b1;
    end else begin
      done <= 1'b0;
      unique case (state)
        CTRL_IDLE: begin
          smap.csi_b  <= 1'b1;
          smap.rdwr_b <= 1'b1;
          if (start) begin
            smap.rdwr_b <= 1'b0;
            cnt         <= '0;
            state       <= CTRL_RDWR;
          end
        end
        CTRL_RDWR: begin
          if (cnt < CNT_W'(RDWR_SETUP)) cnt <= cnt + 1'b1;
          if (cnt + 1'b1 >= CNT_W'(RDWR_SETUP) && dec_primed) state <= CTRL_STREAM;
        end
        CTRL_STREAM: begin
          if (hold) begin
            // keep the byte on D
          end else if (dec_done) begin
            smap.d     <= noop_byte(2'd0);
            smap.csi_b <= 1'b0;
            cnt        <= CNT_W'(1);
            state      <= CTRL_NULLOPS;
          end else begin
            smap.d     <= dec_data;
            smap.csi_b <= !dec_valid;
          end
        end
        CTRL_NULLOPS: begin
          if (hold) begin
            // keep the byte on D
          end else if (cnt < CNT_W'(NULL_CYCLES)) begin
            smap.d     <= noop_byte(cnt[1:0]);
            smap.csi_b <= 1'b0;
            cnt        <= cnt + 1'b1;
          end else begin
            smap.csi_b <= 1'b1;
            state      <= CTRL_CS_OFF;
          end
        end
        CTRL_CS_OFF: begin
          smap.rdwr_b <= 1'b1;
          done        <= 1'b1;
          state       <= CTRL_IDLE;
        end
        default: state <= CTRL_IDLE;
      endcase
    end
  end

endmodule
