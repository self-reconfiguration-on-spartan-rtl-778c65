// cpcap_decompressor: on-the-fly decompression of a partial bitstream stored
// in block RAM.
//
// After a start pulse the fetch stage reads the compressed bytes from
// start_addr up to and including final_addr, one per clock, into a 4-byte
// look-ahead buffer. The decode stage looks at the first three buffered bytes
// and emits one configuration byte per clock (see cpcap_pkg for the token
// format): a literal byte takes one buffered byte, an escaped literal two, and
// the first byte of a run takes the three-byte run token at once, after which
// the run repeats from its own counter while the buffer refills. A run of three
// or more bytes therefore hides the refill, and the output stays at one byte
// per clock as long as the stream has no escaped literals; those cost one
// bubble each. primed rises once three bytes (or the whole stream) are
// buffered, so that the consumer can start without an early bubble.
//
// Interface: start/start_addr/final_addr load a job (ignored while busy);
// mem_* is a read port with one cycle latency; out_valid/out_data/out_ready
// is a valid-ready stream (a byte moves when both are high); done is a
// one-cycle pulse, in a clock with out_ready high, after the last byte has
// moved; error is set with done when the stream ended inside a token (the
// partial token is dropped).
//
// Decompressing while the bitstream is sent, at the configuration byte rate,
// follows the original design; the compression format, buffer depth and
// handshake are this design's own.
module cpcap_decompressor
  import cpcap_pkg::*;
#(
  parameter int unsigned ADDR_W  = 11,
  parameter logic [7:0]  RLE_ESC = RLE_ESC_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  // job
  input  logic              start,
  input  logic [ADDR_W-1:0] start_addr,
  input  logic [ADDR_W-1:0] final_addr,
  output logic              busy,
  output logic              primed,
  output logic              done,
  output logic              error,
  // block RAM read port
  output logic              mem_rd_en,
  output logic [ADDR_W-1:0] mem_rd_addr,
  input  logic [7:0]        mem_rd_data,
  // decompressed byte stream
  output logic              out_valid,
  output logic [7:0]        out_data,
  input  logic              out_ready
);

  localparam int unsigned BUF_DEPTH = 4;

  typedef enum logic [2:0] {TOK_NONE, TOK_RUN, TOK_LIT, TOK_ESCLIT, TOK_RUNSTART} tok_t;

  logic              active;
  logic              fetching;
  logic              inflight;
  logic [ADDR_W-1:0] fetch_addr;
  logic [ADDR_W-1:0] last_addr;
  logic [7:0]        buf_q [BUF_DEPTH];
  logic [2:0]        count;
  logic              run_active;
  logic [7:0]        run_left;    // bytes of the run still to send
  logic [7:0]        run_val;

  tok_t       tok;
  logic       fire;
  logic [1:0] pop;
  logic       issue;
  logic       fetch_over;
  logic       stream_end;

  // ---------------------------------------------------------------- decode
  always_comb begin
    tok = TOK_NONE;
    if (run_active)
      tok = TOK_RUN;
    else if (count >= 3'd1 && buf_q[0] != RLE_ESC)
      tok = TOK_LIT;
    else if (count >= 3'd2 && buf_q[0] == RLE_ESC && buf_q[1] == 8'h00)
      tok = TOK_ESCLIT;
    else if (count >= 3'd3 && buf_q[0] == RLE_ESC)
      tok = TOK_RUNSTART;
  end

  always_comb begin
    unique case (tok)
      TOK_RUN:      out_data = run_val;
      TOK_LIT:      out_data = buf_q[0];
      TOK_ESCLIT:   out_data = RLE_ESC;
      TOK_RUNSTART: out_data = buf_q[2];
      default:      out_data = 8'h00;
    endcase
  end

  assign out_valid = active && (tok != TOK_NONE);
  assign fire      = out_valid && out_ready;

  always_comb begin
    pop = 2'd0;
    if (fire) begin
      unique case (tok)
        TOK_LIT:      pop = 2'd1;
        TOK_ESCLIT:   pop = 2'd2;
        TOK_RUNSTART: pop = 2'd3;
        default:      pop = 2'd0;
      endcase
    end
  end

  // ----------------------------------------------------------------- fetch
  // Issue a read when the byte fits in the buffer, counting the byte in flight
  // and the bytes leaving the buffer this cycle.
  assign issue       = active && fetching &&
                       ({1'b0, count} + {3'b000, inflight} - {2'b00, pop} < 4'(BUF_DEPTH));
  assign mem_rd_en   = issue;
  assign mem_rd_addr = fetch_addr;

  assign fetch_over = !fetching && !inflight;
  // The stream ends when everything fetched has been sent, or when what is
  // left can never form a complete token.
  // It is reported only while the consumer is ready, so that a consumer that
  // is holding a byte cannot miss it.
  assign stream_end = active && fetch_over && !run_active && out_ready &&
                      (count == 3'd0 || tok == TOK_NONE);

  assign busy   = active;
  assign primed = active && (run_active || count >= 3'd3 || fetch_over);
  assign done   = stream_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      fetching   <= 1'b0;
      inflight   <= 1'b0;
      fetch_addr <= '0;
      last_addr  <= '0;
      count      <= 3'd0;
      run_active <= 1'b0;
      run_left   <= 8'd0;
      run_val    <= 8'd0;
      error      <= 1'b0;
      for (int i = 0; i < BUF_DEPTH; i++) buf_q[i] <= 8'h00;
    end else begin
      if (!active) begin
        if (start) begin
          active     <= 1'b1;
          fetching   <= 1'b1;
          fetch_addr <= start_addr;
          last_addr  <= final_addr;
          count      <= 3'd0;
          run_active <= 1'b0;
          error      <= 1'b0;
        end
      end else begin
        // fetch address counter
        inflight <= issue;
        if (issue) begin
          fetch_addr <= fetch_addr + 1'b1;
          if (fetch_addr == last_addr) fetching <= 1'b0;
        end

        // buffer: drop the popped bytes, append the byte arriving from RAM
        begin
          logic [7:0] nxt [BUF_DEPTH];
          logic [2:0] n;
          n = count - {1'b0, pop};
          for (int i = 0; i < BUF_DEPTH; i++)
            nxt[i] = (i + int'(pop) < BUF_DEPTH) ? buf_q[i + int'(pop)] : 8'h00;
          if (inflight) begin
            nxt[n[1:0]] = mem_rd_data;
            n = n + 3'd1;
          end
          buf_q <= nxt;
          count <= n;
        end

        // run counter
        if (fire && tok == TOK_RUNSTART && buf_q[1] != 8'd1) begin
          run_active <= 1'b1;
          run_left   <= buf_q[1] - 8'd1;
          run_val    <= buf_q[2];
        end else if (fire && tok == TOK_RUN) begin
          run_left <= run_left - 8'd1;
          if (run_left == 8'd1) run_active <= 1'b0;
        end

        if (stream_end) begin
          active <= 1'b0;
          error  <= (count != 3'd0);
          count  <= 3'd0;
        end
      end
    end
  end

endmodule
