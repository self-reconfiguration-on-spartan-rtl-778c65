// cpcap_tb_pkg: test helpers for the cPCAP testbenches.
//
// encode()   the compressor for the run-length format of cpcap_pkg: runs of
//            three or more equal bytes (and runs of two escape bytes) become
//            ESC n v, a lone escape byte becomes ESC 0, anything else is
//            copied.
// decode()   a plain reference decoder of the same format, used to check
//            encode() independently of the hardware.
// gen_bitstream() builds a synthetic partial bitstream of a given length with
//            the shape of a Spartan-3 SelectMAP bitstream: dummy and sync
//            words, a few command packets, sparse frame data (mostly zero
//            bytes with scattered non-zero bytes and some 0xFF runs), a
//            desync command and NOOP padding. The byte values come from a
//            xorshift32 generator seeded by the caller; with no_esc set the
//            escape byte never appears in it.
package cpcap_tb_pkg;

  typedef logic [7:0] byte_q_t[$];

  function automatic logic [31:0] xorshift(inout logic [31:0] s);
    s = s ^ (s << 13);
    s = s ^ (s >> 17);
    s = s ^ (s << 5);
    return s;
  endfunction

  function automatic byte_q_t encode(input byte_q_t src, input logic [7:0] esc);
    byte_q_t dst;
    int i = 0;
    while (i < src.size()) begin
      logic [7:0] b = src[i];
      int r = 1;
      while (i + r < src.size() && src[i + r] == b && r < 255) r++;
      if (r >= 3 || (b == esc && r >= 2)) begin
        dst.push_back(esc);
        dst.push_back(8'(r));
        dst.push_back(b);
      end else begin
        for (int k = 0; k < r; k++) begin
          if (b == esc) begin
            dst.push_back(esc);
            dst.push_back(8'h00);
          end else begin
            dst.push_back(b);
          end
        end
      end
      i += r;
    end
    return dst;
  endfunction

  function automatic byte_q_t decode(input byte_q_t src, input logic [7:0] esc);
    byte_q_t dst;
    int i = 0;
    while (i < src.size()) begin
      if (src[i] != esc) begin
        dst.push_back(src[i]);
        i += 1;
      end else if (i + 1 < src.size() && src[i + 1] == 8'h00) begin
        dst.push_back(esc);
        i += 2;
      end else if (i + 2 < src.size()) begin
        for (int k = 0; k < int'(src[i + 1]); k++) dst.push_back(src[i + 2]);
        i += 3;
      end else begin
        i = src.size();
      end
    end
    return dst;
  endfunction

  // Number of tokens that give fewer output bytes than they occupy in the
  // stream: escaped literals (ESC 0) and runs shorter than three bytes. Each
  // may cost the decompressor one output gap.
  function automatic int count_slow_tokens(input byte_q_t enc, input logic [7:0] esc);
    int n = 0;
    int i = 0;
    while (i < enc.size()) begin
      if (enc[i] != esc) i += 1;
      else if (i + 1 < enc.size() && enc[i + 1] == 8'h00) begin n++; i += 2; end
      else begin
        if (i + 1 < enc.size() && enc[i + 1] < 8'd3) n++;
        i += 3;
      end
    end
    return n;
  endfunction

  function automatic void push_word(ref byte_q_t q, input logic [31:0] w);
    q.push_back(w[31:24]);
    q.push_back(w[23:16]);
    q.push_back(w[15:8]);
    q.push_back(w[7:0]);
  endfunction

  function automatic byte_q_t gen_bitstream(input int len, input logic [31:0] seed,
                                            input bit no_esc, input logic [7:0] esc,
                                            input int nz_per_mille);
    byte_q_t q;
    logic [31:0] s = seed;
    int tail;
    push_word(q, 32'hFFFF_FFFF);     // dummy
    push_word(q, 32'hAA99_5566);     // sync word
    push_word(q, 32'h3000_8001);     // write CMD
    push_word(q, 32'h0000_0007);     // RCRC
    push_word(q, 32'h2000_0000);     // NOOP
    push_word(q, 32'h3000_2001);     // write FAR
    push_word(q, 32'h0000_0000 | (xorshift(s) & 32'h0000_FFFF));
    push_word(q, 32'h3000_8001);     // write CMD
    push_word(q, 32'h0000_0001);     // WCFG
    push_word(q, 32'h3000_4000);     // write FDRI, type-2 length follows
    tail = 6 * 4;
    push_word(q, 32'h5000_0000 | 32'((len - q.size() - 4 - tail) / 4));
    while (q.size() < len - tail) begin
      logic [31:0] r = xorshift(s);
      if (int'(r % 1000) < nz_per_mille) begin
        logic [7:0] v = r[23:16];
        if (v == 8'h00) v = 8'h01;
        if (no_esc && v == esc) v = 8'h3C;
        q.push_back(v);
      end else if (int'(r % 1000) < nz_per_mille + 4) begin
        int n = 4 + int'(r[27:24]);
        for (int k = 0; k < n && q.size() < len - tail; k++) q.push_back(8'hFF);
      end else begin
        q.push_back(8'h00);
      end
    end
    push_word(q, 32'h3000_8001);     // write CMD
    push_word(q, 32'h0000_000D);     // DESYNC
    for (int k = 0; k < 4; k++) push_word(q, 32'h2000_0000);
    return q;
  endfunction

endpackage
