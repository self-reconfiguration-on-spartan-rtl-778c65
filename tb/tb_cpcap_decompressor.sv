// tb_cpcap_decompressor: self-checking testbench of the on-the-fly
// decompressor.
//
// A 2048-byte memory with one clock read latency stands in for the block RAM.
// Each job encodes a test byte sequence with the reference encoder, places it
// at some address, starts the decompressor and compares every output byte with
// the original sequence. Jobs cover: single literals, runs (3 bytes, 255
// bytes, longer runs split into several tokens), escape bytes in the data, a
// synthetic bitstream, random data with back-pressure on out_ready, and a
// truncated stream that must end with error. With out_ready held high the
// output must be gap-free (one byte per clock from the first byte) unless the
// stream holds slow tokens (escaped literals, runs shorter than three bytes),
// and the number of gaps may not exceed the number of slow tokens.
module tb_cpcap_decompressor;
  import cpcap_pkg::*;
  import cpcap_tb_pkg::*;

  localparam int AW = 11;
  localparam logic [7:0] ESC = RLE_ESC_DEFAULT;

  logic          clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a reset edge at start
  logic          start = 1'b0;
  logic [AW-1:0] start_addr = '0, final_addr = '0;
  logic          busy, primed, done, error;
  logic          mem_rd_en;
  logic [AW-1:0] mem_rd_addr;
  logic [7:0]    mem_rd_data = '0;
  logic          out_valid, out_ready = 1'b1;
  logic [7:0]    out_data;
  logic [7:0]    mem [2048];
  int            checks = 0, failures = 0;

  cpcap_decompressor dut (.*);

  always #10 clk = ~clk;
  always @(posedge clk) if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Run one job; random_ready applies back-pressure.
  task automatic run_job(input byte_q_t plain, input int base, input bit random_ready,
                         input string name);
    byte_q_t enc, got;
    int first_cycle = -1, last_cycle = 0, cycle = 0, gaps = 0, mism = 0;
    int slow;
    logic [31:0] s = 32'hC0FF_EE01 ^ 32'(base);
    enc = encode(plain, ESC);
    slow = count_slow_tokens(enc, ESC);
    expect_true(decode(enc, ESC) == plain, {name, ": reference encode/decode"});
    for (int i = 0; i < enc.size(); i++) mem[base + i] = enc[i];
    @(negedge clk);
    out_ready = 1'b0;
    start = 1'b1; start_addr = AW'(base); final_addr = AW'(base + enc.size() - 1);
    @(negedge clk);
    start = 1'b0;
    // wait until primed, as the controller does
    while (!primed) @(negedge clk);
    while (!done) begin
      logic [31:0] r;
      r = xorshift(s);
      out_ready = random_ready ? r[0] | r[1] : 1'b1;
      #1;
      if (out_valid && out_ready) begin
        got.push_back(out_data);
        if (first_cycle < 0) first_cycle = cycle;
        last_cycle = cycle;
      end else if (first_cycle >= 0 && out_ready) begin
        gaps++;
      end
      @(negedge clk);
      cycle++;
    end
    out_ready = 1'b1;
    expect_true(!error, {name, ": no error"});
    expect_true(got.size() == plain.size(), $sformatf("%s: %0d bytes out, %0d expected", name, got.size(), plain.size()));
    for (int i = 0; i < plain.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != plain[i]) begin
        failures++;
        mism++;
        if (mism < 5) $display("FAIL %s: byte %0d got %02h expected %02h", name, i, got[i], plain[i]);
      end
    end
    if (!random_ready) begin
      // gaps before the last byte
      int span = last_cycle - first_cycle + 1;
      if (slow == 0)
        expect_true(span == plain.size(), $sformatf("%s: %0d bytes took %0d cycles", name, plain.size(), span));
      else
        expect_true(span <= plain.size() + slow, $sformatf("%s: %0d bytes took %0d cycles, %0d slow tokens", name, plain.size(), span, slow));
    end
    $display("%s: %0d bytes -> %0d compressed, %0d slow tokens", name, plain.size(), enc.size(), slow);
    @(negedge clk);
  endtask

  initial begin
    byte_q_t p;
    static logic [31:0] s = 32'h0BAD_F00D;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    p = '{8'h11};                                   run_job(p, 0, 0, "single literal");
    p = '{8'h11, 8'h22, 8'h33, 8'h44, 8'h55};       run_job(p, 10, 0, "literals");
    p = '{8'h00, 8'h00, 8'h00};                     run_job(p, 20, 0, "run of 3");
    p = {};
    for (int i = 0; i < 600; i++) p.push_back(8'hFF);
    p.push_back(8'h12);
    for (int i = 0; i < 255; i++) p.push_back(8'h00);
    p.push_back(8'h34);                             run_job(p, 30, 0, "long runs");
    p = {};
    for (int i = 0; i < 40; i++) begin
      p.push_back(8'hA0 + 8'(i));
      p.push_back(8'h00); p.push_back(8'h00); p.push_back(8'h00);
    end                                             run_job(p, 60, 0, "alternating literal/run");
    p = '{ESC, 8'h01, ESC, ESC, 8'h02, ESC, ESC, ESC, ESC, 8'h03};
                                                    run_job(p, 200, 0, "escape bytes");
    p = gen_bitstream(1200, 32'h5EED_0001, 1'b1, ESC, 30);
                                                    run_job(p, 300, 0, "synthetic bitstream");
    p = gen_bitstream(1200, 32'h5EED_0002, 1'b0, ESC, 60);
    for (int i = 0; i < 20; i++) p[100 + 37 * i] = ESC;
                                                    run_job(p, 900, 0, "bitstream with escape bytes");
    p = {};
    for (int i = 0; i < 1500; i++) begin
      logic [31:0] r;
      r = xorshift(s);
      p.push_back(r[2] ? 8'h00 : r[15:8]);
    end                                             run_job(p, 100, 1, "random data, back-pressure");

    // truncated stream: ESC n with the value byte missing
    mem[1500] = 8'h42; mem[1501] = ESC; mem[1502] = 8'h05;
    @(negedge clk);
    start = 1'b1; start_addr = 11'd1500; final_addr = 11'd1502;
    @(negedge clk);
    start = 1'b0;
    begin
      byte_q_t got;
      int n;
      n = 0;
      while (!done && n < 100) begin
        #1;
        if (out_valid) got.push_back(out_data);
        @(negedge clk);
        n++;
      end
      expect_true(done, "truncated stream ends");
      expect_true(got.size() == 1 && got[0] == 8'h42, "truncated stream: only the complete token");
      @(negedge clk);
      expect_true(error && !busy, "truncated stream flags error");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
