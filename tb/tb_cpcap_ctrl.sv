// tb_cpcap_ctrl: self-checking testbench of the SelectMAP write sequence.
//
// A small stand-in for the decompressor serves a list of bytes, with primed
// rising a few clocks after start and optional empty cycles (out_valid low),
// and pulses done after the last byte. A SelectMAP pin model captures what the
// controller writes. Checks: RDWR_B falls one clock after start and before
// CSI_B; the bytes written are the served bytes followed by exactly 8 NOOP
// bytes (20 00 00 00 20 00 00 00); empty cycles show as CSI_B pauses with
// RDWR_B held low; CSI_B rises before RDWR_B, exactly one clock earlier; busy
// and done behave; the bytes go out one per clock when the source never
// empties.
module tb_cpcap_ctrl;
  import cpcap_pkg::*;
  import cpcap_tb_pkg::*;

  logic           clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a reset edge at start
  logic           start = 1'b0;
  logic           busy, done, smap_busy;
  logic           dec_start;
  logic           dec_primed = 1'b0, dec_done, dec_valid, dec_ready;
  logic [7:0]     dec_data;
  selectmap_out_t smap;
  int             checks = 0, failures = 0;

  cpcap_ctrl dut (.*);
  selectmap_model u_port (.cclk(clk), .d(smap.d), .csi_b(smap.csi_b), .rdwr_b(smap.rdwr_b), .busy(smap_busy));

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // pin history, one entry per clock
  logic csi_hist[$], rdwr_hist[$];
  always @(posedge clk) begin
    csi_hist.push_back(smap.csi_b);
    rdwr_hist.push_back(smap.rdwr_b);
  end

  // Source of bytes: serves src[] in order, skipping cycles where gap[] says so.
  byte_q_t src;
  bit      gap_q[$];
  int      src_i = 0;
  int      started_cycle = 0;
  bit      source_on = 1'b0;

  always_comb begin
    dec_valid = source_on && src_i < src.size() && !(gap_q.size() > 0 && gap_q[0]);
    dec_data  = (src_i < src.size()) ? src[src_i] : 8'h00;
    dec_done  = source_on && src_i >= src.size();
  end
  always @(posedge clk) begin
    if (source_on && dec_ready) begin
      if (dec_valid) src_i <= src_i + 1;
      if (gap_q.size() > 0) void'(gap_q.pop_front());
    end
    if (dec_done && dec_ready) source_on <= 1'b0;
  end

  task automatic run(input int n, input bit with_gaps, input int prime_delay);
    int h0, fall_rdwr, fall_csi, rise_csi, rise_rdwr, first_byte_hist, nbytes;
    int gaps;
    logic [31:0] s;
    s = 32'h1357_9BDF ^ 32'(n);
    src = {};
    gap_q = {};
    gaps = 0;
    for (int i = 0; i < n; i++) begin logic [31:0] r; r = xorshift(s); src.push_back(r[7:0]); end
    for (int i = 0; i < 3 * n; i++) begin
      bit g;
      g = with_gaps && (xorshift(s) % 5 == 0);
      gap_q.push_back(g);
    end
    u_port.captured = {};
    src_i = 0;
    @(negedge clk);
    h0 = csi_hist.size();
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    source_on = 1'b1;
    expect_true(busy, "busy after start");
    repeat (prime_delay) @(negedge clk);
    dec_primed = 1'b1;
    while (!done) @(negedge clk);
    dec_primed = 1'b0;
    @(negedge clk);
    expect_true(!busy, "idle after done");
    // pin timing from the history
    fall_rdwr = -1; fall_csi = -1; rise_csi = -1; rise_rdwr = -1;
    for (int i = h0 + 1; i < csi_hist.size(); i++) begin
      if (fall_rdwr < 0 && !rdwr_hist[i]) fall_rdwr = i - h0;
      if (fall_csi < 0 && !csi_hist[i]) fall_csi = i - h0;
      if (fall_csi >= 0 && rise_rdwr < 0 && rdwr_hist[i]) rise_rdwr = i - h0;
      if (fall_csi >= 0 && rise_rdwr < 0 && !csi_hist[i - 1] && csi_hist[i]) rise_csi = i - h0;
    end
    expect_true(fall_rdwr == 1, $sformatf("RDWR_B falls 1 clock after start (%0d)", fall_rdwr));
    expect_true(fall_csi >= fall_rdwr + 1, $sformatf("CSI_B falls at least 1 clock after RDWR_B (%0d, %0d)", fall_rdwr, fall_csi));
    expect_true(fall_csi >= prime_delay, "CSI_B waits for primed");
    expect_true(rise_rdwr == rise_csi + 1, $sformatf("RDWR_B rises 1 clock after CSI_B (%0d, %0d)", rise_csi, rise_rdwr));
    nbytes = u_port.captured.size();
    expect_true(nbytes == n + 8, $sformatf("%0d bytes written, %0d expected", nbytes, n + 8));
    for (int i = 0; i < n && i < nbytes; i++) begin
      checks++;
      if (u_port.captured[i] != src[i]) begin
        failures++;
        $display("FAIL byte %0d: %02h expected %02h", i, u_port.captured[i], src[i]);
      end
    end
    for (int i = 0; i < 8 && n + i < nbytes; i++) begin
      checks++;
      if (u_port.captured[n + i] != ((i % 4 == 0) ? 8'h20 : 8'h00)) begin
        failures++;
        $display("FAIL null op byte %0d: %02h", i, u_port.captured[n + i]);
      end
    end
    // one byte per clock when no gap was served
    for (int i = fall_csi; i < rise_csi; i++) if (csi_hist[h0 + i]) gaps++;
    if (!with_gaps) expect_true(gaps == 0 && rise_csi - fall_csi == n + 8, $sformatf("gap-free burst: %0d clocks for %0d bytes", rise_csi - fall_csi, n + 8));
    else expect_true(gaps > 0 && rise_csi - fall_csi == n + 8 + gaps, $sformatf("burst with %0d pauses", gaps));
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    expect_true(smap.csi_b && smap.rdwr_b && !busy, "port released after reset");
    run(16, 1'b0, 0);
    run(1, 1'b0, 3);
    run(200, 1'b1, 2);
    run(500, 1'b0, 5);
    expect_true(u_port.protocol_errors == 0, $sformatf("no SelectMAP protocol error (%0d)", u_port.protocol_errors));
    expect_true(u_port.pauses > 0, "pauses seen by the port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
