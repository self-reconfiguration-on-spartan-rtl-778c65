// tb_cpcap_core: self-checking testbench of the cPCAP core with its block RAM
// and a SelectMAP pin model.
//
// Three synthetic bitstreams of different sizes are encoded, written into the
// block RAM one after another and then sent through the core in turn. For each
// the port must receive exactly the original bitstream followed by 8 NOOP
// bytes, see the sync word once, and see no protocol error. For a stream with
// no slow token the burst takes exactly one clock per byte; otherwise at most
// one extra clock per slow token. A last job points the core at a truncated
// token and expects error with done.
module tb_cpcap_core;
  import cpcap_pkg::*;
  import cpcap_tb_pkg::*;

  localparam int AW = 11;
  localparam logic [7:0] ESC = RLE_ESC_DEFAULT;

  logic           clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a reset edge at start
  logic           start = 1'b0;
  logic [AW-1:0]  start_addr = '0, final_addr = '0;
  logic           busy, done, error;
  logic           mem_rd_en;
  logic [AW-1:0]  mem_rd_addr;
  logic [7:0]     mem_rd_data;
  logic           wr_en = 1'b0;
  logic [AW-1:0]  wr_addr = '0;
  logic [7:0]     wr_data = '0;
  logic           cclk, smap_busy;
  selectmap_out_t smap;
  int             checks = 0, failures = 0;

  cpcap_bram u_bram (
    .clk(clk), .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));
  cpcap_core dut (.*);
  selectmap_model u_port (.cclk(cclk), .d(smap.d), .csi_b(smap.csi_b), .rdwr_b(smap.rdwr_b), .busy(smap_busy));

  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  int burst_first = -1, burst_last = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!smap.csi_b && !smap.rdwr_b) begin
      if (burst_first < 0) burst_first <= cyc;
      burst_last <= cyc;
    end
  end

  task automatic load(input byte_q_t enc, input int base);
    for (int i = 0; i < enc.size(); i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(base + i); wr_data = enc[i];
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic send(input byte_q_t plain, input int base, input int len, input int slow,
                      input string name);
    int sync0;
    u_port.captured = {};
    sync0 = u_port.sync_seen;
    burst_first = -1;
    @(negedge clk);
    start = 1'b1; start_addr = AW'(base); final_addr = AW'(base + len - 1);
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    expect_true(!error, {name, ": no error"});
    expect_true(u_port.captured.size() == plain.size() + 8,
                $sformatf("%s: %0d bytes written, %0d expected", name, u_port.captured.size(), plain.size() + 8));
    for (int i = 0; i < plain.size() && i < u_port.captured.size(); i++) begin
      checks++;
      if (u_port.captured[i] != plain[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s byte %0d: %02h expected %02h", name, i, u_port.captured[i], plain[i]);
      end
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (plain.size() + i >= u_port.captured.size() ||
          u_port.captured[plain.size() + i] != ((i % 4 == 0) ? 8'h20 : 8'h00)) failures++;
    end
    expect_true(u_port.sync_seen == sync0 + 1, {name, ": sync word seen once"});
    if (slow == 0)
      expect_true(burst_last - burst_first + 1 == plain.size() + 8,
                  $sformatf("%s: %0d clocks for %0d bytes", name, burst_last - burst_first + 1, plain.size() + 8));
    else
      expect_true(burst_last - burst_first + 1 <= plain.size() + 8 + slow,
                  $sformatf("%s: %0d clocks for %0d bytes, %0d slow tokens", name, burst_last - burst_first + 1, plain.size() + 8, slow));
    $display("%s: %0d bytes from %0d compressed in %0d clocks", name, plain.size(), len, burst_last - burst_first + 1);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    byte_q_t p0, p1, p2, e0, e1, e2;
    int b1, b2;
    p0 = gen_bitstream(1024, 32'hA1, 1'b1, ESC, 30);
    p1 = gen_bitstream(3000, 32'hB2, 1'b0, ESC, 40);
    for (int i = 0; i < 10; i++) p1[200 + 97 * i] = ESC;
    p2 = gen_bitstream(200, 32'hC3, 1'b1, ESC, 100);
    e0 = encode(p0, ESC); e1 = encode(p1, ESC); e2 = encode(p2, ESC);
    b1 = e0.size(); b2 = b1 + e1.size();
    expect_true(b2 + e2.size() + 3 <= 2048, "streams fit in the RAM");
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load(e0, 0); load(e1, b1); load(e2, b2);
    send(p1, b1, e1.size(), count_slow_tokens(e1, ESC), "stream 1");
    send(p0, 0,  e0.size(), count_slow_tokens(e0, ESC), "stream 0");
    send(p2, b2, e2.size(), count_slow_tokens(e2, ESC), "stream 2");
    expect_true(u_port.pauses > 0, "stream 1 paused the port");
    // truncated token at the end
    load('{8'h55, ESC, 8'h07}, 2045);
    @(negedge clk);
    start = 1'b1; start_addr = 11'd2045; final_addr = 11'd2047;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    expect_true(error, "truncated stream flags error");
    expect_true(u_port.protocol_errors == 0, "no SelectMAP protocol error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
