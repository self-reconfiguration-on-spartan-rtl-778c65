// tb_cpcap_core_busy: testbench of the optional BUSY path of the cPCAP core.
//
// The core is built with USE_BUSY = 1 and the SelectMAP pin model raises BUSY
// at random in about 30 % of the clocks. Two synthetic bitstreams are encoded,
// loaded into the block RAM and written. The port must still receive exactly
// each bitstream followed by the 8 NOOP bytes, with no protocol error, and the
// write burst may last no longer than one clock per byte plus one per BUSY
// clock (plus one per slow token). BUSY must have held off at least one byte.
module tb_cpcap_core_busy;
  import cpcap_pkg::*;
  import cpcap_tb_pkg::*;

  localparam int AW = 11;
  localparam logic [7:0] ESC = RLE_ESC_DEFAULT;

  logic           clk = 1'b0, rst_n = 1'b1;
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

  initial #1 rst_n = 1'b0;   // a reset edge at start

  cpcap_bram u_bram (
    .clk(clk), .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));
  cpcap_core #(.USE_BUSY(1'b1)) dut (.*);
  selectmap_model #(.BUSY_PERCENT(30)) u_port (
    .cclk(cclk), .d(smap.d), .csi_b(smap.csi_b), .rdwr_b(smap.rdwr_b), .busy(smap_busy));

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
    int busy0, span;
    u_port.captured = {};
    busy0 = u_port.busy_cycles;
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
    span = burst_last - burst_first + 1;
    expect_true(span <= plain.size() + 8 + (u_port.busy_cycles - busy0) + slow,
                $sformatf("%s: %0d clocks for %0d bytes with %0d BUSY clocks", name, span, plain.size() + 8, u_port.busy_cycles - busy0));
    $display("%s: %0d bytes in %0d clocks, %0d held off by BUSY", name, plain.size(), span, u_port.busy_cycles - busy0);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    byte_q_t p0, p1, e0, e1;
    p0 = gen_bitstream(2000, 32'h0B05_0001, 1'b1, ESC, 40);
    p1 = gen_bitstream(1500, 32'h0B05_0002, 1'b0, ESC, 60);
    for (int i = 0; i < 8; i++) p1[100 + 151 * i] = ESC;
    e0 = encode(p0, ESC); e1 = encode(p1, ESC);
    expect_true(e0.size() + e1.size() <= 2048, "streams fit in the RAM");
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load(e0, 0); load(e1, e0.size());
    send(p0, 0, e0.size(), count_slow_tokens(e0, ESC), "stream 0");
    send(p1, e0.size(), e1.size(), count_slow_tokens(e1, ESC), "stream 1");
    expect_true(u_port.busy_cycles > 0, "BUSY held off bytes");
    expect_true(u_port.protocol_errors == 0, "no SelectMAP protocol error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
