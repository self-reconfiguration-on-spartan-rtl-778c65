// tb_cpcap_system: end-to-end testbench of the self-reconfiguring system at
// its full size (2048-byte block RAM, 5 KB partial bitstreams).
//
// Scenario of the clock-switching example: the block RAM holds two compressed
// 5120-byte partial bitstreams, one that sets the user clock to 50 MHz and one
// that sets it to 5 MHz. The RAM is loaded through the load port (in the
// device this is the initial configuration). The testbench then writes the
// 5 MHz bitstream, the 50 MHz one and the 5 MHz one again through the core.
// A SelectMAP pin model captures the bytes; a stand-in for the reconfigurable
// DCM switches app_clk between 5 and 50 MHz once a write session ends with the
// matching bitstream. The 4-bit counter counts up at 5 MHz and down at
// 50 MHz, and the testbench tracks every step it takes.
//
// Checks: each session writes exactly its bitstream plus 8 NOOP bytes and the
// sync word once; no protocol error; the 50 MHz bitstream (no slow token)
// streams at one byte per clock, i.e. 5128 clocks, about 0.1 ms at 50 MHz;
// both compressed bitstreams fit in the one block RAM with a space saving
// reported against 76%; the counter steps 5 times per microsecond at 5 MHz
// and 50 times at 50 MHz. Mechanisms counted (each must occur): literal,
// run and escaped-literal tokens, output pauses, null-op bytes, sessions,
// clock switches, counting up and down.
module tb_cpcap_system;
  import cpcap_pkg::*;
  import cpcap_tb_pkg::*;

  localparam int AW  = 11;
  localparam int LEN = 5120;
  localparam logic [7:0] ESC = RLE_ESC_DEFAULT;

  logic          clk = 1'b0, rst_n = 1'b1;
  logic          load_en = 1'b0;
  logic [AW-1:0] load_addr = '0;
  logic [7:0]    load_data = '0;
  logic          reconfig_start = 1'b0;
  logic [AW-1:0] reconfig_start_addr = '0, reconfig_final_addr = '0;
  logic          reconfig_busy, reconfig_done, reconfig_error;
  logic [7:0]    smap_d;
  logic          smap_csi_b, smap_rdwr_b, smap_cclk, smap_busy;
  logic [2:0]    smap_mode;
  logic          app_clk = 1'b0, app_rst_n = 1'b1, app_en = 1'b0, app_up = 1'b1;
  logic [3:0]    app_count;
  int            checks = 0, failures = 0;

  initial begin  // a reset edge at start
    #1 rst_n = 1'b0;
    app_rst_n = 1'b0;
  end

  cpcap_system dut (.*);
  selectmap_model u_port (.cclk(smap_cclk), .d(smap_d), .csi_b(smap_csi_b), .rdwr_b(smap_rdwr_b), .busy(smap_busy));

  // 50 MHz configuration clock
  always #10ns clk = ~clk;

  // stand-in for the reconfigurable DCM: half period 10 ns (50 MHz) or 100 ns (5 MHz)
  bit fast_clock = 1'b1;
  int clock_switches = 0;
  always begin
    if (fast_clock) #10ns; else #100ns;
    app_clk = ~app_clk;
  end

  initial begin
    #5ms;
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

  // mechanism counters, observed on the design
  int n_lit = 0, n_run = 0, n_esclit = 0, n_noop = 0;
  int n_up = 0, n_down = 0;
  always @(posedge clk) begin
    // bytes a decoded token takes from the buffer: 1 literal, 2 escaped literal, 3 run
    case (dut.u_core.u_dec.pop)
      2'd1: n_lit++;
      2'd2: n_esclit++;
      2'd3: n_run++;
      default: ;
    endcase
    if (dut.u_core.u_ctrl.state == CTRL_NULLOPS && !smap_csi_b) n_noop++;
  end

  // counter steps, tracked against the previous value
  logic [3:0] last_count = '0;
  always @(posedge app_clk) begin
    #1;
    if (app_count == last_count + 4'd1) n_up++;
    else if (app_count == last_count - 4'd1) n_down++;
    else if (app_count != last_count) begin
      failures++;
      $display("FAIL counter jumped %0d -> %0d", last_count, app_count);
    end
    last_count = app_count;
  end

  // burst length of the current session
  int burst_first, burst_last, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!smap_csi_b && !smap_rdwr_b) begin
      if (burst_first < 0) burst_first <= cyc;
      burst_last <= cyc;
    end
  end

  byte_q_t bs_fast, bs_slow, enc_fast, enc_slow;

  task automatic reconfigure(input bit to_fast);
    byte_q_t plain;
    int base, len, sync0;
    realtime t0, t1;
    plain = to_fast ? bs_fast : bs_slow;
    base  = to_fast ? 0 : enc_fast.size();
    len   = to_fast ? enc_fast.size() : enc_slow.size();
    u_port.captured = {};
    sync0 = u_port.sync_seen;
    burst_first = -1;
    @(negedge clk);
    reconfig_start = 1'b1;
    reconfig_start_addr = AW'(base);
    reconfig_final_addr = AW'(base + len - 1);
    @(negedge clk);
    reconfig_start = 1'b0;
    t0 = $realtime;
    while (!reconfig_done) @(negedge clk);
    t1 = $realtime;
    expect_true(!reconfig_error, "no error");
    expect_true(u_port.captured.size() == LEN + 8, $sformatf("%0d bytes written", u_port.captured.size()));
    for (int i = 0; i < LEN && i < u_port.captured.size(); i++) begin
      checks++;
      if (u_port.captured[i] != plain[i]) begin
        failures++;
        if (failures < 10) $display("FAIL byte %0d: %02h expected %02h", i, u_port.captured[i], plain[i]);
      end
    end
    expect_true(u_port.sync_seen == sync0 + 1, "sync word seen");
    if (to_fast) begin
      expect_true(burst_last - burst_first + 1 == LEN + 8,
                  $sformatf("one byte per clock: %0d clocks for %0d bytes", burst_last - burst_first + 1, LEN + 8));
      expect_true(t1 - t0 > 0.09ms && t1 - t0 < 0.11ms, $sformatf("reconfiguration took %0t", t1 - t0));
    end else begin
      expect_true(burst_last - burst_first + 1 <= LEN + 8 + count_slow_tokens(enc_slow, ESC),
                  $sformatf("%0d clocks for %0d bytes", burst_last - burst_first + 1, LEN + 8));
    end
    $display("reconfiguration to %s MHz: %0d bytes in %0.2f us", to_fast ? "50" : "5", LEN, (t1 - t0) / 1us);
    // the DCM now runs with its new setting
    if (fast_clock != to_fast) clock_switches++;
    fast_clock = to_fast;
    app_up = !to_fast;
  endtask

  // count counter steps over a window of 2 us
  task automatic measure(input int expected_steps, input string what);
    int u0, d0, steps;
    @(posedge app_clk);
    u0 = n_up; d0 = n_down;
    #2us;
    steps = (n_up - u0) + (n_down - d0);
    expect_true(steps >= expected_steps - 1 && steps <= expected_steps + 1,
                $sformatf("%s: %0d counter steps in 2 us, %0d expected", what, steps, expected_steps));
  endtask

  initial begin
    int total;
    bs_fast = gen_bitstream(LEN, 32'h0050_0050, 1'b1, ESC, 38);
    bs_slow = gen_bitstream(LEN, 32'h0005_0005, 1'b1, ESC, 38);
    for (int i = 0; i < 12; i++) bs_slow[300 + 331 * i] = ESC;   // escaped literals
    bs_slow[4000] = ESC; bs_slow[4001] = ESC;                    // a two-byte escape run
    enc_fast = encode(bs_fast, ESC);
    enc_slow = encode(bs_slow, ESC);
    total = enc_fast.size() + enc_slow.size();
    $display("compressed: %0d + %0d = %0d bytes of %0d, space saving %0d%%",
             enc_fast.size(), enc_slow.size(), total, 2 * LEN, 100 - (100 * total) / (2 * LEN));
    expect_true(total <= 2048, "both compressed bitstreams fit in one block RAM");
    expect_true(100 * total <= 24 * 2 * LEN, "space saving at least 76%");
    expect_true(smap_mode == 3'b110, "mode pins 110");

    repeat (3) @(negedge clk);
    rst_n = 1'b1; app_rst_n = 1'b1; app_en = 1'b1;
    for (int i = 0; i < enc_fast.size(); i++) begin
      @(negedge clk); load_en = 1'b1; load_addr = AW'(i); load_data = enc_fast[i];
    end
    for (int i = 0; i < enc_slow.size(); i++) begin
      @(negedge clk); load_en = 1'b1; load_addr = AW'(enc_fast.size() + i); load_data = enc_slow[i];
    end
    @(negedge clk); load_en = 1'b0;

    app_up = 1'b0;
    measure(100, "initial 50 MHz");
    reconfigure(1'b0);
    measure(10, "after switch to 5 MHz");
    reconfigure(1'b1);
    measure(100, "after switch to 50 MHz");
    reconfigure(1'b0);
    measure(10, "after switch back to 5 MHz");

    expect_true(u_port.protocol_errors == 0, "no SelectMAP protocol error");
    $display("mechanisms: literal %0d, run %0d, escaped literal %0d, pauses %0d, null-op bytes %0d, sessions %0d, clock switches %0d, up %0d, down %0d",
             n_lit, n_run, n_esclit, u_port.pauses, n_noop, u_port.sessions, clock_switches, n_up, n_down);
    expect_true(n_lit > 0, "literal tokens decoded");
    expect_true(n_run > 0, "run tokens decoded");
    expect_true(n_esclit > 0, "escaped literals decoded");
    expect_true(u_port.pauses > 0, "output pauses happened");
    expect_true(n_noop == 3 * 8, "8 null-op bytes per session");
    expect_true(u_port.sessions == 3, "three write sessions");
    expect_true(clock_switches == 3, "three clock switches");
    expect_true(n_up > 0 && n_down > 0, "counter counted up and down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
