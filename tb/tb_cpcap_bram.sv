// tb_cpcap_bram: self-checking testbench of the bitstream block RAM.
//
// Fills all 2048 bytes through the write port with a xorshift sequence, then
// reads every address back in random order and checks each byte one clock
// after its address, against a copy kept in the testbench. Also checks that
// a read with rd_en low keeps the previous output and that a write does not
// disturb the read port.
module tb_cpcap_bram;
  import cpcap_tb_pkg::*;

  localparam int DEPTH = 2048;
  localparam int AW    = 11;

  logic          clk = 1'b0;
  logic          rd_en = 1'b0, wr_en = 1'b0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  logic [7:0]    rd_data, wr_data = '0;
  logic [7:0]    ref_mem [DEPTH];
  int            checks = 0, failures = 0;

  cpcap_bram dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %02h expected %02h", what, rd_data, exp);
    end
  endtask

  initial begin
    static logic [31:0] s = 32'h1234_5678;
    logic [AW-1:0] a;
    logic [31:0] r;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      r = xorshift(s);
      wr_en = 1'b1; wr_addr = AW'(i); wr_data = r[7:0];
      ref_mem[i] = wr_data;
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (int i = 0; i < 3 * DEPTH; i++) begin
      r = xorshift(s);
      a = r[AW-1:0];
      rd_en = 1'b1; rd_addr = a;
      @(negedge clk);
      check(ref_mem[a], "random read");
    end
    // rd_en low holds the output
    rd_en = 1'b1; rd_addr = 11'd5; @(negedge clk);
    check(ref_mem[5], "read 5");
    rd_en = 1'b0; rd_addr = 11'd6; @(negedge clk);
    check(ref_mem[5], "hold with rd_en low");
    // write and read different addresses in the same cycle
    rd_en = 1'b1; rd_addr = 11'd7; wr_en = 1'b1; wr_addr = 11'd8; wr_data = ~ref_mem[8];
    ref_mem[8] = wr_data;
    @(negedge clk);
    wr_en = 1'b0;
    check(ref_mem[7], "read during write");
    rd_addr = 11'd8; @(negedge clk);
    check(ref_mem[8], "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
