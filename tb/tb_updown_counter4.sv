// tb_updown_counter4: self-checking testbench of the 4-bit up-down counter.
//
// Drives random enable and direction for 2000 clocks and compares the count
// after every edge with a model kept as an integer modulo 16; checks reset,
// the wrap from 15 to 0 and from 0 to 15, and that the count holds when
// disabled.
module tb_updown_counter4;
  logic       clk = 1'b0, rst_n = 1'b1, en = 1'b0, up = 1'b1;
  initial #1 rst_n = 1'b0;   // a reset edge at start
  logic [3:0] q;
  int         model = 0;
  int         checks = 0, failures = 0, wraps_up = 0, wraps_down = 0;

  updown_counter4 dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (int'(q) != model) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%0d model=%0d", what, q, model);
    end
  endtask

  initial begin
    logic [31:0] r;
    repeat (2) @(negedge clk);
    check("reset");
    rst_n = 1'b1;
    // count up through a wrap
    en = 1'b1; up = 1'b1;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      if (model == 15) wraps_up++;
      model = (model + 1) % 16;
      check("up");
    end
    // count down through a wrap
    up = 1'b0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      if (model == 0) wraps_down++;
      model = (model + 15) % 16;
      check("down");
    end
    for (int i = 0; i < 2000; i++) begin
      r = $urandom;
      en = r[0] | r[1];
      up = r[2];
      @(negedge clk);
      if (en) model = up ? (model + 1) % 16 : (model + 15) % 16;
      check("random");
    end
    checks++;
    if (wraps_up == 0 || wraps_down == 0) failures++;
    rst_n = 1'b0; #1;
    model = 0;
    check("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
