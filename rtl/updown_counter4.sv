// updown_counter4: 4-bit up-down counter, the example user circuit of the
// self-reconfiguration demonstration.
//
// It lives in the reconfigurable part of the device and is clocked by a DCM
// output whose frequency (5 MHz or 50 MHz) is changed at run time by a partial
// bitstream written through the cPCAP core; the counter itself is unchanged by
// the reconfiguration and only shows the new clock rate. On each rising edge
// with en high it counts up when up is high and down otherwise, wrapping
// modulo 16. Reset is asynchronous, active low, to zero.
//
// The width and the up/down function follow the original example; the enable,
// the direction input and the reset are this design's own.
module updown_counter4 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             up,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= up ? q + 1'b1 : q - 1'b1;
  end

endmodule
