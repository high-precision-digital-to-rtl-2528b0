// ce_ring - 2-bit circular buffer that produces the clock enables of the divider.
//
// Two D flip-flops clocked by CLK_IN form a ring: flip-flop "1" feeds flip-flop "0"
// and flip-flop "0" feeds flip-flop "1". Reset loads them with 1 and 0, so the single
// '1' circulates and each output toggles every CLK_IN period, the two in antiphase.
// ce0 (the Q of flip-flop "1") enables the 0-degree clock buffer, ce180 (the Q of
// flip-flop "0") the 180-degree one. The ring structure and the initial contents 1/0
// follow the divider of the converter; the asynchronous, active-high reset that loads
// them is this design's choice (an FPGA would use the flip-flops' INIT values).
//
// Timing: outputs change just after each rising CLK_IN edge; ce0 = 1 and ce180 = 0 in
// the first period after reset.
`timescale 1ps / 1fs
module ce_ring (
  input  logic clk_in,
  input  logic rst,
  output logic ce0,
  output logic ce180
);
  logic q1, q0;   // flip-flops "1" and "0"

  always_ff @(posedge clk_in or posedge rst) begin
    if (rst) begin
      q1 <= 1'b1;
      q0 <= 1'b0;
    end else begin
      q1 <= q0;
      q0 <= q1;
    end
  end

  assign ce0   = q1;
  assign ce180 = q0;
endmodule
