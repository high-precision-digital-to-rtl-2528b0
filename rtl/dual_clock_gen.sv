// dual_clock_gen - divides CLK_IN by two into a 0-degree and a 180-degree clock.
//
// The PLLs of the FPGA add hundreds of ps of jitter, so the two phases are made by
// clock gating instead: a 2-bit circular buffer (ce_ring) toggles the enables of two
// clock buffers that both pass CLK_IN. Each buffer lets through every other CLK_IN
// pulse, so clk0 and clk180 run at f_in/2 with 25% duty and rise one CLK_IN period
// apart, i.e. 180 degrees of the divided clock. This structure is the published one;
// the reset port is this design's choice.
//
// Timing: after rst falls, the first rising edge of clk180 comes one CLK_IN period
// after the first rising edge of clk0 (see ce_ring and bufgce_model).
`timescale 1ps / 1fs
module dual_clock_gen (
  input  logic clk_in,
  input  logic rst,
  output logic clk0,
  output logic clk180
);
  logic ce0, ce180;

  ce_ring u_ring (
    .clk_in (clk_in),
    .rst    (rst),
    .ce0    (ce0),
    .ce180  (ce180)
  );

  bufgce_model u_buf0   (.I(clk_in), .CE(ce0),   .O(clk0));
  bufgce_model u_buf180 (.I(clk_in), .CE(ce180), .O(clk180));
endmodule
