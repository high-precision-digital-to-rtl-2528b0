// dual_clock_counter - coarse part of the DTC: an n-bit counter whose n-1 upper bits
// run on clk0 and whose least significant bit runs on clk180.
//
// count_h (n-1 bits) increments on every clk0 edge and count_l (1 bit) toggles on
// every clk180 edge. Each half of the threshold is compared in its own domain
// (th_reached_h = count_h == th[n-1:1], th_reached_l = count_l == th[0]), each
// comparison is registered by its own clock, and synchronous_out is the AND of the
// two registers. Since the two clocks are f_in/2 clocks 180 degrees apart, the
// overlap of the two registered flags is one CLK_IN period wide and can start on any
// CLK_IN edge: the resolution is 1/f_in and the range 2^n/f_in. All of this follows
// the published architecture.
//
// Because count_l toggles once in every count_h value, the pair (count_h, count_l)
// runs through the order (0,0) (0,1) (1,1) (1,0) (2,0) (2,1) ... after a restart:
// within count_h = k, count_l first equals k[0]. A delay of c CLK_IN periods is
// therefore selected by th = {c[n-1:1], c[1] ^ c[0]}; dtc_control does that encoding.
//
// Restart (this design's choice; the architecture only says the delay is referred to a
// counter reset): `start` is a one-clk0-period pulse from the clk0 domain. It is
// seen first by clk180, which clears count_l and its flag, and one CLK_IN period
// later by clk0, which clears count_h and its flag. With the first clk0 edge after
// `start` at time t0, synchronous_out is high for one CLK_IN period starting at
// t0 + (c + 2) * T_in. The counter keeps running afterwards, so the pulse repeats
// every 2^n CLK_IN periods until the next restart, as a free counter does.
// rst is an asynchronous reset of everything.
`timescale 1ps / 1fs
module dual_clock_counter #(
  parameter int unsigned N = dtc_pkg::COARSE_BITS
) (
  input  logic         clk0,
  input  logic         clk180,
  input  logic         rst,
  input  logic         start,      // clk0-domain restart pulse
  input  logic [N-1:0] th,         // threshold, stable from `start` on
  output logic         synchronous_out
);
  logic [N-2:0] count_h;
  logic         count_l;
  logic         th_reached_h, th_reached_l;
  logic         th_reached_h_reg, th_reached_l_reg;

  assign th_reached_h = (count_h == th[N-1:1]);
  assign th_reached_l = (count_l == th[0]);

  // clk0 domain: upper n-1 bits
  always_ff @(posedge clk0 or posedge rst) begin
    if (rst) begin
      count_h          <= '0;
      th_reached_h_reg <= 1'b0;
    end else if (start) begin
      count_h          <= '0;
      th_reached_h_reg <= 1'b0;
    end else begin
      count_h          <= count_h + 1'b1;
      th_reached_h_reg <= th_reached_h;
    end
  end

  // clk180 domain: least significant bit
  always_ff @(posedge clk180 or posedge rst) begin
    if (rst) begin
      count_l          <= 1'b0;
      th_reached_l_reg <= 1'b0;
    end else if (start) begin
      count_l          <= 1'b0;
      th_reached_l_reg <= 1'b0;
    end else begin
      count_l          <= ~count_l;
      th_reached_l_reg <= th_reached_l;
    end
  end

  assign synchronous_out = th_reached_h_reg & th_reached_l_reg;
endmodule
