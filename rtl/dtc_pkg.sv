// dtc_pkg - constants shared by the Nutt-interpolated digital-to-time converter.
//
// The converter's delay code is d = {coarse, fine}: coarse counts periods of the
// 600 MHz input clock (T_in = 1.667 ns), fine counts IDELAYE2 taps of
// T_IDELAYCTRL/64 = T_in/32 = 52.083 ps. The coarse width of 25 bits, the 5-bit fine
// code, the 600 MHz input clock and the 300 MHz calibration clock are the values of
// the measured channel; the timescale of 1 ps with 1 fs precision is this design's
// choice, so that a 52.083 ps tap is represented without visible rounding.
`timescale 1ps / 1fs
package dtc_pkg;
  // Coarse counter width n (count_h has n-1 bits, count_l one bit).
  localparam int unsigned COARSE_BITS = 25;
  // Fine code width: IDELAYE2 has 32 taps, 0..31.
  localparam int unsigned FINE_BITS   = 5;
  // Input clock and IDELAYCTRL reference clock (= CLK_OUT0 = f_in / 2), in MHz.
  localparam real F_IN_MHZ   = 600.0;
  localparam real REFCLK_MHZ = 300.0;

  // IDELAYE2 tap delay in ps for a reference clock in MHz: T_ref / (2 * 2^5).
  function automatic real tap_ps(input real refclk_mhz);
    return 1.0e6 / (64.0 * refclk_mhz);
  endfunction
endpackage
