// nutt_dtc_top - one channel of the Nutt-interpolated digital-to-time converter.
//
// Given a delay code d = {coarse, fine}, the channel emits a start marker
// (start_out) and, d * T_in / 32 later, an output edge (asynchronous_out), where
// T_in is the CLK_IN period. With the default 600 MHz CLK_IN one LSB is 52.083 ps
// and the 25 + 5 bit code spans 2^30 LSB, about 56 ms.
//
// Structure (as in the published architecture):
//  * dual_clock_gen gates CLK_IN into clk0 and clk180, two f_in/2 clocks one
//    CLK_IN period apart.
//  * dtc_control (clk0) takes the request, sets the counter threshold th and the
//    IDELAYE2 tap code, restarts the counter and emits start_out.
//  * dual_clock_counter (clk0 + clk180) produces synchronous_out c CLK_IN periods
//    after start_out: the coarse delay at 1/f_in resolution.
//  * idelaye2_model, its tap code loaded on clk0, delays synchronous_out by
//    fine taps of T_ref/64 = T_in/32: the fine delay.
//  * idelayctrl_model, clocked by clk0 as its reference, holds the taps
//    calibrated and gates requests through its RDY.
// Choices of this design: rst is one active-high asynchronous reset for all blocks
// (it also resets the IDELAYCTRL); requests are a `load` strobe sampled on clk0
// (bring it out of the clk0 domain, e.g. from the clk0 output); `ready` is the
// IDELAYCTRL RDY; `accepted` marks the clk0 edge that takes a request and `tap`
// shows the IDELAYE2 tap in use. A request taken at clk0 edge k gives start_out at clk0 edge k+2.
// The fine interpolator only meets T_in/32 per tap when REFCLK_MHZ is half the
// CLK_IN frequency, as with the default 600/300 MHz.
`timescale 1ps / 1fs
module nutt_dtc_top #(
  parameter int unsigned N          = dtc_pkg::COARSE_BITS,
  parameter real         REFCLK_MHZ = dtc_pkg::REFCLK_MHZ
) (
  input  logic                 clk_in,
  input  logic                 rst,
  input  logic                 load,
  input  logic [N-1:0]         coarse,
  input  logic [4:0]           fine,
  output logic                 ready,
  output logic                 accepted,
  output logic                 clk0,
  output logic                 start_out,
  output logic                 synchronous_out,
  output logic                 asynchronous_out,
  output logic [4:0]           tap
);
  logic           clk180;
  logic [N-1:0]   th;
  logic [4:0]     cntvalue;
  logic           ld;
  logic           start;

  dual_clock_gen u_clkgen (
    .clk_in (clk_in),
    .rst    (rst),
    .clk0   (clk0),
    .clk180 (clk180)
  );

  idelayctrl_model u_idelayctrl (
    .REFCLK (clk0),
    .RST    (rst),
    .RDY    (ready)
  );

  dtc_control #(.N(N), .FINE_BITS(5)) u_ctrl (
    .clk0      (clk0),
    .rst       (rst),
    .ready     (ready),
    .load      (load),
    .coarse    (coarse),
    .fine      (fine),
    .th        (th),
    .cntvalue  (cntvalue),
    .ld        (ld),
    .start     (start),
    .start_out (start_out),
    .accepted  (accepted)
  );

  dual_clock_counter #(.N(N)) u_counter (
    .clk0            (clk0),
    .clk180          (clk180),
    .rst             (rst),
    .start           (start),
    .th              (th),
    .synchronous_out (synchronous_out)
  );

  idelaye2_model #(
    .IDELAY_TYPE      ("VAR_LOAD"),
    .DELAY_SRC        ("DATAIN"),
    .IDELAY_VALUE     (0),
    .REFCLK_FREQUENCY (REFCLK_MHZ)
  ) u_idelay (
    .C           (clk0),
    .CE          (1'b0),
    .INC         (1'b0),
    .LD          (ld),
    .LDPIPEEN    (1'b0),
    .REGRST      (1'b0),
    .CINVCTRL    (1'b0),
    .CNTVALUEIN  (cntvalue),
    .DATAIN      (synchronous_out),
    .IDATAIN     (1'b0),
    .CNTVALUEOUT (tap),
    .DATAOUT     (asynchronous_out)
  );
endmodule
