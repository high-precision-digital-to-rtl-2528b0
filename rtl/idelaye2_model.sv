// idelaye2_model - behavioural model of the 7-Series IDELAYE2 programmable delay
// line, with the primitive's port names. It is a simulation model of a vendor
// primitive (it uses delays), not logic for synthesis.
//
// The line has 32 taps (0..31). Its tap delay is set by the IDELAYCTRL reference
// clock: the reference period is split into 64 steps, so tap = 1 / (64 * f_ref)
// (78.125 ps at 200 MHz, 52.083 ps at 300 MHz, 39.0625 ps at 400 MHz) and the
// longest delay is 31 taps, just under half a reference period. The tap count
// wraps around at both ends when stepped with CE/INC.
//
// Control, on the rising edge of C: REGRST reloads IDELAY_VALUE; otherwise LD loads
// CNTVALUEIN in "VAR_LOAD" mode (IDELAY_VALUE in "VARIABLE" mode); otherwise CE
// steps the tap up (INC = 1) or down. In "FIXED" mode the tap stays IDELAY_VALUE.
// CNTVALUEOUT shows the current tap. DELAY_SRC selects IDATAIN ("IDATAIN") or
// DATAIN ("DATAIN", a signal from the fabric, as the converter uses it).
// DATAOUT is the selected input delayed by tap * tap_ps + INTRINSIC_PS, applied as
// a transport delay so that pulses shorter than the delay pass intact; a tap change
// affects edges that enter after it. INTRINSIC_PS, the fixed insertion delay of the
// real part, defaults to 0 so that a tap code maps directly to its delay.
// LDPIPEEN and CINVCTRL are accepted and ignored (no pipelined load, C not inverted).
`timescale 1ps / 1fs
module idelaye2_model #(
  parameter string       IDELAY_TYPE      = "VAR_LOAD",
  parameter string       DELAY_SRC        = "DATAIN",
  parameter int unsigned IDELAY_VALUE     = 0,
  parameter real         REFCLK_FREQUENCY = dtc_pkg::REFCLK_MHZ,
  parameter real         INTRINSIC_PS     = 0.0
) (
  input  logic       C,
  input  logic       CE,
  input  logic       INC,
  input  logic       LD,
  input  logic       LDPIPEEN,
  input  logic       REGRST,
  input  logic       CINVCTRL,
  input  logic [4:0] CNTVALUEIN,
  input  logic       DATAIN,
  input  logic       IDATAIN,
  output logic [4:0] CNTVALUEOUT,
  output logic       DATAOUT
);
  localparam real TAP_PS = dtc_pkg::tap_ps(REFCLK_FREQUENCY);

  logic [4:0] tap;
  logic       din;
  logic       dout;

  initial begin
    tap  = 5'(IDELAY_VALUE);
    dout = 1'b0;
  end

  always @(posedge C) begin
    if (IDELAY_TYPE != "FIXED") begin
      if (REGRST)
        tap <= 5'(IDELAY_VALUE);
      else if (LD)
        tap <= (IDELAY_TYPE == "VAR_LOAD") ? CNTVALUEIN : 5'(IDELAY_VALUE);
      else if (CE)
        tap <= INC ? tap + 5'd1 : tap - 5'd1;   // 32-tap wraparound
    end
  end

  assign din = (DELAY_SRC == "IDATAIN") ? IDATAIN : DATAIN;

  // Transport delay: every input edge is scheduled on its own, so edges closer
  // together than the delay all arrive.
  always @(din) begin
    if (tap == 5'd0 && INTRINSIC_PS == 0.0)
      dout = din;
    else
      fork
        begin : deliver
          automatic logic v = din;
          automatic real  d = real'(tap) * TAP_PS + INTRINSIC_PS;
          #(d) dout = v;
        end
      join_none
  end

  assign CNTVALUEOUT = tap;
  assign DATAOUT     = dout;
endmodule
