// idelayctrl_model - behavioural model of the 7-Series IDELAYCTRL, with the
// primitive's port names. It is a simulation model of a vendor primitive.
//
// The real block continuously calibrates the IDELAYE2 taps of its region against
// REFCLK, so that each tap stays at T_REFCLK/64 through process, voltage and
// temperature changes. In this model the tap value is a parameter of
// idelaye2_model, so what is modelled here is the handshake: RDY is low while RST
// is high and for LOCK_CYCLES REFCLK periods after RST falls, then high.
// LOCK_CYCLES is this model's choice; the published architecture does not give the
// lock time.
`timescale 1ps / 1fs
module idelayctrl_model #(
  parameter int unsigned LOCK_CYCLES = 16
) (
  input  logic REFCLK,
  input  logic RST,
  output logic RDY
);
  localparam int unsigned W = $clog2(LOCK_CYCLES + 1);

  logic [W-1:0] cnt;

  always_ff @(posedge REFCLK or posedge RST) begin
    if (RST)
      cnt <= '0;
    else if (cnt != W'(LOCK_CYCLES))
      cnt <= cnt + 1'b1;
  end

  assign RDY = (cnt == W'(LOCK_CYCLES));
endmodule
