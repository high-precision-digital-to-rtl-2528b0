// bufgce_model - behavioural model of a global clock buffer with clock enable
// (the BUFGCE of 7-Series FPGAs), with the primitive's ports I, CE and O.
//
// It is a model of a vendor primitive, not logic meant for synthesis: on an FPGA the
// BUFGCE itself is placed. The enable is sampled while I is low (on its falling
// edge), so O = I & CE_sampled never shows a shortened pulse: a CE change made just
// after a rising edge of I takes effect at the next rising edge. The output starts
// gated off, like the primitive's default.
`timescale 1ps / 1fs
module bufgce_model (
  input  logic I,
  input  logic CE,
  output logic O
);
  logic ce_s;

  initial ce_s = 1'b0;

  always @(negedge I) ce_s <= CE;

  assign O = I & ce_s;
endmodule
