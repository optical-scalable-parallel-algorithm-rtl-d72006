// ddp_and: pixel-wise AND of two binary planes.
//
// Optically this is two spatial light modulators cascaded in one beam: light
// leaves a pixel only where both planes are transparent. Every product term of
// the adder's plane equations is one of these.
//
// Interface: a, b and y are W-pixel planes; y[p] = a[p] & b[p].
// Timing: purely combinational.
module ddp_and #(
  parameter int unsigned W = tsd_pkg::DEF_M * tsd_pkg::DEF_N * tsd_pkg::DEF_ND
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  assign y = a & b;
endmodule
