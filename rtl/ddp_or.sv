// ddp_or: pixel-wise OR of two binary planes.
//
// Optically this is a beam combiner that superimposes the light coming through
// two planes. The adder only combines planes that are never lit at the same
// pixel (different digit values of one array, or disjoint product terms), so
// the superposition never sees two beams on one pixel and acts as an OR.
//
// Interface: a, b and y are W-pixel planes; y[p] = a[p] | b[p].
// Timing: purely combinational.
module ddp_or #(
  parameter int unsigned W = tsd_pkg::DEF_M * tsd_pkg::DEF_N * tsd_pkg::DEF_ND
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  assign y = a | b;
endmodule
