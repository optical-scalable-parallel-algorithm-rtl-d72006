// ddp_cmp: pixel-wise complement of a binary plane.
//
// In the optical adder the superimposed light of all but one DDP plane is
// detected and complemented to produce the remaining plane (the DDP property
// that each plane is the complement of the others superimposed). This module
// is that complement step: the zero-digit planes S0, C0 and Z0 come out of it.
//
// Interface: a and y are W-pixel planes; y[p] = ~a[p].
// Timing: purely combinational.
module ddp_cmp #(
  parameter int unsigned W = tsd_pkg::DEF_M * tsd_pkg::DEF_N * tsd_pkg::DEF_ND
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);
  assign y = ~a;
endmodule
