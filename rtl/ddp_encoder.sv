// ddp_encoder: digit-decomposition-plane (DDP) coding of a TSD data array.
//
// An M x N array of ND-digit TSD numbers is split into five binary planes
// DDP-2, DDP-1, DDP-0, DDP-(-1) and DDP-(-2). A pixel of plane DDP-v is 1
// (transparent) exactly where the digit at that position equals v, so at each
// pixel one and only one of the five planes is 1 and any plane is the
// complement of the other four superimposed. In the optical adder these
// planes are the patterns written onto the input spatial light modulators.
//
// Interface: `digits` holds M*N*ND digit codes (tsd_pkg pixel order);
// p2..n2 are the five planes, one bit per pixel. `code_err` is 1 when some
// input code is not a TSD digit (3, -3 or -4); such a pixel lights no plane.
// The 3-bit digit code and the error flag are this implementation's own
// choice; the plane definition is the DDP scheme itself.
//
// Timing: purely combinational.
module ddp_encoder #(
  parameter int unsigned M  = tsd_pkg::DEF_M,
  parameter int unsigned N  = tsd_pkg::DEF_N,
  parameter int unsigned ND = tsd_pkg::DEF_ND,
  localparam int unsigned W = M * N * ND
) (
  input  tsd_pkg::tsd_digit_t [W-1:0] digits,
  output logic [W-1:0]                p2,    // DDP-2
  output logic [W-1:0]                p1,    // DDP-1
  output logic [W-1:0]                p0,    // DDP-0
  output logic [W-1:0]                n1,    // DDP-(-1)
  output logic [W-1:0]                n2,    // DDP-(-2)
  output logic                        code_err
);
  import tsd_pkg::*;

  logic [W-1:0] bad;

  always_comb begin
    for (int unsigned p = 0; p < W; p++) begin
      p2[p]  = (digits[p] == TSD_P2);
      p1[p]  = (digits[p] == TSD_P1);
      p0[p]  = (digits[p] == TSD_0);
      n1[p]  = (digits[p] == TSD_N1);
      n2[p]  = (digits[p] == TSD_N2);
      bad[p] = !tsd_is_digit(digits[p]);
    end
  end

  assign code_err = |bad;

endmodule
