// tsd_step2: second step of the two-step TSD adder (the "E" boxes), done on
// whole planes at once.
//
// Each final digit is z_i = s_i + c_{i-1}. Both terms lie in {-1, 0, 1}, so the
// sum lies in {-2..2} and no further carry arises. Over DDP planes, with the
// carry planes already shifted one digit up (C'), this is
//   Z2  = S1 C'1
//   Z1  = S1 C'0  + S0 C'1
//   Z-1 = S-1 C'0 + S0 C'-1
//   Z-2 = S-1 C'-1
//   Z0  = complement of (Z2 + Z1 + Z-1 + Z-2)
// Z0 is formed by superimposing and complementing the other four planes, as
// the optical layout does; for one-hot inputs it equals
// S1 C'-1 + S0 C'0 + S-1 C'1.
//
// Interface: s*/cp* are the three planes of the padded intermediate sum and
// of the shifted carry (W pixels each, tsd_pkg pixel order with ND+1 digits
// per number); z* are the five DDP planes of the result.
// Timing: purely combinational.
module tsd_step2 #(
  parameter int unsigned W = tsd_pkg::DEF_M * tsd_pkg::DEF_N * (tsd_pkg::DEF_ND + 1)
) (
  input  logic [W-1:0] s1, s0, sn1,
  input  logic [W-1:0] cp1, cp0, cpn1,
  output logic [W-1:0] z2, z1, z0, zn1, zn2
);
  logic [W-1:0] z1_t0, z1_t1, zn1_t0, zn1_t1;
  logic [W-1:0] zp_or, zn_or, z_nz;

  ddp_and #(.W(W)) u_z2_and   (.a(s1),  .b(cp1),  .y(z2));

  ddp_and #(.W(W)) u_z1_and0  (.a(s1),  .b(cp0),  .y(z1_t0));
  ddp_and #(.W(W)) u_z1_and1  (.a(s0),  .b(cp1),  .y(z1_t1));
  ddp_or  #(.W(W)) u_z1_or    (.a(z1_t0), .b(z1_t1), .y(z1));

  ddp_and #(.W(W)) u_zn1_and0 (.a(sn1), .b(cp0),  .y(zn1_t0));
  ddp_and #(.W(W)) u_zn1_and1 (.a(s0),  .b(cpn1), .y(zn1_t1));
  ddp_or  #(.W(W)) u_zn1_or   (.a(zn1_t0), .b(zn1_t1), .y(zn1));

  ddp_and #(.W(W)) u_zn2_and  (.a(sn1), .b(cpn1), .y(zn2));

  ddp_or  #(.W(W)) u_z0_or0   (.a(z2),    .b(z1),    .y(zp_or));
  ddp_or  #(.W(W)) u_z0_or1   (.a(zn1),   .b(zn2),   .y(zn_or));
  ddp_or  #(.W(W)) u_z0_or2   (.a(zp_or), .b(zn_or), .y(z_nz));
  ddp_cmp #(.W(W)) u_z0_cmp   (.a(z_nz), .y(z0));

endmodule
