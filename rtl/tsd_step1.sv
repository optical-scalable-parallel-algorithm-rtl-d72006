// tsd_step1: first step of the two-step TSD adder (the "D" boxes), done on
// whole planes at once.
//
// Every digit pair (x, y) of the addend and augend is rewritten as
// x + y = 3c + s with s, c in {-1, 0, 1}. The 25 possible pairs fall into nine
// groups by their sum x + y (4 .. -4); the group fixes (s, c):
//   sum  4: s= 1 c= 1   sum  3: s= 0 c= 1   sum  2: s=-1 c= 1
//   sum  1: s= 1 c= 0   sum  0: s= 0 c= 0   sum -1: s=-1 c= 0
//   sum -2: s= 1 c=-1   sum -3: s= 0 c=-1   sum -4: s=-1 c=-1
// Written over the DDP planes of the two operands this gives
//   S1  = (A2+A-1)(B2+B-1) + A0(B1+B-2) + (A1+A-2)B0
//   S-1 = (A1+A-2)(B1+B-2) + A0(B2+B-1) + (A2+A-1)B0
//   C1  = (A2+A1)(B2+B1)   + A2 B0 + A0 B2
//   C-1 = (A-1+A-2)(B-1+B-2) + A-2 B0 + A0 B-2
// where + is a pixel-wise OR (beam combiner) and a product a pixel-wise AND
// (cascaded planes). The zero planes are not formed from their own sum of
// products: as in the optical layout, S1 and S-1 are superimposed and
// complemented to give S0, and C1 and C-1 likewise give C0. For one-hot
// inputs this equals the direct forms S0 = (A2+A-1)(B1+B-2) + (A1+A-2)(B2+B-1)
// + A0 B0 and C0 = the 13 pairs whose sum lies in -1..1.
//
// Interface: a*/b* are the five DDP planes of each operand (W pixels each,
// tsd_pkg pixel order); s*/c* are the three planes of the intermediate sum
// and of the intermediate carry, same pixel positions as the inputs.
// Timing: purely combinational; every pixel is independent of every other.
module tsd_step1 #(
  parameter int unsigned W = tsd_pkg::DEF_M * tsd_pkg::DEF_N * tsd_pkg::DEF_ND
) (
  input  logic [W-1:0] a2, a1, a0, an1, an2,
  input  logic [W-1:0] b2, b1, b0, bn1, bn2,
  output logic [W-1:0] s1, s0, sn1,
  output logic [W-1:0] c1, c0, cn1
);
  // Combined operand planes shared by several product terms.
  logic [W-1:0] a_2n1, a_1n2, b_2n1, b_1n2;   // digit in {2,-1} / {1,-2}
  logic [W-1:0] a_pos, a_neg, b_pos, b_neg;   // digit in {2,1} / {-1,-2}

  ddp_or #(.W(W)) u_or_a2n1 (.a(a2),  .b(an1), .y(a_2n1));
  ddp_or #(.W(W)) u_or_a1n2 (.a(a1),  .b(an2), .y(a_1n2));
  ddp_or #(.W(W)) u_or_b2n1 (.a(b2),  .b(bn1), .y(b_2n1));
  ddp_or #(.W(W)) u_or_b1n2 (.a(b1),  .b(bn2), .y(b_1n2));
  ddp_or #(.W(W)) u_or_apos (.a(a2),  .b(a1),  .y(a_pos));
  ddp_or #(.W(W)) u_or_aneg (.a(an1), .b(an2), .y(a_neg));
  ddp_or #(.W(W)) u_or_bpos (.a(b2),  .b(b1),  .y(b_pos));
  ddp_or #(.W(W)) u_or_bneg (.a(bn1), .b(bn2), .y(b_neg));

  // ---- intermediate sum, plane 1 -------------------------------------------
  logic [W-1:0] s1_t0, s1_t1, s1_t2, s1_t01;
  ddp_and #(.W(W)) u_s1_and0 (.a(a_2n1), .b(b_2n1), .y(s1_t0));
  ddp_and #(.W(W)) u_s1_and1 (.a(a0),    .b(b_1n2), .y(s1_t1));
  ddp_and #(.W(W)) u_s1_and2 (.a(a_1n2), .b(b0),    .y(s1_t2));
  ddp_or  #(.W(W)) u_s1_or0  (.a(s1_t0), .b(s1_t1), .y(s1_t01));
  ddp_or  #(.W(W)) u_s1_or1  (.a(s1_t01), .b(s1_t2), .y(s1));

  // ---- intermediate sum, plane -1 ------------------------------------------
  logic [W-1:0] sn1_t0, sn1_t1, sn1_t2, sn1_t01;
  ddp_and #(.W(W)) u_sn1_and0 (.a(a_1n2),  .b(b_1n2),  .y(sn1_t0));
  ddp_and #(.W(W)) u_sn1_and1 (.a(a0),     .b(b_2n1),  .y(sn1_t1));
  ddp_and #(.W(W)) u_sn1_and2 (.a(a_2n1),  .b(b0),     .y(sn1_t2));
  ddp_or  #(.W(W)) u_sn1_or0  (.a(sn1_t0), .b(sn1_t1), .y(sn1_t01));
  ddp_or  #(.W(W)) u_sn1_or1  (.a(sn1_t01), .b(sn1_t2), .y(sn1));

  // ---- intermediate sum, plane 0: complement of S1 + S-1 -------------------
  logic [W-1:0] s_nz;
  ddp_or  #(.W(W)) u_s0_or  (.a(s1), .b(sn1), .y(s_nz));
  ddp_cmp #(.W(W)) u_s0_cmp (.a(s_nz), .y(s0));

  // ---- intermediate carry, plane 1 -----------------------------------------
  logic [W-1:0] c1_t0, c1_t1, c1_t2, c1_t01;
  ddp_and #(.W(W)) u_c1_and0 (.a(a_pos), .b(b_pos), .y(c1_t0));
  ddp_and #(.W(W)) u_c1_and1 (.a(a2),    .b(b0),    .y(c1_t1));
  ddp_and #(.W(W)) u_c1_and2 (.a(a0),    .b(b2),    .y(c1_t2));
  ddp_or  #(.W(W)) u_c1_or0  (.a(c1_t0), .b(c1_t1), .y(c1_t01));
  ddp_or  #(.W(W)) u_c1_or1  (.a(c1_t01), .b(c1_t2), .y(c1));

  // ---- intermediate carry, plane -1 ----------------------------------------
  logic [W-1:0] cn1_t0, cn1_t1, cn1_t2, cn1_t01;
  ddp_and #(.W(W)) u_cn1_and0 (.a(a_neg),  .b(b_neg),  .y(cn1_t0));
  ddp_and #(.W(W)) u_cn1_and1 (.a(an2),    .b(b0),     .y(cn1_t1));
  ddp_and #(.W(W)) u_cn1_and2 (.a(a0),     .b(bn2),    .y(cn1_t2));
  ddp_or  #(.W(W)) u_cn1_or0  (.a(cn1_t0), .b(cn1_t1), .y(cn1_t01));
  ddp_or  #(.W(W)) u_cn1_or1  (.a(cn1_t01), .b(cn1_t2), .y(cn1));

  // ---- intermediate carry, plane 0: complement of C1 + C-1 -----------------
  logic [W-1:0] c_nz;
  ddp_or  #(.W(W)) u_c0_or  (.a(c1), .b(cn1), .y(c_nz));
  ddp_cmp #(.W(W)) u_c0_cmp (.a(c_nz), .y(c0));

endmodule
