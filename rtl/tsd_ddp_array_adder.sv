// tsd_ddp_array_adder: adds two M x N arrays of ND-digit trinary signed-digit
// (TSD) numbers element by element, in constant time whatever M, N and ND are.
//
// Radix-3 digits in {-2..2} are redundant, so addition needs no carry chain:
// step 1 rewrites each digit pair as x + y = 3c + s with s, c in {-1,0,1};
// step 2 adds each sum digit to the carry from the digit below,
// z_i = s_i + c_{i-1}, which always lands in {-2..2}. Every operation is done
// on whole digit-decomposition planes (DDP): one binary plane per digit value,
// all M*N*ND digits of an array side by side, so step 1 and step 2 are each a
// handful of pixel-wise AND, OR and complement operations.
//
// Data path (one pipeline stage per detection point):
//   digits A, B -> ddp_encoder x2 -> 10 planes -> tsd_step1 -> S1,S0,S-1,
//   C1,C0,C-1 -> ddp_lda_expand (register; sum padded at the MSB, carry
//   shifted up one digit) -> tsd_step2 -> Z2,Z1,Z0,Z-1,Z-2 -> ddp_lda.
//
// Interface: a_digits/b_digits hold M*N*ND 3-bit digit codes (tsd_pkg pixel
// order, digit 0 least significant). The result comes out as the five DDP
// planes of an M x N array of (ND+1)-digit numbers, pixel (j*N+k)*(ND+1)+i.
// out_code_err marks a result whose operands held a code that is not a digit.
// Timing: in_valid to out_valid is 2 clock cycles; a new pair of arrays can
// be applied every cycle. Reset is synchronous and active low.
// The plane equations, the complement-formed zero planes and the padding
// positions follow the two-step DDP adder; the digit code at the input, the
// clocked detection stages and the error flag are this implementation's own.
module tsd_ddp_array_adder #(
  parameter int unsigned M  = tsd_pkg::DEF_M,
  parameter int unsigned N  = tsd_pkg::DEF_N,
  parameter int unsigned ND = tsd_pkg::DEF_ND,
  localparam int unsigned W_IN  = M * N * ND,
  localparam int unsigned W_OUT = M * N * (ND + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  tsd_pkg::tsd_digit_t [W_IN-1:0] a_digits,
  input  tsd_pkg::tsd_digit_t [W_IN-1:0] b_digits,
  output logic                          out_valid,
  output logic                          out_code_err,
  output logic [W_OUT-1:0]              z2,
  output logic [W_OUT-1:0]              z1,
  output logic [W_OUT-1:0]              z0,
  output logic [W_OUT-1:0]              zn1,
  output logic [W_OUT-1:0]              zn2
);
  // ---- DDP coding of both operands ------------------------------------------
  logic [W_IN-1:0] a2, a1, a0, an1, an2;
  logic [W_IN-1:0] b2, b1, b0, bn1, bn2;
  logic            a_err, b_err;

  ddp_encoder #(.M(M), .N(N), .ND(ND)) u_enc_a (
    .digits(a_digits), .p2(a2), .p1(a1), .p0(a0), .n1(an1), .n2(an2),
    .code_err(a_err));
  ddp_encoder #(.M(M), .N(N), .ND(ND)) u_enc_b (
    .digits(b_digits), .p2(b2), .p1(b1), .p0(b0), .n1(bn1), .n2(bn2),
    .code_err(b_err));

  // ---- step 1: intermediate sum and carry planes ----------------------------
  logic [W_IN-1:0] s1, s0, sn1, c1, c0, cn1;

  tsd_step1 #(.W(W_IN)) u_step1 (
    .a2(a2), .a1(a1), .a0(a0), .an1(an1), .an2(an2),
    .b2(b2), .b1(b1), .b0(b0), .bn1(bn1), .bn2(bn2),
    .s1(s1), .s0(s0), .sn1(sn1), .c1(c1), .c0(c0), .cn1(cn1));

  // ---- detection of the intermediate planes, expanded and shifted copies --
  logic             mid_valid;
  logic             mid_err;
  logic [W_OUT-1:0] sx1, sx0, sxn1, cp1, cp0, cpn1;

  ddp_lda_expand #(.M(M), .N(N), .ND(ND)) u_lda_mid (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .s1(s1), .s0(s0), .sn1(sn1), .c1(c1), .c0(c0), .cn1(cn1),
    .out_valid(mid_valid),
    .sx1(sx1), .sx0(sx0), .sxn1(sxn1), .cp1(cp1), .cp0(cp0), .cpn1(cpn1));

  // ---- step 2: final digit planes -------------------------------------------
  logic [W_OUT-1:0] zc2, zc1, zc0, zcn1, zcn2;

  tsd_step2 #(.W(W_OUT)) u_step2 (
    .s1(sx1), .s0(sx0), .sn1(sxn1), .cp1(cp1), .cp0(cp0), .cpn1(cpn1),
    .z2(zc2), .z1(zc1), .z0(zc0), .zn1(zcn1), .zn2(zcn2));

  // ---- detection of the result planes ---------------------------------------
  logic [4:0][W_OUT-1:0] out_d, out_q;

  assign out_d = {zc2, zc1, zc0, zcn1, zcn2};

  ddp_lda #(.W(W_OUT), .P(5)) u_lda_out (
    .clk(clk), .rst_n(rst_n), .in_valid(mid_valid), .d(out_d),
    .out_valid(out_valid), .q(out_q));

  assign {z2, z1, z0, zn1, zn2} = out_q;

  // The error flag travels alongside the planes.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mid_err      <= 1'b0;
      out_code_err <= 1'b0;
    end else begin
      if (in_valid)  mid_err      <= a_err | b_err;
      if (mid_valid) out_code_err <= mid_err;
    end
  end

  // ---- checks: each result pixel lies in exactly one plane ------------------
  logic [W_OUT-1:0] onehot_ok;
  always_comb begin
    for (int unsigned p = 0; p < W_OUT; p++)
      onehot_ok[p] = ((32'(z2[p]) + 32'(z1[p]) + 32'(z0[p]) + 32'(zn1[p])
                       + 32'(zn2[p])) == 32'd1);
  end

  a_result_one_hot: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_code_err) |-> &onehot_ok)
    else $error("result planes are not one-hot");

endmodule
