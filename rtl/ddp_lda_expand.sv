// ddp_lda_expand: detection of the intermediate planes and re-addressing of
// the second step ("expanded and shifted copies").
//
// After step 1 the six intermediate planes (S1, S0, S-1, C1, C0, C-1) are
// detected and used, as electrical signals, to drive the inputs of step 2.
// Detection is a ddp_lda register stage. Its outputs are re-addressed so that
// every number grows from ND to ND+1 digits: the intermediate sum keeps its
// digit positions and gains one pixel at the most significant end; the
// intermediate carry moves one digit up (c_{i-1} lands on position i) and
// gains one pixel at the least significant end. Each added pixel holds the
// digit 0 (lit in the zero plane, dark in the +1/-1 planes), so the planes
// stay one-hot, z_0 = s_0 and z_ND = c_{ND-1}. A carry never crosses into the
// neighbouring number. The padding pixels are therefore constant outputs
// (6 per number), which synthesis reports as driven by constants.
// The added-pixel positions follow the two-step scheme; the 0 value of the
// added pixels and the clocked detection are this implementation's choices.
//
// Interface: s*/c* in: W_IN = M*N*ND pixels (tsd_pkg pixel order), sampled
// when in_valid is high. sx*/cp* out: W_OUT = M*N*(ND+1) pixels, same order
// with ND+1 digits per number, valid while out_valid is high.
// Timing: one clock cycle from s*/c* to sx*/cp*; one sample per cycle.
// Reset (synchronous, active low) clears out_valid.
module ddp_lda_expand #(
  parameter int unsigned M  = tsd_pkg::DEF_M,
  parameter int unsigned N  = tsd_pkg::DEF_N,
  parameter int unsigned ND = tsd_pkg::DEF_ND,
  localparam int unsigned W_IN  = M * N * ND,
  localparam int unsigned W_OUT = M * N * (ND + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [W_IN-1:0]  s1, s0, sn1,
  input  logic [W_IN-1:0]  c1, c0, cn1,
  output logic             out_valid,
  output logic [W_OUT-1:0] sx1, sx0, sxn1,   // sum, padded at the MSB
  output logic [W_OUT-1:0] cp1, cp0, cpn1    // carry, shifted up, padded at the LSB
);
  logic [5:0][W_IN-1:0] det;

  ddp_lda #(.W(W_IN), .P(6)) u_lda (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .d({s1, s0, sn1, c1, c0, cn1}),
    .out_valid(out_valid), .q(det));

  // det[5..3] = S1, S0, S-1; det[2..0] = C1, C0, C-1
  always_comb begin
    for (int unsigned e = 0; e < M * N; e++) begin
      for (int unsigned i = 0; i <= ND; i++) begin
        if (i < ND) begin
          sx1 [e*(ND+1) + i] = det[5][e*ND + i];
          sx0 [e*(ND+1) + i] = det[4][e*ND + i];
          sxn1[e*(ND+1) + i] = det[3][e*ND + i];
        end else begin
          sx1 [e*(ND+1) + i] = 1'b0;
          sx0 [e*(ND+1) + i] = 1'b1;
          sxn1[e*(ND+1) + i] = 1'b0;
        end
        if (i > 0) begin
          cp1 [e*(ND+1) + i] = det[2][e*ND + i - 1];
          cp0 [e*(ND+1) + i] = det[1][e*ND + i - 1];
          cpn1[e*(ND+1) + i] = det[0][e*ND + i - 1];
        end else begin
          cp1 [e*(ND+1) + i] = 1'b0;
          cp0 [e*(ND+1) + i] = 1'b1;
          cpn1[e*(ND+1) + i] = 1'b0;
        end
      end
    end
  end
endmodule
