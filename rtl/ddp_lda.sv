// ddp_lda: light detector array stage, modelled as a plane register.
//
// Between the optical steps the planes are detected, turned into electrical
// signals and used to address the next set of modulators; at the end they are
// detected as the result. This module is that detection point: it samples P
// planes of W pixels on a rising clock edge when `in_valid` is high and holds
// them until the next valid sample. Treating detection as one clocked
// register stage is this implementation's own choice.
//
// Interface: d/q are P planes of W pixels; in_valid/out_valid mark a sample.
// Reset (active-low, synchronous) clears the planes and out_valid.
// Timing: one cycle from d to q; a new set of planes can be taken every cycle.
module ddp_lda #(
  parameter int unsigned W = tsd_pkg::DEF_M * tsd_pkg::DEF_N * tsd_pkg::DEF_ND,
  parameter int unsigned P = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [P-1:0][W-1:0] d,
  output logic                out_valid,
  output logic [P-1:0][W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      q         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) q <= d;
    end
  end
endmodule
