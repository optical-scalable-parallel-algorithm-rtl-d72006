// tb_ddp_coding_example: DDP coding of a 4 x 1 array of 4-digit TSD numbers,
// [15; -52; -22; 4] = [0 1 2 0; -1 -2 -2 -1; -1 1 -2 2; 0 0 1 1] (most
// significant digit first). The five planes are compared with the expected
// 4 x 4 pixel patterns, written row by row with the most significant digit on
// the left, and the digit strings are checked against the decimal values.
module tb_ddp_coding_example;
  import tsd_pkg::*;
  localparam int unsigned M = 4, N = 1, ND = 4;
  localparam int unsigned W = M * N * ND;

  localparam int DIG [4][4] = '{'{0, 1, 2, 0}, '{-1, -2, -2, -1},
                                '{-1, 1, -2, 2}, '{0, 0, 1, 1}};
  localparam int DEC [4] = '{15, -52, -22, 4};
  // expected planes: [plane][row] as 4-bit rows, MSB digit = leftmost bit
  // plane order: DDP-2, DDP-1, DDP-0, DDP-(-1), DDP-(-2)
  localparam logic [3:0] EXP [5][4] = '{
    '{4'b0010, 4'b0000, 4'b0001, 4'b0000},
    '{4'b0100, 4'b0000, 4'b0100, 4'b0011},
    '{4'b1001, 4'b0000, 4'b0000, 4'b1100},
    '{4'b0000, 4'b1001, 4'b1000, 4'b0000},
    '{4'b0000, 4'b0110, 4'b0010, 4'b0000}};

  tsd_digit_t [W-1:0] digits;
  logic [W-1:0] planes [5];
  logic code_err;
  int checks = 0, failures = 0;

  ddp_encoder #(.M(M), .N(N), .ND(ND)) dut (
    .digits(digits), .p2(planes[0]), .p1(planes[1]), .p0(planes[2]),
    .n1(planes[3]), .n2(planes[4]), .code_err(code_err));

  initial begin
    for (int j = 0; j < 4; j++) begin
      int v;
      v = 0;
      for (int i = 0; i < 4; i++) begin
        digits[j*ND + i] = tsd_digit_t'(DIG[j][3-i]);
        v = 3 * v + DIG[j][i];
      end
      checks++;
      if (v != DEC[j]) begin
        failures++; $display("ERROR row %0d digits give %0d, not %0d", j, v, DEC[j]);
      end
    end
    #1;
    for (int pl = 0; pl < 5; pl++)
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (planes[pl][j*ND + i] !== EXP[pl][j][i]) begin
            failures++;
            $display("ERROR plane %0d row %0d digit %0d: %0b, expected %0b",
                     pl, j, i, planes[pl][j*ND + i], EXP[pl][j][i]);
          end
        end
    checks++;
    if (code_err !== 1'b0) begin
      failures++; $display("ERROR code_err set for valid digits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
