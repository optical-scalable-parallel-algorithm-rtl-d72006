// tb_ddp_encoder: drives random digit arrays (with and without codes that are
// not TSD digits) into the DDP encoder and checks every pixel of the five
// planes against the digit value, that each valid pixel is lit in exactly one
// plane, and the error flag.
module tb_ddp_encoder;
  import tsd_pkg::*;
  localparam int unsigned M = 3, N = 2, ND = 4;
  localparam int unsigned W = M * N * ND;

  tsd_digit_t [W-1:0] digits;
  logic [W-1:0] p2, p1, p0, n1, n2;
  logic code_err;
  int checks = 0, failures = 0;

  ddp_encoder #(.M(M), .N(N), .ND(ND)) dut (
    .digits(digits), .p2(p2), .p1(p1), .p0(p0), .n1(n1), .n2(n2),
    .code_err(code_err));

  task automatic expect1(input logic got, input logic exp, input string what,
                         input int p);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR %s pixel %0d: got %0b expected %0b", what, p, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      int v [W];
      logic bad;
      bad = 1'b0;
      for (int unsigned p = 0; p < W; p++) begin
        // every 4th vector carries one code outside -2..2
        if (n % 4 == 3 && p == W / 2) begin
          v[p] = (n % 8 == 3) ? 3 : -3 - int'($urandom_range(1));
          bad = 1'b1;
        end else begin
          v[p] = tsd_tb_pkg::rand_digit();
        end
        digits[p] = tsd_digit_t'(v[p]);
      end
      #1;
      for (int unsigned p = 0; p < W; p++) begin
        expect1(p2[p], v[p] ==  2, "DDP-2",  p);
        expect1(p1[p], v[p] ==  1, "DDP-1",  p);
        expect1(p0[p], v[p] ==  0, "DDP-0",  p);
        expect1(n1[p], v[p] == -1, "DDP-(-1)", p);
        expect1(n2[p], v[p] == -2, "DDP-(-2)", p);
      end
      expect1(code_err, bad, "code_err", -1);
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
