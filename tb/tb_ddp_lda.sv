// tb_ddp_lda: checks the detector register: cleared by reset, output one
// cycle after a valid sample, held while in_valid is low, and able to take a
// new sample every cycle.
module tb_ddp_lda;
  localparam int unsigned W = 16, P = 3;

  logic clk = 1'b0, rst_n, in_valid, out_valid;
  logic [P-1:0][W-1:0] d, q, expect_q;
  logic expect_v;
  int checks = 0, failures = 0, holds = 0, b2b = 0;

  ddp_lda #(.W(W), .P(P)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .d(d),
    .out_valid(out_valid), .q(q));

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0; in_valid = 1'b1; d = '1;
    @(posedge clk); #1;
    checks++;
    if (out_valid !== 1'b0 || q !== '0) begin
      failures++; $display("ERROR reset did not clear the register");
    end
    rst_n = 1'b1;
    expect_q = '0; expect_v = 1'b0;
    for (int n = 0; n < 300; n++) begin
      logic prev_v;
      prev_v = in_valid;
      in_valid = ($urandom_range(2) != 0);
      for (int unsigned k = 0; k < P; k++) d[k] = W'($urandom);
      if (in_valid) expect_q = d;
      expect_v = in_valid;
      if (!in_valid) holds++;
      if (in_valid && prev_v) b2b++;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== expect_v || q !== expect_q) begin
        failures++;
        $display("ERROR cycle %0d: out_valid=%0b q=%h, expected %0b %h",
                 n, out_valid, q, expect_v, expect_q);
      end
    end
    checks++;
    if (holds == 0 || b2b == 0) begin
      failures++; $display("ERROR hold or back-to-back sampling never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
