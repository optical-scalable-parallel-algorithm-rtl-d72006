// tb_ddp_lda_expand: drives random intermediate sum and carry digits (as
// one-hot planes) into the detection/re-addressing stage and checks, one
// cycle later and for every number, that the sum keeps its digit positions
// with a 0 digit added on top and that the carry has moved one digit up with
// a 0 digit added at the bottom, never spilling into the neighbouring number.
// Also checks reset, the one-cycle valid delay and holding on idle cycles.
module tb_ddp_lda_expand;
  localparam int unsigned M = 3, N = 2, ND = 4;
  localparam int unsigned E = M * N;
  localparam int unsigned W_IN = E * ND, W_OUT = E * (ND + 1);

  logic clk = 1'b0, rst_n, in_valid, out_valid;
  logic [W_IN-1:0]  s1, s0, sn1, c1, c0, cn1;
  logic [W_OUT-1:0] sx1, sx0, sxn1, cp1, cp0, cpn1;
  int s [W_IN], c [W_IN];        // last sampled digits
  int checks = 0, failures = 0, idles = 0;

  ddp_lda_expand #(.M(M), .N(N), .ND(ND)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .s1(s1), .s0(s0), .sn1(sn1), .c1(c1), .c0(c0), .cn1(cn1),
    .out_valid(out_valid),
    .sx1(sx1), .sx0(sx0), .sxn1(sxn1), .cp1(cp1), .cp0(cp0), .cpn1(cpn1));

  always #5 clk = ~clk;

  task automatic check_outputs();
    for (int unsigned e = 0; e < E; e++) begin
      for (int unsigned i = 0; i <= ND; i++) begin
        int es, ec, q;
        q  = int'(e * (ND + 1) + i);
        es = (i < ND) ? s[e * ND + i] : 0;
        ec = (i > 0) ? c[e * ND + i - 1] : 0;
        checks++;
        if ({sx1[q], sx0[q], sxn1[q]} != {es == 1, es == 0, es == -1}) begin
          failures++;
          $display("ERROR number %0d digit %0d: sum planes %b, expected %0d",
                   e, i, {sx1[q], sx0[q], sxn1[q]}, es);
        end
        checks++;
        if ({cp1[q], cp0[q], cpn1[q]} != {ec == 1, ec == 0, ec == -1}) begin
          failures++;
          $display("ERROR number %0d digit %0d: carry planes %b, expected %0d",
                   e, i, {cp1[q], cp0[q], cpn1[q]}, ec);
        end
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b1;
    {s1, s0, sn1, c1, c0, cn1} = '1;
    @(posedge clk); #1;
    checks++;
    if (out_valid !== 1'b0) begin
      failures++; $display("ERROR out_valid set during reset");
    end
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      in_valid = (n % 5 != 4);
      if (in_valid) begin
        for (int unsigned p = 0; p < W_IN; p++) begin
          s[p] = tsd_tb_pkg::rand_trit();
          // vector 0: all carries 1, so a spill into the next number shows
          c[p] = (n == 0) ? 1 : tsd_tb_pkg::rand_trit();
        end
      end else idles++;
      // the planes change on idle cycles too; the stage must hold
      for (int unsigned p = 0; p < W_IN; p++) begin
        int ds, dc;
        ds = in_valid ? s[p] : tsd_tb_pkg::rand_trit();
        dc = in_valid ? c[p] : tsd_tb_pkg::rand_trit();
        s1[p] = (ds == 1); s0[p] = (ds == 0); sn1[p] = (ds == -1);
        c1[p] = (dc == 1); c0[p] = (dc == 0); cn1[p] = (dc == -1);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin
        failures++; $display("ERROR cycle %0d: out_valid=%0b", n, out_valid);
      end
      check_outputs();
    end
    checks++;
    if (idles == 0) begin
      failures++; $display("ERROR idle cycles never exercised");
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
