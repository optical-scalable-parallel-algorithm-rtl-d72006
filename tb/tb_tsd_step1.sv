// tb_tsd_step1: checks the first adder step on planes. Vector 0 holds all 25
// digit pairs, one per pixel; further vectors are random. For every pixel the
// sum and carry planes must be one-hot and encode the (s, c) that the
// arithmetic rule x + y = 3c + s gives; S0 and C0 are also checked against
// their direct sum-of-products forms. Each of the nine digit-sum groups
// (x + y = 4 .. -4) must occur.
module tb_tsd_step1;
  localparam int unsigned W = 25;

  logic [W-1:0] a2, a1, a0, an1, an2, b2, b1, b0, bn1, bn2;
  logic [W-1:0] s1, s0, sn1, c1, c0, cn1;
  int x [W], y [W];
  int checks = 0, failures = 0;
  int group_seen [9];

  tsd_step1 #(.W(W)) dut (
    .a2(a2), .a1(a1), .a0(a0), .an1(an1), .an2(an2),
    .b2(b2), .b1(b1), .b0(b0), .bn1(bn1), .bn2(bn2),
    .s1(s1), .s0(s0), .sn1(sn1), .c1(c1), .c0(c0), .cn1(cn1));

  task automatic drive();
    for (int unsigned p = 0; p < W; p++) begin
      a2[p] = (x[p] == 2); a1[p] = (x[p] == 1); a0[p] = (x[p] == 0);
      an1[p] = (x[p] == -1); an2[p] = (x[p] == -2);
      b2[p] = (y[p] == 2); b1[p] = (y[p] == 1); b0[p] = (y[p] == 0);
      bn1[p] = (y[p] == -1); bn2[p] = (y[p] == -2);
    end
  endtask

  task automatic check_pixels();
    for (int unsigned p = 0; p < W; p++) begin
      int s, c;
      logic s0_direct, c0_direct;
      tsd_tb_pkg::step1_ref(x[p], y[p], s, c);
      group_seen[4 - (x[p] + y[p])]++;
      checks++;
      if ({s1[p], s0[p], sn1[p]} != {s == 1, s == 0, s == -1}) begin
        failures++;
        $display("ERROR pixel %0d (%0d,%0d): S planes %b, expected s=%0d",
                 p, x[p], y[p], {s1[p], s0[p], sn1[p]}, s);
      end
      checks++;
      if ({c1[p], c0[p], cn1[p]} != {c == 1, c == 0, c == -1}) begin
        failures++;
        $display("ERROR pixel %0d (%0d,%0d): C planes %b, expected c=%0d",
                 p, x[p], y[p], {c1[p], c0[p], cn1[p]}, c);
      end
      // direct forms of the zero planes
      s0_direct = ((a2[p] | an1[p]) & (b1[p] | bn2[p])) |
                  ((a1[p] | an2[p]) & (b2[p] | bn1[p])) | (a0[p] & b0[p]);
      c0_direct = ((a2[p] | a1[p]) & (bn1[p] | bn2[p])) |
                  ((an1[p] | an2[p]) & (b2[p] | b1[p])) |
                  (a0[p] & (b1[p] | bn1[p])) | ((a1[p] | a0[p] | an1[p]) & b0[p]);
      checks++;
      if (s0[p] != s0_direct || c0[p] != c0_direct) begin
        failures++;
        $display("ERROR pixel %0d: S0/C0 differ from sum-of-products form", p);
      end
    end
  endtask

  initial begin
    foreach (group_seen[g]) group_seen[g] = 0;
    for (int unsigned p = 0; p < W; p++) begin
      x[p] = int'(p / 5) - 2;
      y[p] = int'(p % 5) - 2;
    end
    drive(); #1 check_pixels();
    for (int n = 0; n < 100; n++) begin
      for (int unsigned p = 0; p < W; p++) begin
        x[p] = tsd_tb_pkg::rand_digit();
        y[p] = tsd_tb_pkg::rand_digit();
      end
      drive(); #1 check_pixels();
    end
    foreach (group_seen[g]) begin
      checks++;
      if (group_seen[g] == 0) begin
        failures++;
        $display("ERROR digit sum %0d never applied", 4 - g);
      end
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
