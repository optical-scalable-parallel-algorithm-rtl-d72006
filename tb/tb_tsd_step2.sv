// tb_tsd_step2: checks the second adder step on planes. Vector 0 holds all
// nine (s, c') pairs, one per pixel; further vectors are random. For every
// pixel the five result planes must be one-hot and encode z = s + c'; Z0 is
// also checked against its direct sum-of-products form. Each of the five
// result values must occur.
module tb_tsd_step2;
  localparam int unsigned W = 9;

  logic [W-1:0] s1, s0, sn1, cp1, cp0, cpn1;
  logic [W-1:0] z2, z1, z0, zn1, zn2;
  int s [W], c [W];
  int checks = 0, failures = 0;
  int value_seen [5];

  tsd_step2 #(.W(W)) dut (
    .s1(s1), .s0(s0), .sn1(sn1), .cp1(cp1), .cp0(cp0), .cpn1(cpn1),
    .z2(z2), .z1(z1), .z0(z0), .zn1(zn1), .zn2(zn2));

  task automatic drive_and_check();
    for (int unsigned p = 0; p < W; p++) begin
      s1[p] = (s[p] == 1); s0[p] = (s[p] == 0); sn1[p] = (s[p] == -1);
      cp1[p] = (c[p] == 1); cp0[p] = (c[p] == 0); cpn1[p] = (c[p] == -1);
    end
    #1;
    for (int unsigned p = 0; p < W; p++) begin
      int z;
      logic z0_direct;
      z = s[p] + c[p];
      value_seen[z + 2]++;
      checks++;
      if ({z2[p], z1[p], z0[p], zn1[p], zn2[p]} !=
          {z == 2, z == 1, z == 0, z == -1, z == -2}) begin
        failures++;
        $display("ERROR pixel %0d (s=%0d,c'=%0d): Z planes %b, expected z=%0d",
                 p, s[p], c[p], {z2[p], z1[p], z0[p], zn1[p], zn2[p]}, z);
      end
      z0_direct = (s1[p] & cpn1[p]) | (s0[p] & cp0[p]) | (sn1[p] & cp1[p]);
      checks++;
      if (z0[p] != z0_direct) begin
        failures++;
        $display("ERROR pixel %0d: Z0 differs from sum-of-products form", p);
      end
    end
  endtask

  initial begin
    foreach (value_seen[v]) value_seen[v] = 0;
    for (int unsigned p = 0; p < W; p++) begin
      s[p] = int'(p / 3) - 1;
      c[p] = int'(p % 3) - 1;
    end
    drive_and_check();
    for (int n = 0; n < 100; n++) begin
      for (int unsigned p = 0; p < W; p++) begin
        s[p] = tsd_tb_pkg::rand_trit();
        c[p] = tsd_tb_pkg::rand_trit();
      end
      drive_and_check();
    end
    foreach (value_seen[v]) begin
      checks++;
      if (value_seen[v] == 0) begin
        failures++;
        $display("ERROR result digit %0d never produced", v - 2);
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
