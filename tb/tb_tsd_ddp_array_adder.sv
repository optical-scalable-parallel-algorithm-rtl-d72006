// tb_tsd_ddp_array_adder: end-to-end test of the TSD array adder at its
// default size (10 x 2 array of 4-digit numbers, no parameter overrides).
//
// 1. The worked example: A = [80 77; -21 42; ...], B = [80 35; 53 11; ...],
//    whose sums are 160, 112, 32, 53, ... . The digits of A and B are given in
//    TSD (most significant first); each result is decoded from its five planes
//    and compared both with the decimal sum and digit by digit with an
//    arithmetic model of the two steps. The latency must be exactly 2 cycles.
// 2. 400 random array pairs, issued back to back and with random idle
//    cycles, checked the same way against a queue of expected results.
// 3. Operands holding a code outside -2..2 must raise out_code_err.
// It counts how often each mechanism of the adder was exercised and fails if
// one never was: each of the nine step-1 digit-sum groups, each of the five
// step-2 result digits, a nonzero carry into the new top digit, a nonzero
// shifted carry inside a number, back-to-back issue, idle gaps, the error
// flag and reset.
module tb_tsd_ddp_array_adder;
  import tsd_pkg::*;
  localparam int unsigned M = DEF_M, N = DEF_N, ND = DEF_ND;
  localparam int unsigned E = M * N;
  localparam int unsigned W_IN = E * ND, W_OUT = E * (ND + 1);

  localparam int EX_A [10][2][4] = '{
    '{'{2, 2, 2, 2}, '{2, 2, 1, 2}},
    '{'{0, -2, -1, 0}, '{1, 1, 2, 0}},
    '{'{1, 1, 0, 1}, '{0, 1, 0, 2}},
    '{'{0, 2, 0, 2}, '{-2, -2, -2, -2}},
    '{'{1, 0, 2, 0}, '{2, 2, 0, 2}},
    '{'{0, 2, 0, 0}, '{-1, 0, -1, -2}},
    '{'{-1, 0, -1, 0}, '{0, -1, 0, -2}},
    '{'{0, 0, 0, 2}, '{0, 2, 1, 1}},
    '{'{1, 1, 2, 1}, '{0, -1, -1, -2}},
    '{'{2, 2, 2, 0}, '{1, 2, 2, 0}}};
  localparam int EX_B [10][2][4] = '{
    '{'{2, 2, 2, 2}, '{1, 0, 2, 2}},
    '{'{1, 2, 2, 2}, '{0, 1, 0, 2}},
    '{'{-2, 0, -1, 0}, '{-2, -2, -1, 0}},
    '{'{2, 2, 2, 1}, '{0, -1, 0, 0}},
    '{'{-1, 0, -2, 0}, '{0, -1, -1, -2}},
    '{'{1, 0, 0, 1}, '{-2, -1, 0, -2}},
    '{'{-2, -1, -2, -1}, '{1, 2, 2, 2}},
    '{'{0, 0, 2, 1}, '{-2, -2, -1, -2}},
    '{'{0, 1, 1, 2}, '{-1, -1, -2, -1}},
    '{'{-2, 0, 0, -1}, '{0, -2, -1, -2}}};
  localparam int EX_A_DEC [10][2] = '{'{80, 77}, '{-21, 42}, '{37, 11}, '{20, -80}, '{33, 74}, '{18, -32}, '{-30, -11}, '{2, 22}, '{43, -14}, '{78, 51}};
  localparam int EX_B_DEC [10][2] = '{'{80, 35}, '{53, 11}, '{-57, -75}, '{79, -9}, '{-33, -14}, '{28, -65}, '{-70, 53}, '{7, -77}, '{14, -43}, '{-55, -23}};
  localparam int EX_Z_DEC [10][2] = '{'{160, 112}, '{32, 53}, '{-20, -64}, '{99, -89}, '{0, 60}, '{46, -97}, '{-100, 42}, '{9, -55}, '{57, -57}, '{23, 28}};

  typedef struct {
    int  digit [W_OUT];   // expected result digits, pixel order
    int  value [E];       // expected value of each number
    logic err;
  } expect_t;

  logic clk = 1'b0, rst_n, in_valid, out_valid, out_code_err;
  tsd_digit_t [W_IN-1:0] a_digits, b_digits;
  logic [W_OUT-1:0] z2, z1, z0, zn1, zn2;

  int checks = 0, failures = 0;
  int cycle = 0;
  expect_t exp_q [$];
  int issue_cycle_q [$];

  // mechanism counters
  int grp_seen [9];        // step-1 groups by digit sum 4 .. -4
  int zval_seen [5];       // step-2 result digits -2 .. 2
  int msb_carry = 0, inner_carry = 0, back_to_back = 0, idle_gaps = 0;
  int code_errs = 0, resets = 0, latency_ok = 0;

  tsd_ddp_array_adder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .a_digits(a_digits), .b_digits(b_digits),
    .out_valid(out_valid), .out_code_err(out_code_err),
    .z2(z2), .z1(z1), .z0(z0), .zn1(zn1), .zn2(zn2));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic int pow3(int i);
    int r = 1;
    for (int k = 0; k < i; k++) r *= 3;
    return r;
  endfunction

  // Build the expected result of one operand pair with the two-step model.
  function automatic expect_t model(int xa [W_IN], int xb [W_IN], logic err);
    expect_t r;
    r.err = err;
    for (int unsigned e = 0; e < E; e++) begin
      int s [ND], c [ND];
      int va = 0, vb = 0, vz = 0;
      for (int unsigned i = 0; i < ND; i++) begin
        tsd_tb_pkg::step1_ref(xa[e*ND+i], xb[e*ND+i], s[i], c[i]);
        va += xa[e*ND+i] * pow3(i);
        vb += xb[e*ND+i] * pow3(i);
      end
      for (int unsigned i = 0; i <= ND; i++) begin
        int z;
        z = ((i < ND) ? s[i] : 0) + ((i > 0) ? c[i-1] : 0);
        r.digit[e*(ND+1)+i] = z;
        vz += z * pow3(i);
      end
      r.value[e] = va + vb;
      if (!err && vz != va + vb) $display("NOTE model mismatch in number %0d", e);
    end
    return r;
  endfunction

  task automatic count_mechanisms(int xa [W_IN], int xb [W_IN], expect_t r);
    for (int unsigned e = 0; e < E; e++)
      for (int unsigned i = 0; i < ND; i++) begin
        int s, c;
        tsd_tb_pkg::step1_ref(xa[e*ND+i], xb[e*ND+i], s, c);
        grp_seen[4 - (xa[e*ND+i] + xb[e*ND+i])]++;
        if (c != 0 && i == ND - 1) msb_carry++;
        if (c != 0 && i <  ND - 1) inner_carry++;
      end
    for (int unsigned q = 0; q < W_OUT; q++) zval_seen[r.digit[q] + 2]++;
  endtask

  task automatic apply(int xa [W_IN], int xb [W_IN], logic err);
    expect_t r;
    for (int unsigned p = 0; p < W_IN; p++) begin
      a_digits[p] = tsd_digit_t'(xa[p]);
      b_digits[p] = tsd_digit_t'(xb[p]);
    end
    if (err) begin
      a_digits[W_IN/3] = tsd_digit_t'(3);
      b_digits[W_IN/2] = tsd_digit_t'(-4);
    end
    r = model(xa, xb, err);
    if (!err) count_mechanisms(xa, xb, r);
    exp_q.push_back(r);
    issue_cycle_q.push_back(cycle);
    in_valid = 1'b1;
  endtask

  // Output checker, sampling half a cycle after each rising edge.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      expect_t r;
      int issued;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("ERROR output with nothing outstanding");
      end else begin
        r = exp_q.pop_front();
        issued = issue_cycle_q.pop_front();
        checks++;
        if (cycle - issued != 2) begin
          failures++;
          $display("ERROR latency %0d cycles, expected 2", cycle - issued);
        end else latency_ok++;
        checks++;
        if (out_code_err !== r.err) begin
          failures++;
          $display("ERROR out_code_err=%0b expected %0b", out_code_err, r.err);
        end
        if (r.err) code_errs++;
        else begin
          for (int unsigned e = 0; e < E; e++) begin
            int v;
            logic bad;
            v = 0;
            bad = 1'b0;
            for (int unsigned i = 0; i <= ND; i++) begin
              int q, d;
              q = int'(e*(ND+1)+i);
              case ({z2[q], z1[q], z0[q], zn1[q], zn2[q]})
                5'b10000: d = 2;
                5'b01000: d = 1;
                5'b00100: d = 0;
                5'b00010: d = -1;
                5'b00001: d = -2;
                default: begin d = 99; bad = 1'b1; end
              endcase
              checks++;
              if (d != r.digit[q]) begin
                failures++;
                $display("ERROR number %0d digit %0d: planes %b, expected digit %0d",
                         e, i, {z2[q], z1[q], z0[q], zn1[q], zn2[q]}, r.digit[q]);
              end
              v += d * pow3(i);
            end
            checks++;
            if (bad || v != r.value[e]) begin
              failures++;
              $display("ERROR number %0d: value %0d, expected %0d", e, v, r.value[e]);
            end
          end
        end
      end
    end
  end

  initial begin
    int xa [W_IN], xb [W_IN];
    foreach (grp_seen[g]) grp_seen[g] = 0;
    foreach (zval_seen[v]) zval_seen[v] = 0;
    rst_n = 1'b0; in_valid = 1'b1;
    a_digits = '0; b_digits = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin
      failures++; $display("ERROR out_valid high during reset");
    end
    resets++;
    rst_n = 1'b1; in_valid = 1'b0;
    @(posedge clk); #1;

    // ---- 1. the worked example ----------------------------------------------
    for (int j = 0; j < 10; j++)
      for (int k = 0; k < 2; k++) begin
        int va, vb;
        va = 0;
        vb = 0;
        for (int i = 0; i < 4; i++) begin
          xa[(j*N+k)*ND + i] = EX_A[j][k][3-i];   // table is MSB first
          xb[(j*N+k)*ND + i] = EX_B[j][k][3-i];
          va += EX_A[j][k][3-i] * pow3(i);
          vb += EX_B[j][k][3-i] * pow3(i);
        end
        if (va != EX_A_DEC[j][k] || vb != EX_B_DEC[j][k] ||
            va + vb != EX_Z_DEC[j][k])
          $display("NOTE example entry (%0d,%0d) inconsistent", j, k);
      end
    apply(xa, xb, 1'b0);
    // decimal results of the example, checked through the model's values
    for (int j = 0; j < 10; j++)
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (exp_q[0].value[j*N+k] != EX_Z_DEC[j][k]) begin
          failures++;
          $display("ERROR example (%0d,%0d) sum %0d, expected %0d", j, k,
                   exp_q[0].value[j*N+k], EX_Z_DEC[j][k]);
        end
      end
    @(posedge clk); #1;
    in_valid = 1'b0;
    idle_gaps++;
    repeat (4) @(posedge clk); #1;

    // ---- 2. random arrays, back to back and with gaps ---------------------
    for (int n = 0; n < 400; n++) begin
      for (int unsigned p = 0; p < W_IN; p++) begin
        xa[p] = tsd_tb_pkg::rand_digit();
        xb[p] = tsd_tb_pkg::rand_digit();
      end
      apply(xa, xb, (n % 50) == 25);
      @(posedge clk); #1;
      if ($urandom_range(3) == 0) begin
        in_valid = 1'b0;
        idle_gaps++;
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
      end else back_to_back++;
    end
    in_valid = 1'b0;
    repeat (4) @(posedge clk); #1;

    // ---- 3. reset in flight clears the pipeline ---------------------------
    for (int unsigned p = 0; p < W_IN; p++) begin
      xa[p] = tsd_tb_pkg::rand_digit();
      xb[p] = tsd_tb_pkg::rand_digit();
    end
    for (int unsigned p = 0; p < W_IN; p++) begin
      a_digits[p] = tsd_digit_t'(xa[p]);
      b_digits[p] = tsd_digit_t'(xb[p]);
    end
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0; rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    resets++;
    repeat (3) begin
      @(posedge clk); #1;
      checks++;
      if (out_valid !== 1'b0) begin
        failures++; $display("ERROR output after reset in flight");
      end
    end

    // ---- mechanism coverage -----------------------------------------------
    foreach (grp_seen[g]) begin
      checks++;
      if (grp_seen[g] == 0) begin
        failures++; $display("ERROR step-1 group with digit sum %0d never applied", 4 - g);
      end
    end
    foreach (zval_seen[v]) begin
      checks++;
      if (zval_seen[v] == 0) begin
        failures++; $display("ERROR result digit %0d never produced", v - 2);
      end
    end
    checks++;
    if (msb_carry == 0 || inner_carry == 0 || back_to_back == 0 || idle_gaps == 0 ||
        code_errs == 0 || resets < 2 || latency_ok == 0 || exp_q.size() != 0) begin
      failures++;
      $display("ERROR mechanism not exercised or results missing");
    end
    $display("mechanisms: msb_carry=%0d inner_carry=%0d back_to_back=%0d idle_gaps=%0d code_err=%0d resets=%0d outputs=%0d",
             msb_carry, inner_carry, back_to_back, idle_gaps, code_errs, resets, latency_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
