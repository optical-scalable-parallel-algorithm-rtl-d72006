// tsd_size_check: drives one tsd_ddp_array_adder of the given size with 100
// random operand pairs, one per cycle, and checks every result number against
// the integer sum of its operands and the 2-cycle latency. Sets `done` when
// all results are in; `checks` and `failures` count the comparisons.
module tsd_size_check #(
  parameter int unsigned M  = 1,
  parameter int unsigned N  = 1,
  parameter int unsigned ND = 1
) (
  input logic clk
);
  import tsd_pkg::*;
  localparam int unsigned E = M * N;
  localparam int unsigned W_IN = E * ND, W_OUT = E * (ND + 1);
  localparam int NVEC = 100;

  logic rst_n, in_valid, out_valid, out_code_err;
  tsd_digit_t [W_IN-1:0] a_digits, b_digits;
  logic [W_OUT-1:0] z2, z1, z0, zn1, zn2;
  int checks = 0, failures = 0, cycle = 0, received = 0;
  logic done = 1'b0;
  longint exp_q [$];        // expected values, E per vector
  int issue_q [$];

  tsd_ddp_array_adder #(.M(M), .N(N), .ND(ND)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .a_digits(a_digits), .b_digits(b_digits),
    .out_valid(out_valid), .out_code_err(out_code_err),
    .z2(z2), .z1(z1), .z0(z0), .zn1(zn1), .zn2(zn2));

  always @(posedge clk) cycle++;

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; a_digits = '0; b_digits = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NVEC; n++) begin
      for (int unsigned e = 0; e < E; e++) begin
        longint va, vb, w;
        va = 0; vb = 0; w = 1;
        for (int unsigned i = 0; i < ND; i++) begin
          int da, db;
          da = tsd_tb_pkg::rand_digit();
          db = tsd_tb_pkg::rand_digit();
          a_digits[e*ND + i] = tsd_digit_t'(da);
          b_digits[e*ND + i] = tsd_digit_t'(db);
          va += da * w; vb += db * w; w *= 3;
        end
        exp_q.push_back(va + vb);
      end
      issue_q.push_back(cycle);
      in_valid = 1'b1;
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int issued;
      issued = issue_q.pop_front();
      checks++;
      if (cycle - issued != 2 || out_code_err) begin
        failures++;
        $display("ERROR size %0dx%0dx%0d: latency %0d, code_err %0b",
                 M, N, ND, cycle - issued, out_code_err);
      end
      for (int unsigned e = 0; e < E; e++) begin
        longint v, w, expv;
        v = 0; w = 1;
        for (int unsigned i = 0; i <= ND; i++) begin
          int q;
          q = int'(e*(ND+1) + i);
          v += w * (2*longint'(z2[q]) + longint'(z1[q]) - longint'(zn1[q])
                    - 2*longint'(zn2[q]));
          w *= 3;
        end
        expv = exp_q.pop_front();
        checks++;
        if (v != expv) begin
          failures++;
          $display("ERROR size %0dx%0dx%0d number %0d: %0d, expected %0d",
                   M, N, ND, e, v, expv);
        end
      end
      received++;
      if (received == NVEC) done = 1'b1;
    end
  end
endmodule
