// tb_ddp_cmp: checks the pixel-wise complement with all-0, all-1 and random
// planes, bit by bit.
module tb_ddp_cmp;
  localparam int unsigned W = 80;
  logic [W-1:0] a, y;
  int checks = 0, failures = 0;

  ddp_cmp #(.W(W)) dut (.a(a), .y(y));

  task automatic check_all();
    for (int unsigned p = 0; p < W; p++) begin
      checks++;
      if (y[p] == a[p]) begin
        failures++;
        $display("ERROR pixel %0d: a=%0b y=%0b", p, a[p], y[p]);
      end
    end
  endtask

  initial begin
    a = '0; #1 check_all();
    a = '1; #1 check_all();
    for (int n = 0; n < 50; n++) begin
      for (int unsigned p = 0; p < W; p++) a[p] = 1'($urandom_range(1));
      #1 check_all();
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
