// tb_ddp_and: checks the pixel-wise AND plane gate with random planes and the
// four single-pixel cases (1x1, 1x0, 0x1, 0x0), bit by bit.
module tb_ddp_and;
  localparam int unsigned W = 80;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  ddp_and #(.W(W)) dut (.a(a), .b(b), .y(y));

  task automatic check_all();
    for (int unsigned p = 0; p < W; p++) begin
      checks++;
      if (y[p] != (a[p] && b[p])) begin
        failures++;
        $display("ERROR pixel %0d: a=%0b b=%0b y=%0b", p, a[p], b[p], y[p]);
      end
    end
  endtask

  initial begin
    for (int c = 0; c < 4; c++) begin
      a = {W{c[1]}}; b = {W{c[0]}};
      #1 check_all();
    end
    for (int n = 0; n < 50; n++) begin
      for (int unsigned p = 0; p < W; p++) begin
        a[p] = 1'($urandom_range(1));
        b[p] = 1'($urandom_range(1));
      end
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
