// tb_coef_select: exhaustive check of the shift-and-add weighting for
// every weight of the smoothing mask (2, 3, 4, 6 and 9 in units of 2^-3)
// and all 256 pixel values, against ordinary multiplication.
module tb_coef_select;

  int checks = 0;
  int failures = 0;

  logic [7:0]  pix;
  logic [12:0] p2, p3, p4, p6, p9;

  coef_select #(.IW(8), .OW(13), .COEF(2)) u2 (.pix(pix), .prod(p2));
  coef_select #(.IW(8), .OW(13), .COEF(3)) u3 (.pix(pix), .prod(p3));
  coef_select #(.IW(8), .OW(13), .COEF(4)) u4 (.pix(pix), .prod(p4));
  coef_select #(.IW(8), .OW(13), .COEF(6)) u6 (.pix(pix), .prod(p6));
  coef_select #(.IW(8), .OW(13), .COEF(9)) u9 (.pix(pix), .prod(p9));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s pix=%0d got %0d exp %0d", what, pix, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      pix = 8'(v);
      #1;
      check(int'(p2), 2 * v, "x2");
      check(int'(p3), 3 * v, "x3");
      check(int'(p4), 4 * v, "x4");
      check(int'(p6), 6 * v, "x6");
      check(int'(p9), 9 * v, "x9");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
