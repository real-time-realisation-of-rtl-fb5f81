// tb_smooth_pe: drives the four processing-element variants (upper,
// upper-right, general, right) with random pixels and partial sums and
// checks the one-cycle pipeline: sum_out(t+1) = pre_sum(t) + w*f_in(t)
// (pre_sum ignored in the top-row variants) and f_out(t+1) = f_in(t),
// and that both outputs hold their values until the next clock edge.
module tb_smooth_pe;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [7:0]  f;
  logic [12:0] pre;
  logic [12:0] s_up, s_ur, s_gen, s_rt;
  logic [7:0]  f_up, f_ur, f_gen, f_rt;

  smooth_pe #(.SW(13), .COEF(3), .HAS_PRE(1'b0), .HAS_FOUT(1'b1)) u_up
    (.clk(clk), .rst(rst), .f_in(f), .pre_sum(pre), .sum_out(s_up), .f_out(f_up));
  smooth_pe #(.SW(13), .COEF(2), .HAS_PRE(1'b0), .HAS_FOUT(1'b0)) u_ur
    (.clk(clk), .rst(rst), .f_in(f), .pre_sum(pre), .sum_out(s_ur), .f_out(f_ur));
  smooth_pe #(.SW(13), .COEF(9), .HAS_PRE(1'b1), .HAS_FOUT(1'b1)) u_gen
    (.clk(clk), .rst(rst), .f_in(f), .pre_sum(pre), .sum_out(s_gen), .f_out(f_gen));
  smooth_pe #(.SW(13), .COEF(6), .HAS_PRE(1'b1), .HAS_FOUT(1'b0)) u_rt
    (.clk(clk), .rst(rst), .f_in(f), .pre_sum(pre), .sum_out(s_rt), .f_out(f_rt));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pf, pp;
    rst = 1'b1;
    f   = 8'hFF;
    pre = 13'h1FF;
    repeat (2) @(negedge clk);
    check(int'(s_gen), 0, "reset sum");
    check(int'(f_gen), 0, "reset f");
    rst = 1'b0;
    f   = 8'($urandom);
    pre = 13'($urandom_range(0, 5000));
    for (int n = 0; n < 500; n++) begin
      pf = int'(f);
      pp = int'(pre);
      @(negedge clk);
      check(int'(s_up),  3 * pf,      "upper sum");
      check(int'(f_up),  pf,          "upper f");
      check(int'(s_ur),  2 * pf,      "upper-right sum");
      check(int'(s_gen), pp + 9 * pf, "general sum");
      check(int'(f_gen), pf,          "general f");
      check(int'(s_rt),  pp + 6 * pf, "right sum");
      f   = 8'($urandom);
      pre = 13'($urandom_range(0, 5000));
      // the registered outputs must not follow the new inputs before the edge
      #1;
      check(int'(f_gen), pf,          "general f held");
      check(int'(s_gen), pp + 9 * pf, "general sum held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
