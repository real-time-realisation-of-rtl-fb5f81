// tb_smoothing_unit: feeds pixel columns to the systolic smoothing unit and
// compares each output with the 5x5 weighted sum computed here from the
// mask weights (2^-2 ... 2^0+2^-3, times 2^3) and the normalisation
// 2^-4 + 2^-7, i.e. (sum * 9) >> 10, taken over the columns that entered
// 10 .. 14 cycles earlier (10-cycle latency). Stimulus: a flat white
// field (expected 235), single bright pixels at each array position and
// random columns.
module tb_smoothing_unit;
  import edge_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  pixel_t col [5];
  pixel_t smt;

  smoothing_unit dut (.clk(clk), .rst(rst), .col(col), .smt(smt));

  localparam int MAXT = 2000;
  int hist [MAXT][5];

  // Mask weight times 8, from the distance to the centre.
  function automatic int weight(input int r, input int c);
    int dr = (r > 2) ? r - 2 : 2 - r;
    int dc = (c > 2) ? c - 2 : 2 - c;
    if (dr == 2 && dc == 2) return 2;
    if (dr + dc == 3)       return 3;
    if (dr + dc == 2 && (dr == 2 || dc == 2)) return 4;
    if (dr == 0 && dc == 0) return 9;
    return 6;
  endfunction

  function automatic int expected(input int t);
    int s = 0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++)
        s += weight(r, c) * hist[t-10-c][r];
    return (s * 9) >> 10;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int white_seen = 0;
    rst = 1'b1;
    for (int r = 0; r < 5; r++) col[r] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < MAXT; t++) begin
      @(negedge clk);
      if (t >= 15) begin
        checks++;
        if (int'(smt) != expected(t)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %0d exp %0d", t, smt, expected(t));
        end
        if (t >= 80 && t < 100) begin
          checks++;
          if (smt != 8'd235) failures++;
          white_seen++;
        end
      end
      // 0..59 impulses, 60..109 white, then random
      for (int r = 0; r < 5; r++) begin
        if (t < 60)       col[r] = (t % 12 == 0 && r == (t / 12)) ? 8'd255 : 8'd0;
        else if (t < 110) col[r] = 8'd255;
        else              col[r] = 8'($urandom);
        hist[t][r] = int'(col[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
