// tb_edge_strength_unit: random and step-edge 5x5 windows through the ADM
// unit; expected strength is half the largest of the four two-pixel-pair
// absolute differences and expected direction the one with the smallest
// difference (lowest code on ties), both 4 cycles after the window.
module tb_edge_strength_unit;
  import edge_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  pixel_t win [5][5];
  pixel_t strength;
  dir_t   dir;

  edge_strength_unit dut (.clk(clk), .rst(rst), .win(win), .strength(strength), .dir(dir));

  localparam int MAXT = 3000;
  int hs [MAXT];
  int hd [MAXT];
  int dir_count [5];

  // Pixel at image offset (dy, dx) from the centre (dy down, dx right).
  function automatic int at(input int dy, input int dx);
    return int'(win[2-dy][2-dx]);
  endfunction

  function automatic int absd(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

  task automatic reference(input int t);
    int d [4];
    int mx, mn, md;
    d[0] = absd(at(1, -1) + at(2, -2), at(-1, 1) + at(-2, 2));   // along /
    d[1] = absd(at(-1, 0) + at(-2, 0), at(1, 0) + at(2, 0));     // along |
    d[2] = absd(at(-1, -1) + at(-2, -2), at(1, 1) + at(2, 2));   // along \
    d[3] = absd(at(0, -1) + at(0, -2), at(0, 1) + at(0, 2));     // along -
    mx = d[0]; mn = d[0]; md = 1;
    for (int i = 1; i < 4; i++) begin
      if (d[i] > mx) mx = d[i];
      if (d[i] < mn) begin mn = d[i]; md = i + 1; end
    end
    hs[t] = mx / 2;
    hd[t] = md;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    for (int k = 0; k < 5; k++) for (int j = 0; j < 5; j++) win[k][j] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < MAXT; t++) begin
      @(negedge clk);
      if (t >= 4) begin
        checks += 2;
        if (int'(strength) != hs[t-4] || int'(dir) != hd[t-4]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %0d/%0d exp %0d/%0d",
                                      t, strength, dir, hs[t-4], hd[t-4]);
        end
        dir_count[dir]++;
      end
      // Step edges at four orientations for t < 400, random afterwards.
      for (int k = 0; k < 5; k++)
        for (int j = 0; j < 5; j++) begin
          int dy = 2 - k, dx = 2 - j, v;
          case ((t / 4) % 4)
            0: v = (dx > 0) ? 200 : 30;            // vertical edge
            1: v = (dy > 0) ? 200 : 30;            // horizontal edge
            2: v = (dx + dy > 0) ? 220 : 10;       // edge along /
            default: v = (dx - dy > 0) ? 220 : 10; // edge along \
          endcase
          if (t >= 400) v = int'($urandom_range(0, 255));
          else v = v + int'($urandom_range(0, 6));
          win[k][j] = pixel_t'(v);
        end
      reference(t);
    end
    for (int i = 1; i <= 4; i++) begin
      checks++;
      if (dir_count[i] == 0) begin
        failures++;
        $display("FAIL direction %0d never produced", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
