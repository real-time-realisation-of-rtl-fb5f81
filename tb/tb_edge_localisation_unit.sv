// tb_edge_localisation_unit: random 3x3 strength neighbourhoods,
// directions, thresholds and Final settings, plus hand-made ridges and
// plateaus. Expected output (1 cycle later): the centre is an edge when it
// exceeds the threshold, exceeds the neighbour on the p9 side and is not
// below the neighbour on the p1 side of the pair lying across the edge;
// an edge outputs 255 (Final = 0) or its strength (Final = 1) and its
// direction, anything else outputs 0 / 0.
module tb_edge_localisation_unit;
  import edge_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  pixel_t p [1:9];
  dir_t   d5;
  pixel_t thr;
  logic   fin;
  pixel_t edge_out;
  dir_t   dir_out;

  edge_localisation_unit dut (
    .clk(clk), .rst(rst), .p(p), .d5(d5), .threshold(thr), .final_sel(fin),
    .edge_out(edge_out), .dir_out(dir_out));

  int exp_e, exp_d;
  int n_edge = 0, n_supp = 0, n_thr = 0;

  task automatic reference();
    int a, b, c;
    c = int'(p[5]);
    case (d5)
      3'd1:    begin a = int'(p[1]); b = int'(p[9]); end
      3'd2:    begin a = int'(p[4]); b = int'(p[6]); end
      3'd3:    begin a = int'(p[3]); b = int'(p[7]); end
      default: begin a = int'(p[2]); b = int'(p[8]); end
    endcase
    if (c > int'(thr) && c > b && c >= a) begin
      exp_e = fin ? c : 255;
      exp_d = int'(d5);
      n_edge++;
    end else begin
      exp_e = 0;
      exp_d = 0;
      if (c <= int'(thr)) n_thr++;
      else n_supp++;
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    for (int i = 1; i <= 9; i++) p[i] = '0;
    d5 = 3'd1; thr = '0; fin = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      // drive, compute the reference, check after the clock edge
      for (int i = 1; i <= 9; i++) p[i] = pixel_t'($urandom);
      d5  = dir_t'($urandom_range(1, 4));
      thr = pixel_t'($urandom_range(0, 160));
      fin = 1'($urandom);
      if (t % 5 == 0) begin
        // plateau across the edge: equal neighbours on both sides
        p[1] = p[5]; p[9] = p[5]; p[4] = p[5]; p[6] = p[5];
        p[3] = p[5]; p[7] = p[5]; p[2] = p[5]; p[8] = p[5];
      end
      reference();
      @(negedge clk);
      checks += 2;
      if (int'(edge_out) != exp_e || int'(dir_out) != exp_d) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %0d/%0d exp %0d/%0d", t, edge_out, dir_out, exp_e, exp_d);
      end
    end
    checks++;
    if (n_edge == 0 || n_supp == 0 || n_thr == 0) failures++;
    $display("edges %0d suppressed %0d below threshold %0d", n_edge, n_supp, n_thr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
