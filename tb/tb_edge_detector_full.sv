// tb_edge_detector_full: one complete 512 x 512 image through the edge
// detector at its full width (scl_sel = 512 pixels, every parameter at its
// default), checked pixel by pixel against the software model in
// tb_edge_ref_pkg: smoothed value, edge strength and direction, and the
// edge map in binary mode. Each edge-map pixel is taken from the output
// exactly 2583 cycles after the pixel entered, which checks the latency.
module tb_edge_detector_full;
  import edge_pkg::*;
  import tb_edge_ref_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  pixel_t    pxl_in, threshold, edge_out, smt_out, str_out;
  size_sel_t scl_sel;
  logic      final_sel;
  dir_t      dir_out, str_dir_out;

  edge_detector_top dut (
    .clk(clk), .rst(rst), .pxl_in(pxl_in), .scl_sel(scl_sel),
    .threshold(threshold), .final_sel(final_sel),
    .edge_out(edge_out), .dir_out(dir_out),
    .smt_out(smt_out), .str_out(str_out), .str_dir_out(str_dir_out));

  // mechanism counters
  int n_switch = 0, n_binary = 0, n_grey = 0, n_supp = 0, n_thr = 0;
  int n_dir [5];
  int prev_w = 0;

  task automatic cmp(input int got, input int exp, input string what, input int n);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s n=%0d got %0d exp %0d", what, n, got, exp);
    end
  endtask

  function automatic int image(input int x, input int y, input int w);
    int v = 40;
    if (x >= w / 8 && x < 3 * w / 8 && y >= w / 8 && y < w / 2) v = 190;
    if (x + y > w) v += 50;
    if ((x - 3 * w / 4) * (x - 3 * w / 4) + (y - w / 4) * (y - w / 4) < w * w / 64) v = 230;
    v += int'($urandom_range(0, 10));
    return (v > 255) ? 255 : v;
  endfunction

  task automatic run_image(input size_sel_t sel, input int h, input bit fin, input int thr);
    int w   = 32 << sel;
    int lat = total_latency(w);
    int rows = h + (lat + 5 * w + 12) / w + 2;
    int len = rows * w;
    arr_t d, s, t, dr, e, ed, kind;
    d = new[len];
    for (int n = 0; n < len; n++) d[n] = image(n % w, n / w, w);
    smooth(d, w, s);
    strength(s, w, t, dr);
    localise(t, dr, w, thr, fin, e, ed, kind);
    if (prev_w != 0 && prev_w != w) n_switch++;
    prev_w = w;

    @(negedge clk);
    scl_sel   = sel;
    final_sel = fin;
    threshold = pixel_t'(thr);
    for (int i = 0; i < len; i++) begin
      int n;
      pxl_in = pixel_t'(d[i]);
      @(negedge clk);
      // i + 1 pixels have been clocked in
      n = i + 1 - (2 * w + 13);
      if (n >= 0 && n < h * w && s[n] >= 0) cmp(int'(smt_out), s[n], "smoothed", n);
      n = i + 1 - (4 * w + 20);
      if (n >= 0 && n < h * w && t[n] >= 0) begin
        cmp(int'(str_out), t[n], "strength", n);
        cmp(int'(str_dir_out), dr[n], "strength dir", n);
      end
      n = i + 1 - lat;
      if (n >= 0 && n < h * w && kind[n] != 0) begin
        cmp(int'(edge_out), e[n], "edge", n);
        cmp(int'(dir_out), ed[n], "edge dir", n);
        case (kind[n])
          1: if (fin) n_grey++; else n_binary++;
          2: n_supp++;
          3: n_thr++;
          default: ;
        endcase
        n_dir[dir_out]++;
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst       = 1'b1;
    pxl_in    = '0;
    scl_sel   = SIZE_32;
    final_sel = 1'b0;
    threshold = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    checks++;
    if (total_latency(512) != 2583) begin failures++; $display("FAIL latency formula"); end
    run_image(SIZE_512, 512, 1'b0, 6);
    $display("binary edges %0d suppressed %0d thr-rejected %0d", n_binary, n_supp, n_thr);
    checks++; if (n_binary == 0) begin failures++; $display("FAIL no edge found"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
