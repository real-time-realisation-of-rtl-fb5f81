// tb_window_fifo: streams random pixels through a 5x5 line buffer and an
// 11-bit 3x3 line buffer at widths 32 and 64 and checks every window tap:
// win[k][j](t) must equal the input 1 + k*W + j cycles back.
module tb_window_fifo;
  import edge_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  size_sel_t   sel;
  logic [7:0]  din;
  logic [10:0] din3;
  logic [7:0]  win5 [5][5];
  logic [10:0] win3 [3][3];

  window_fifo #(.DW(8),  .N(5)) dut5 (.clk(clk), .rst(rst), .scl_sel(sel), .pxl_in(din),  .win(win5));
  window_fifo #(.DW(11), .N(3)) dut3 (.clk(clk), .rst(rst), .scl_sel(sel), .pxl_in(din3), .win(win3));

  localparam int MAXT = 4000;
  logic [7:0]  hist  [MAXT];
  logic [10:0] hist3 [MAXT];
  int t;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst  = 1'b1;
    din  = '0;
    din3 = '0;
    sel  = SIZE_32;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    t = 0;
    for (int s = 0; s < 2; s++) begin
      int w, t0;
      sel = size_sel_t'(s);
      w   = 32 << s;
      t0  = t;
      for (int n = 0; n < 4 * w + 200; n++) begin
        @(negedge clk);
        if (t - t0 >= 4 * w + 5) begin
          for (int k = 0; k < 5; k++)
            for (int j = 0; j < 5; j++) begin
              checks++;
              if (win5[k][j] !== hist[t-1-k*w-j]) begin
                failures++;
                if (failures < 10) $display("FAIL 5x5 t=%0d k=%0d j=%0d got %h exp %h",
                                            t, k, j, win5[k][j], hist[t-1-k*w-j]);
              end
            end
          for (int k = 0; k < 3; k++)
            for (int j = 0; j < 3; j++) begin
              checks++;
              if (win3[k][j] !== hist3[t-1-k*w-j]) begin
                failures++;
                if (failures < 10) $display("FAIL 3x3 t=%0d k=%0d j=%0d", t, k, j);
              end
            end
        end
        din  = 8'($urandom);
        din3 = 11'($urandom);
        hist[t]  = din;
        hist3[t] = din3;
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
