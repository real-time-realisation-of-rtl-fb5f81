// tb_scalable_fifo: runs the 5-tap scalable row delay at each of the five
// widths in turn (32 .. 512) without reset in between, with random pixels,
// and checks that pxl_out is the input exactly W cycles back and that
// tap i is the input i+1 cycles back. After a width change the first W
// outputs are skipped. Also checks that reset clears the taps and that
// the 3-tap version used for the 3x3 window delays by W as well.
module tb_scalable_fifo;
  import edge_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  size_sel_t  sel;
  logic [7:0] din, dout, dout3;
  logic [7:0] taps [5];
  logic [7:0] taps3 [3];

  scalable_fifo #(.DW(8), .TAPS(5)) dut (
    .clk(clk), .rst(rst), .scl_sel(sel), .pxl_in(din), .taps(taps), .pxl_out(dout));
  scalable_fifo #(.DW(8), .TAPS(3)) dut3 (
    .clk(clk), .rst(rst), .scl_sel(sel), .pxl_in(din), .taps(taps3), .pxl_out(dout3));

  localparam int MAXT = 8000;
  logic [7:0] hist [MAXT];
  int t;

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s t=%0d sel=%0d got %h exp %h", what, t, sel, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    din = 8'hA5;
    sel = SIZE_32;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 5; i++) check(taps[i], 8'h00, "reset tap");
    rst = 1'b0;
    t = 0;
    for (int s = 0; s < 5; s++) begin
      int w, t0;
      sel = size_sel_t'(s);
      w   = 32 << s;
      t0  = t;
      for (int n = 0; n < w + 300; n++) begin
        @(negedge clk);
        // outputs during cycle t reflect inputs up to t-1
        if (t - t0 >= w) begin
          check(dout,  hist[t-w], "pxl_out");
          check(dout3, hist[t-w], "pxl_out 3-tap");
        end
        if (t - t0 >= 5) begin
          for (int i = 0; i < 5; i++) check(taps[i], hist[t-1-i], "tap");
          for (int i = 0; i < 3; i++) check(taps3[i], hist[t-1-i], "tap3");
        end
        din = 8'($urandom);
        hist[t] = din;
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
