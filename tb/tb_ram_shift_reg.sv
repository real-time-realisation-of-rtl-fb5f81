// tb_ram_shift_reg: checks that the RAM-based delay line returns every
// input exactly DEPTH cycles later, for the deepest segment (256) and for
// the shortest one of a 5-tap scalable FIFO (27), with random data.
// Pass criterion: every compared output equals the input DEPTH cycles back.
module tb_ram_shift_reg;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [7:0] in_a, out_a, in_b, out_b;

  ram_shift_reg #(.DEPTH(256), .DW(8)) dut_a (.clk(clk), .rst(rst), .d_in(in_a), .d_out(out_a));
  ram_shift_reg #(.DEPTH(27),  .DW(8)) dut_b (.clk(clk), .rst(rst), .d_in(in_b), .d_out(out_b));

  localparam int CYCLES = 1200;
  logic [7:0] hist_a [CYCLES];
  logic [7:0] hist_b [CYCLES];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst  = 1'b1;
    in_a = '0;
    in_b = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      if (t >= 256) begin
        checks++;
        if (out_a !== hist_a[t-256]) begin
          failures++;
          if (failures < 10) $display("FAIL depth 256 t=%0d got %h exp %h", t, out_a, hist_a[t-256]);
        end
      end
      if (t >= 27) begin
        checks++;
        if (out_b !== hist_b[t-27]) begin
          failures++;
          if (failures < 10) $display("FAIL depth 27 t=%0d got %h exp %h", t, out_b, hist_b[t-27]);
        end
      end
      in_a = 8'($urandom);
      in_b = 8'($urandom);
      hist_a[t] = in_a;
      hist_b[t] = in_b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
