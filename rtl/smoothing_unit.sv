// smoothing_unit: 5x5 Gaussian smoothing filter built as a systolic array
// of shift-and-add processing elements.
//
// Each cycle the line buffer delivers one column of five vertically
// adjacent pixels, col[r], r = 0..4. A delay unit holds row r back by r
// cycles, so the partial sum moving down a column of the array meets each
// row's pixel exactly when it arrives. Pixels move right one element per
// cycle, partial sums move down one element per cycle, and after five rows
// each array column carries the weighted sum of one image column of the
// window; column c of the array holds the image column c cycles older than
// column 0. A five-stage tail adds the five column sums (two stages of
// pairwise addition, one final addition), multiplies by 9 as sum*8 + sum
// (one stage) and drops 10 bits (one stage), which applies the
// normalisation factor 2^-4 + 2^-7 to the mask weights stored times 2^3
// (see edge_pkg). The mask is symmetric, so the mirror ordering of columns
// does not matter.
//
// Timing: one result per cycle, latency 10 cycles:
//   smt(t) = ( sum_{r,c} MASK_COEF[r][c] * col[r](t-10-c) * 9 ) >> 10
// i.e. the window whose newest column entered 10 cycles ago; its centre
// pixel entered 12 cycles ago.
// The array, the delay unit, the four processing-element variants, the mask
// and the 10-cycle latency follow the published design; the split of the
// tail into five stages and truncation (rather than rounding) in the final
// shift are this design's choices.
module smoothing_unit
  import edge_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  pixel_t col [5],
  output pixel_t smt
);

  localparam int unsigned SW = 13;  // column sum: 255 * 29 < 2^13
  localparam int unsigned TW = 15;  // window sum: 255 * 105 < 2^15
  localparam int unsigned MW = 19;  // window sum * 9

  // Delay unit: row r is delayed by r cycles.
  pixel_t row_in [5];
  assign row_in[0] = col[0];

  for (genvar r = 1; r < 5; r++) begin : g_dly
    pixel_t d [r];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < r; i++) d[i] <= '0;
      end else begin
        d[0] <= col[r];
        for (int i = 1; i < r; i++) d[i] <= d[i-1];
      end
    end
    assign row_in[r] = d[r-1];
  end

  // Systolic array.
  pixel_t          f_link [5][6];   // f_link[r][c] = pixel entering PE(r,c)
  logic [SW-1:0]   s_link [6][5];   // s_link[r][c] = partial sum entering PE(r,c)

  for (genvar r = 0; r < 5; r++) begin : g_r
    assign f_link[r][0] = row_in[r];
    for (genvar c = 0; c < 5; c++) begin : g_c
      if (r == 0) begin : g_top
        assign s_link[0][c] = '0;
      end
      smooth_pe #(
        .PW      (PIX_W),
        .SW      (SW),
        .COEF    (int'(MASK_COEF[r][c])),
        .HAS_PRE (r != 0),
        .HAS_FOUT(c != 4)
      ) u_pe (
        .clk    (clk),
        .rst    (rst),
        .f_in   (f_link[r][c]),
        .pre_sum(s_link[r][c]),
        .sum_out(s_link[r+1][c]),
        .f_out  (f_link[r][c+1])
      );
    end
  end

  // Final adder and normaliser.
  logic [TW-1:0] a01, a23, a4, b0123, b4, tot;
  logic [MW-1:0] scaled;

  always_ff @(posedge clk) begin
    if (rst) begin
      a01    <= '0;
      a23    <= '0;
      a4     <= '0;
      b0123  <= '0;
      b4     <= '0;
      tot    <= '0;
      scaled <= '0;
      smt    <= '0;
    end else begin
      a01    <= TW'(s_link[5][0]) + TW'(s_link[5][1]);
      a23    <= TW'(s_link[5][2]) + TW'(s_link[5][3]);
      a4     <= TW'(s_link[5][4]);
      b0123  <= a01 + a23;
      b4     <= a4;
      tot    <= b0123 + b4;
      scaled <= (MW'(tot) << 3) + MW'(tot);
      smt    <= PIX_W'(scaled >> NORM_SHIFT);
    end
  end

endmodule
