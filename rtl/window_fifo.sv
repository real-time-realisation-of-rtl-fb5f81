// window_fifo: line buffer that presents an N x N neighbourhood of a raster
// pixel stream (FIFO0 and FIFO1 with N = 5, FIFO2 with N = 3).
//
// N-1 scalable row delays are chained; each begins with N flip-flops whose
// outputs are window taps, and a final chain of N flip-flops gives the
// newest row. The storage is (N-1) rows plus N registers, i.e. 512x4+5 for
// N = 5 and 512x2+3 for N = 3 at the largest width.
//
// Interface: one pixel enters per cycle. With W = width_of(scl_sel),
//   win[k][j](t) = pxl_in(t - 1 - k*W - j),   k, j = 0 .. N-1
// so row k = 0 is the newest image row and column j = 0 the newest column;
// the window centre win[N/2][N/2] lags the input by (N/2)*W + N/2 + 1
// cycles (2W+3 for N = 5, W+2 for N = 3). Samples are taken from a flat
// stream, so at the left and right image borders the window wraps into
// the neighbouring row; no border handling is described for the design and
// none is added. Registers reset to 0, the RAM contents do not.
// The shift-register organisation and its size follow the published design;
// the tap indexing is this design's choice.
module window_fifo
  import edge_pkg::*;
#(
  parameter int unsigned DW = PIX_W,
  parameter int unsigned N  = 5
) (
  input  logic          clk,
  input  logic          rst,
  input  size_sel_t     scl_sel,
  input  logic [DW-1:0] pxl_in,
  output logic [DW-1:0] win [N][N]
);

  logic [DW-1:0] row_in [N];

  assign row_in[0] = pxl_in;

  for (genvar k = 0; k < N - 1; k++) begin : g_row
    logic [DW-1:0] taps [N];
    scalable_fifo #(.DW(DW), .TAPS(N)) u_line (
      .clk    (clk),
      .rst    (rst),
      .scl_sel(scl_sel),
      .pxl_in (row_in[k]),
      .taps   (taps),
      .pxl_out(row_in[k+1])
    );
    assign win[k] = taps;
  end

  // Oldest row: only the N window registers are needed.
  logic [DW-1:0] last [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < N; j++) last[j] <= '0;
    end else begin
      last[0] <= row_in[N-1];
      for (int j = 1; j < N; j++) last[j] <= last[j-1];
    end
  end

  assign win[N-1] = last;

endmodule
