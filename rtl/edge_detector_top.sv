// edge_detector_top: noise-immune gradient edge detector for a raster
// stream of 8-bit grey pixels, one pixel in and one edge-map pixel out per
// clock cycle.
//
// Three processing units, each fed by a line buffer built from scalable
// FIFOs, form one pipeline:
//   FIFO0 (5 rows)  -> smoothing_unit      5x5 systolic Gaussian filter
//   FIFO1 (5 rows)  -> edge_strength_unit  ADM strength and direction
//   FIFO2 (3 rows)  -> edge_localisation_unit  thinning and threshold
// FIFO0 hands the smoother one column of five vertically adjacent pixels
// per cycle; FIFO1 hands the strength unit a full 5x5 window of smoothed
// pixels; FIFO2 carries the 8-bit strength together with its 3-bit
// direction and hands the localisation unit a 3x3 window of strengths plus
// the centre's direction.
//
// Interface:
//   pxl_in     grey pixel, raster order, one per cycle, no gaps
//   scl_sel    image width: 0..4 = 32, 64, 128, 256, 512 pixels
//   threshold  edge strength an edge pixel must exceed
//   final_sel  0: edge pixels output as 255; 1: as their edge strength
//   edge_out   edge map pixel, 0 for non-edge pixels
//   dir_out    edge direction of an edge pixel (edge_pkg DIR_*), else 0
//   smt_out, str_out, str_dir_out  smoothed pixel, edge strength and
//              direction entering FIFO1 / FIFO2, for observation
// Timing: the edge-map value of input pixel n appears total_latency(W)
// cycles after it entered (2583 for W = 512). There is no frame or valid
// signalling: windows at the image borders wrap into the neighbouring row,
// and the first outputs after reset or after a width change are not
// meaningful. Synchronous active-high reset.
// The pipeline, the line buffer sizes, the stage latencies and the run-time
// width selection follow the published architecture; the observation ports
// mirror the signals traced in its timing simulation.
module edge_detector_top
  import edge_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  pixel_t    pxl_in,
  input  size_sel_t scl_sel,
  input  pixel_t    threshold,
  input  logic      final_sel,
  output pixel_t    edge_out,
  output dir_t      dir_out,
  output pixel_t    smt_out,
  output pixel_t    str_out,
  output dir_t      str_dir_out
);

  // FIFO0 and smoothing unit.
  pixel_t win0 [5][5];
  pixel_t col0 [5];

  window_fifo #(.DW(PIX_W), .N(5)) u_fifo0 (
    .clk    (clk),
    .rst    (rst),
    .scl_sel(scl_sel),
    .pxl_in (pxl_in),
    .win    (win0)
  );

  for (genvar r = 0; r < 5; r++) begin : g_col0
    assign col0[r] = win0[r][0];
  end

  pixel_t smt;

  smoothing_unit u_smooth (
    .clk(clk),
    .rst(rst),
    .col(col0),
    .smt(smt)
  );

  // FIFO1 and edge strength unit.
  pixel_t win1 [5][5];

  window_fifo #(.DW(PIX_W), .N(5)) u_fifo1 (
    .clk    (clk),
    .rst    (rst),
    .scl_sel(scl_sel),
    .pxl_in (smt),
    .win    (win1)
  );

  pixel_t strength;
  dir_t   dir;

  edge_strength_unit u_strength (
    .clk     (clk),
    .rst     (rst),
    .win     (win1),
    .strength(strength),
    .dir     (dir)
  );

  // FIFO2 (strength and direction together) and localisation unit.
  localparam int unsigned W2 = DIR_W + PIX_W;
  logic [W2-1:0] win2 [3][3];
  pixel_t        p    [1:9];

  window_fifo #(.DW(W2), .N(3)) u_fifo2 (
    .clk    (clk),
    .rst    (rst),
    .scl_sel(scl_sel),
    .pxl_in ({dir, strength}),
    .win    (win2)
  );

  // p[1] is the top-left (oldest) pixel, p[9] the bottom-right (newest).
  for (genvar i = 0; i < 3; i++) begin : g_pi
    for (genvar j = 0; j < 3; j++) begin : g_pj
      assign p[3*i + j + 1] = win2[2-i][2-j][PIX_W-1:0];
    end
  end

  edge_localisation_unit u_local (
    .clk      (clk),
    .rst      (rst),
    .p        (p),
    .d5       (win2[1][1][W2-1:PIX_W]),
    .threshold(threshold),
    .final_sel(final_sel),
    .edge_out (edge_out),
    .dir_out  (dir_out)
  );

  assign smt_out     = smt;
  assign str_out     = strength;
  assign str_dir_out = dir;

endmodule
