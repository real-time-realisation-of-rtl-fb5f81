// edge_localisation_unit: thins the edge-strength map to one-pixel-wide
// edges and applies the threshold.
//
// Inputs are the edge strengths of a 3x3 neighbourhood, numbered row by row
// from the top left (p[1] .. p[9], p[5] the centre), and the edge direction
// d5 of the centre pixel. Two 4-to-1 multiplexers controlled by d5 pick the
// pair of neighbours that lie across the edge, i.e. perpendicular to the
// direction in which the edge runs:
//   DIR_DIAG  (/) -> p[1], p[9]      DIR_VERT (|) -> p[4], p[6]
//   DIR_ADIAG (\) -> p[3], p[7]      DIR_HORZ (-) -> p[2], p[8]
// Three 8-bit comparators then test p5 > threshold, p5 > (p9 group) and
// (p1 group) > p5; the centre is an edge pixel when the first two hold and
// the third does not, so on a plateau of equal strengths exactly one pixel
// survives. An edge pixel is output as 255 when final_sel = 0 (binary edge
// map) or as its own strength when final_sel = 1; other pixels output 0.
// The direction output is d5 for an edge pixel and 0 otherwise.
//
// Timing: one pixel per cycle; edge and direction are registered, latency
// 1 cycle. Reset clears both outputs.
// The multiplexer-before-comparator structure, the three comparators, the
// threshold, the Final selection and the output registers follow the
// published unit; the pairing of direction codes with neighbour pairs, the
// strict/non-strict comparison split and the 0 direction code for non-edge
// pixels are this design's choices.
module edge_localisation_unit
  import edge_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  pixel_t p [1:9],
  input  dir_t   d5,
  input  pixel_t threshold,
  input  logic   final_sel,
  output pixel_t edge_out,
  output dir_t   dir_out
);

  pixel_t nb_a, nb_b;   // nb_a from the p1/p4/p3/p2 mux, nb_b from the p9/p6/p7/p8 mux
  logic   above_thr, gt_b, a_gt, is_edge;

  always_comb begin
    case (d5)
      DIR_DIAG:  begin nb_a = p[1]; nb_b = p[9]; end
      DIR_VERT:  begin nb_a = p[4]; nb_b = p[6]; end
      DIR_ADIAG: begin nb_a = p[3]; nb_b = p[7]; end
      default:   begin nb_a = p[2]; nb_b = p[8]; end
    endcase
    above_thr = p[5] > threshold;
    gt_b      = p[5] > nb_b;
    a_gt      = nb_a > p[5];
    is_edge   = above_thr && gt_b && !a_gt;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      edge_out <= '0;
      dir_out  <= DIR_NONE;
    end else begin
      edge_out <= !is_edge ? '0 : (final_sel ? p[5] : '1);
      dir_out  <= is_edge ? d5 : DIR_NONE;
    end
  end

  // A pixel reported with a direction is an edge pixel, whose output is
  // never 0 (its strength exceeds the threshold, so it is at least 1).
  assert property (@(posedge clk) disable iff (rst)
                   (dir_out != DIR_NONE) |-> (edge_out != '0))
    else $error("edge_localisation_unit: edge value and direction disagree");

endmodule
