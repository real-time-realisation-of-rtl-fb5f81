// smooth_pe: one processing element of the 5x5 systolic smoothing array.
//
// The element weights the pixel passing through it (coef_select, shifts and
// adds only), adds the partial sum arriving from the element above, and
// registers the result for the element below. It also registers the pixel
// and hands it to the element on its right one cycle later. The pipeline
// cut sits after the adder, so both outputs are one cycle behind the inputs:
//   sum_out(t+1) = pre_sum(t) + COEF * f_in(t),   f_out(t+1) = f_in(t).
// Four variants are obtained with two parameters, matching the element's
// position in the array:
//   upper        HAS_PRE = 0, HAS_FOUT = 1  (top row, no sum from above)
//   upper-right  HAS_PRE = 0, HAS_FOUT = 0  (top-right corner)
//   general      HAS_PRE = 1, HAS_FOUT = 1  (lower-left 4x4 area)
//   right        HAS_PRE = 1, HAS_FOUT = 0  (right column, no pixel out)
// An input or output that a variant removes is ignored or driven to 0;
// lint tools therefore report pre_sum as unused in the top-row variants.
// Structure and variants follow the published processing elements; the
// widths and the synchronous reset to 0 are this design's choices.
module smooth_pe #(
  parameter int unsigned PW       = 8,
  parameter int unsigned SW       = 13,
  parameter int unsigned COEF     = 9,
  parameter bit          HAS_PRE  = 1'b1,
  parameter bit          HAS_FOUT = 1'b1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [PW-1:0] f_in,
  input  logic [SW-1:0] pre_sum,
  output logic [SW-1:0] sum_out,
  output logic [PW-1:0] f_out
);

  logic [SW-1:0] weighted;
  logic [SW-1:0] sum_d;

  coef_select #(.IW(PW), .OW(SW), .COEF(COEF)) u_coef (
    .pix (f_in),
    .prod(weighted)
  );

  if (HAS_PRE) begin : g_add
    assign sum_d = pre_sum + weighted;
  end else begin : g_noadd
    assign sum_d = weighted;
  end

  always_ff @(posedge clk) begin
    if (rst) sum_out <= '0;
    else     sum_out <= sum_d;
  end

  if (HAS_FOUT) begin : g_fout
    always_ff @(posedge clk) begin
      if (rst) f_out <= '0;
      else     f_out <= f_in;
    end
  end else begin : g_nofout
    assign f_out = '0;
  end

endmodule
