// coef_select: the coefficient selection unit of a smoothing processing
// element; multiplies a pixel by a constant mask weight without a
// multiplier.
//
// The weight COEF is a small integer (the mask weight times 2^3). Every
// set bit b of COEF contributes a copy of the pixel shifted left by b, and
// the copies are added. The mask weights are sums of at most two powers of
// two, so this is at most one adder. Purely combinational.
//
// Interface: pix (IW bits) in, prod = pix * COEF (OW bits) out.
// The shift-and-add realisation of the weights follows the published
// design; scaling the weights to integers is this design's choice.
module coef_select #(
  parameter int unsigned IW   = 8,
  parameter int unsigned OW   = 12,
  parameter int unsigned COEF = 9
) (
  input  logic [IW-1:0] pix,
  output logic [OW-1:0] prod
);

  always_comb begin
    prod = '0;
    for (int b = 0; b < 8; b++) begin
      if (COEF[b]) prod = prod + (OW'(pix) << b);
    end
  end

  initial begin
    assert (COEF < 256) else $error("coef_select: COEF must fit in 8 bits");
  end

endmodule
