// edge_strength_unit: edge strength and edge direction of every smoothed
// pixel by the absolute difference mask (ADM) method.
//
// For each of four directions through the centre of a 5x5 window the unit
// adds the two pixels on one side of the centre and the two pixels on the
// other side, and takes the absolute difference of the two sums: 16 window
// pixels, 8 additions, 4 absolute differences. The largest difference is
// the edge strength; the direction with the smallest difference is the
// direction along which the edge runs. With (dy, dx) the offset from the
// centre (dy down, dx right) the pairs are
//   DIR_DIAG  (/) : (+1,-1)+(+2,-2)  vs  (-1,+1)+(-2,+2)
//   DIR_VERT  (|) : (-1, 0)+(-2, 0)  vs  (+1, 0)+(+2, 0)
//   DIR_ADIAG (\) : (-1,-1)+(-2,-2)  vs  (+1,+1)+(+2,+2)
//   DIR_HORZ  (-) : ( 0,-1)+( 0,-2)  vs  ( 0,+1)+( 0,+2)
// The strength is halved (the difference of two 2-pixel sums needs 9 bits)
// so that it fits the 8-bit stream; on a tie for the minimum the lower
// direction code wins.
//
// Timing: fully pipelined, one result per cycle, latency 4 cycles
// (stage 1 sums, stage 2 absolute differences, stage 3 pairwise
// maximum/minimum, stage 4 final maximum/minimum).
// Window indexing: win[k][j] is the pixel k rows and j columns older than
// win[0][0] (window_fifo convention), so offset (dy, dx) is win[2-dy][2-dx].
// The 16-input, 8-addition, 4-difference, 4-cycle organisation and the
// max/min rule follow the published unit; which four pixels serve each
// direction, the halving and the direction codes are this design's choices.
module edge_strength_unit
  import edge_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  pixel_t win [5][5],
  output pixel_t strength,
  output dir_t   dir
);

  typedef logic [PIX_W:0] wide_t;   // 9 bits: sum of two pixels

  // Pixel at offset (dy, dx) from the centre.
  function automatic pixel_t px(input pixel_t w [5][5], input int dy, input int dx);
    return w[2-dy][2-dx];
  endfunction

  // Stage 1: two-pixel sums, index 0..3 = DIR_DIAG .. DIR_HORZ.
  wide_t sa [4], sb [4];
  // Stage 2: absolute differences.
  wide_t ad [4];
  // Stage 3: pairwise maximum and minimum.
  wide_t mx01, mx23, mn01, mn23;
  dir_t  dn01, dn23;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) begin
        sa[i] <= '0;
        sb[i] <= '0;
        ad[i] <= '0;
      end
      mx01 <= '0; mx23 <= '0; mn01 <= '0; mn23 <= '0;
      dn01 <= DIR_DIAG; dn23 <= DIR_ADIAG;
      strength <= '0;
      dir      <= DIR_DIAG;
    end else begin
      sa[0] <= wide_t'(px(win,  1, -1)) + wide_t'(px(win,  2, -2));
      sb[0] <= wide_t'(px(win, -1,  1)) + wide_t'(px(win, -2,  2));
      sa[1] <= wide_t'(px(win, -1,  0)) + wide_t'(px(win, -2,  0));
      sb[1] <= wide_t'(px(win,  1,  0)) + wide_t'(px(win,  2,  0));
      sa[2] <= wide_t'(px(win, -1, -1)) + wide_t'(px(win, -2, -2));
      sb[2] <= wide_t'(px(win,  1,  1)) + wide_t'(px(win,  2,  2));
      sa[3] <= wide_t'(px(win,  0, -1)) + wide_t'(px(win,  0, -2));
      sb[3] <= wide_t'(px(win,  0,  1)) + wide_t'(px(win,  0,  2));

      for (int i = 0; i < 4; i++)
        ad[i] <= (sa[i] > sb[i]) ? (sa[i] - sb[i]) : (sb[i] - sa[i]);

      mx01 <= (ad[1] > ad[0]) ? ad[1] : ad[0];
      mx23 <= (ad[3] > ad[2]) ? ad[3] : ad[2];
      if (ad[1] < ad[0]) begin mn01 <= ad[1]; dn01 <= DIR_VERT; end
      else               begin mn01 <= ad[0]; dn01 <= DIR_DIAG; end
      if (ad[3] < ad[2]) begin mn23 <= ad[3]; dn23 <= DIR_HORZ; end
      else               begin mn23 <= ad[2]; dn23 <= DIR_ADIAG; end

      strength <= PIX_W'(((mx23 > mx01) ? mx23 : mx01) >> 1);
      dir      <= (mn23 < mn01) ? dn23 : dn01;
    end
  end

endmodule
