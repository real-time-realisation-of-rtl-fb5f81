// scalable_fifo: one image-row delay whose length is chosen at run time
// among 32, 64, 128, 256 and 512 pixels (the "Scheme 2" scalable FIFO).
//
// The row delay is one long shift register cut into pieces. The first TAPS
// stages are ordinary reset flip-flops; their outputs are brought out as
// window taps for the processing unit that follows. Behind them sit five
// RAM-based shift-register segments in series, of depths 32-TAPS, 32, 64,
// 128 and 256 (27, 32, 64, 128, 256 for TAPS = 5). The outputs after the
// 1st, 2nd, ... 5th segment are therefore TAPS+27 = 32, 64, 128, 256 and
// 512 cycles behind the input, and a multiplexer driven by scl_sel picks
// the one that matches the image width. Unused segments keep shifting but
// are bypassed, so one set of storage serves all five widths at the cost of
// only the output multiplexer.
//
// Interface: pxl_in enters every cycle; taps[i] = pxl_in delayed by i+1
// cycles; pxl_out = pxl_in delayed by width_of(scl_sel) cycles. scl_sel may
// change at any time; the first row after a change carries stale data.
// The segment depths, the D-FF front end and the output multiplexing follow
// the published structure; the select encoding and the TAPS parameter (used
// to build a 3-tap version for the 3x3 window) are this design's choices.
module scalable_fifo
  import edge_pkg::*;
#(
  parameter int unsigned DW   = PIX_W,
  parameter int unsigned TAPS = 5
) (
  input  logic          clk,
  input  logic          rst,
  input  size_sel_t     scl_sel,
  input  logic [DW-1:0] pxl_in,
  output logic [DW-1:0] taps [TAPS],
  output logic [DW-1:0] pxl_out
);

  // Depth of segment k: the first one completes the 32-pixel row together
  // with the TAPS flip-flops, each later one doubles the row length.
  function automatic int unsigned seg_depth(input int unsigned k);
    return (k == 0) ? (32 - TAPS) : (32 << (k - 1));
  endfunction

  // Flip-flop front end.
  logic [DW-1:0] ff [TAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS; i++) ff[i] <= '0;
    end else begin
      ff[0] <= pxl_in;
      for (int i = 1; i < TAPS; i++) ff[i] <= ff[i-1];
    end
  end

  assign taps = ff;

  // Chained RAM segments.
  logic [DW-1:0] seg_out [NUM_SIZES];

  for (genvar k = 0; k < NUM_SIZES; k++) begin : g_seg
    logic [DW-1:0] seg_in;
    if (k == 0) begin : g_first
      assign seg_in = ff[TAPS-1];
    end else begin : g_next
      assign seg_in = seg_out[k-1];
    end
    ram_shift_reg #(.DEPTH(seg_depth(k)), .DW(DW)) u_seg (
      .clk  (clk),
      .rst  (rst),
      .d_in (seg_in),
      .d_out(seg_out[k])
    );
  end

  // Output multiplexer.
  always_comb begin
    case (scl_sel)
      SIZE_32:  pxl_out = seg_out[0];
      SIZE_64:  pxl_out = seg_out[1];
      SIZE_128: pxl_out = seg_out[2];
      SIZE_256: pxl_out = seg_out[3];
      default:  pxl_out = seg_out[4];
    endcase
  end

  initial begin
    assert (TAPS >= 1 && TAPS < 32) else $error("scalable_fifo: TAPS must be 1..31");
  end

endmodule
