// ram_shift_reg: a delay line of DEPTH clock cycles kept in a small RAM
// instead of a chain of flip-flops.
//
// A DEPTH-entry memory is addressed by one circular counter. Each cycle the
// word at the counter is read out (asynchronously) and overwritten with the
// new input, then the counter advances, so a word written at cycle t comes
// out at cycle t + DEPTH: d_out(t) = d_in(t - DEPTH). This is the shape of
// an FPGA distributed-RAM shift register. The memory itself is not reset;
// only the address counter is, so the first DEPTH outputs after reset are
// whatever the RAM held.
//
// Interface: clk, synchronous active-high rst (counter only), d_in, d_out.
// The delay-line role and the depths come from the scalable FIFO; the
// circular-counter organisation is this design's choice.
module ram_shift_reg #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DW    = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] d_in,
  output logic [DW-1:0] d_out
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] ptr;

  assign d_out = mem[ptr];

  always_ff @(posedge clk) begin
    mem[ptr] <= d_in;
    if (rst || ptr == AW'(DEPTH - 1)) ptr <= '0;
    else                              ptr <= ptr + 1'b1;
  end

  initial begin
    assert (DEPTH >= 1) else $error("ram_shift_reg: DEPTH must be at least 1");
  end

endmodule
