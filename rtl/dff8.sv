// dff8: 8-bit D flip-flop register, one z^-1 delay element of the filter's
// shared delay line (it holds v(n-1), v(n-2), ...).
//
// On every rising clock edge q takes d. The asynchronous active-low reset
// clearing q to zero is this design's addition: the document's register has
// only a clock and a data input, but its simulation starts from an all-zero
// state, which the reset provides.
//
// Interface: clk, rst_n, d (8-bit) in; q (8-bit) out.
// Timing: one clock of latency from d to q.
module dff8
  import iir_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  data_t d,
  output data_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
