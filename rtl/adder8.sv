// adder8: 8-bit two-input adder that closes the recursive loop of the
// filter, v(n) = x(n) + (low byte of the feedback sum).
//
// The sum wraps modulo 2^8; the carry out is not used because the state
// register that follows is 8 bits wide. The document gives only the name and
// role of this adder; a plain binary adder is this design's choice.
//
// Interface: a, b 8-bit; s = (a + b) mod 256.
// Timing: purely combinational.
module adder8
  import iir_pkg::*;
(
  input  data_t a,
  input  data_t b,
  output data_t s
);

  always_comb s = a + b;

endmodule
