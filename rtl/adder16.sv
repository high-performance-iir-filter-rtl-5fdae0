// adder16: 16-bit two-input adder used to sum tap products, both in the
// pole (feedback) half and in the zero (output) half of the filter.
//
// The sum wraps modulo 2^16, matching the 16-bit output word of the filter.
// The document gives only the name, width and role of this adder; a plain
// binary adder is this design's choice.
//
// Interface: a, b 16-bit; s = (a + b) mod 65536.
// Timing: purely combinational.
module adder16
  import iir_pkg::*;
(
  input  prod_t a,
  input  prod_t b,
  output prod_t s
);

  always_comb s = a + b;

endmodule
