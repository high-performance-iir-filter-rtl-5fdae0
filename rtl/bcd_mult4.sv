// bcd_mult4: 4x4 unsigned multiplier built around a code decoder.
//
// The multiplier nibble b is decoded into sixteen one-hot select lines
// (a 4-to-16 extension of a BCD decoder). Each line k carries the constant
// multiple a*k of the multiplicand; the active line is gated through an
// AND-OR plane, so the product is a single decode-and-select step with no
// carry chain on the b side. Only the idea of a decoder-based 4x4 cell comes
// from the filter description; the decoder width and the AND-OR select are
// this design's own choice.
//
// Interface: a, b are 4-bit unsigned operands; p = a*b, 8 bits.
// Timing: purely combinational.
module bcd_mult4
  import iir_pkg::*;
(
  input  nib_t      a,
  input  nib_t      b,
  output nib_prod_t p
);

  localparam int unsigned LINES = 1 << NIB_W;

  logic [LINES-1:0] sel;             // one-hot decode of b
  nib_prod_t        mult [LINES];    // a*k for every code k

  always_comb begin
    sel = '0;
    sel[b] = 1'b1;
  end

  always_comb begin
    for (int unsigned k = 0; k < LINES; k++) begin
      mult[k] = nib_prod_t'(a) * nib_prod_t'(k);
    end
  end

  always_comb begin
    p = '0;
    for (int unsigned k = 0; k < LINES; k++) begin
      p |= mult[k] & {DATA_W{sel[k]}};
    end
  end

endmodule
