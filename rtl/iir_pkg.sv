// iir_pkg: widths and types shared by the direct-form-II IIR filter and its
// arithmetic blocks.
//
// Samples, coefficients and the internal state v(n) are 8-bit words; every
// multiplier produces a full 16-bit product and the output y(n) is 16 bits,
// the widths printed on the filter's block and netlist diagrams. Arithmetic
// is unsigned and modular: a sum that exceeds its word simply wraps, so a
// coefficient may equally be read as a two's-complement value (0xF8 = -8)
// as far as the 8-bit state is concerned.
package iir_pkg;

  parameter int unsigned DATA_W = 8;           // sample, coefficient, state
  parameter int unsigned PROD_W = 2 * DATA_W;  // product and output width
  parameter int unsigned NIB_W  = DATA_W / 2;  // operand slice of a 4x4 multiplier

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [PROD_W-1:0] prod_t;
  typedef logic [NIB_W-1:0]  nib_t;
  typedef logic [DATA_W-1:0] nib_prod_t;       // 4x4 product, 8 bits

endpackage
