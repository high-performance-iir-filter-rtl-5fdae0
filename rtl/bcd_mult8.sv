// bcd_mult8: 8x8 unsigned multiplier assembled from four decoder-based 4x4
// cells (bcd_mult4), the multiplier the filter uses in every tap.
//
// Both operands are split into a high and a low nibble. The four nibble
// products are combined in two rows of a shift-and-add tree:
//   row 0 = x_lo*y_lo + (x_hi*y_lo << 4)        (12 bits)
//   row 1 = x_lo*y_hi + (x_hi*y_hi << 4)        (12 bits)
//   p     = row 0 + (row 1 << 4)                (16 bits)
// which is the dot-diagram arrangement of the 8-bit decoder multiplier.
// The order in which the rows are added follows that diagram; the adders
// themselves are plain binary adders (not specified further).
//
// Interface: x, y are 8-bit unsigned operands; p = x*y, 16 bits, exact.
// Timing: purely combinational.
module bcd_mult8
  import iir_pkg::*;
(
  input  data_t x,
  input  data_t y,
  output prod_t p
);

  localparam int unsigned ROW_W = DATA_W + NIB_W;  // 12 bits

  nib_prod_t pp_ll, pp_hl, pp_lh, pp_hh;
  logic [ROW_W-1:0] row0, row1;

  bcd_mult4 u_ll (.a(x[NIB_W-1:0]),      .b(y[NIB_W-1:0]),      .p(pp_ll));
  bcd_mult4 u_hl (.a(x[DATA_W-1:NIB_W]), .b(y[NIB_W-1:0]),      .p(pp_hl));
  bcd_mult4 u_lh (.a(x[NIB_W-1:0]),      .b(y[DATA_W-1:NIB_W]), .p(pp_lh));
  bcd_mult4 u_hh (.a(x[DATA_W-1:NIB_W]), .b(y[DATA_W-1:NIB_W]), .p(pp_hh));

  always_comb begin
    row0 = ROW_W'(pp_ll) + {pp_hl, {NIB_W{1'b0}}};
    row1 = ROW_W'(pp_lh) + {pp_hh, {NIB_W{1'b0}}};
    p    = PROD_W'(row0) + {row1, {NIB_W{1'b0}}};
  end

endmodule
