// iir_df2: direct-form-II (canonic) IIR filter with 8-bit samples and
// coefficients, a 16-bit output, and decoder-based 8x8 multipliers in every
// tap. This is the top of the design.
//
// Direct form II runs the all-pole section first and the all-zero section
// second, so both share one delay line of ORDER registers holding the
// internal state v:
//   v(n) = x(n) + a[0]*v(n-1) + a[1]*v(n-2) + ...   (8 bits, wraps)
//   y(n) = h[0]*v(n) + h[1]*v(n-1) + h[2]*v(n-2) + ... (16 bits, wraps)
// Feedback is added, not subtracted: a negative pole coefficient is given
// in two's complement (e.g. 8'hF8 for -8). Only the low byte of the 16-bit
// feedback sum enters the 8-bit loop adder, because state words are 8 bits.
//
// Datapath for the default ORDER = 2 (five multipliers, three 16-bit adders,
// one 8-bit adder, two 8-bit registers):
//   a[0]*v(n-1) + a[1]*v(n-2)        -> 16-bit adder (feedback sum)
//   x + feedback[7:0]                -> 8-bit adder  -> v(n)
//   h[1]*v(n-1) + h[2]*v(n-2)        -> 16-bit adder (zero tail)
//   h[0]*v(n) + zero tail            -> 16-bit adder -> y
// The filter order, the tap structure, the widths and the coefficient names
// A0/A1 and h0..h2 follow the document; ORDER = 3 gives its third-order block
// diagram. The reset and the modular (unsigned) arithmetic are this design's
// choices.
//
// Interface: clk, rst_n (async, active low, clears the delay line); x is the
// input sample; a[ORDER] the pole coefficients (a[k] weights v(n-1-k));
// h[ORDER+1] the zero coefficients (h[k] weights v(n-k)); y the output.
// Timing: y is a combinational function of x, the coefficients and the
// delay line, so a new sample is accepted and its output produced in the
// same clock cycle; the delay line advances on each rising clock edge.
module iir_df2
  import iir_pkg::*;
#(
  parameter int unsigned ORDER = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t x,
  input  data_t a [ORDER],
  input  data_t h [ORDER+1],
  output prod_t y
);

  data_t v;                    // v(n), the state entering the delay line
  data_t dly   [ORDER+1];      // dly[k] = v(n-k), dly[0] = v(n)
  prod_t p_fb  [1:ORDER];      // a[k-1] * v(n-k)
  prod_t p_fw  [ORDER+1];      // h[k]   * v(n-k)
  prod_t s_fb  [1:ORDER];      // running feedback sum
  prod_t s_fw  [1:ORDER];      // running zero-tail sum

  assign dly[0] = v;

  // Shared delay line and per-tap multipliers.
  for (genvar k = 1; k <= ORDER; k++) begin : g_tap
    dff8      u_reg  (.clk(clk), .rst_n(rst_n), .d(dly[k-1]), .q(dly[k]));
    bcd_mult8 u_mfb  (.x(a[k-1]), .y(dly[k]), .p(p_fb[k]));
    bcd_mult8 u_mfw  (.x(h[k]),   .y(dly[k]), .p(p_fw[k]));

    if (k == 1) begin : g_first
      assign s_fb[k] = p_fb[k];
      assign s_fw[k] = p_fw[k];
    end else begin : g_sum
      adder16 u_afb (.a(s_fb[k-1]), .b(p_fb[k]), .s(s_fb[k]));
      adder16 u_afw (.a(s_fw[k-1]), .b(p_fw[k]), .s(s_fw[k]));
    end
  end

  // All-pole section: close the loop on the low byte of the feedback sum.
  adder8 u_loop (.a(x), .b(s_fb[ORDER][DATA_W-1:0]), .s(v));

  // All-zero section: weight v(n) and add the delayed-tap sum.
  bcd_mult8 u_m0   (.x(v), .y(h[0]), .p(p_fw[0]));
  adder16   u_out  (.a(p_fw[0]), .b(s_fw[ORDER]), .s(y));

endmodule
