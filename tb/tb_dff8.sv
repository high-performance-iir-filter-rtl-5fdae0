// tb_dff8: self-checking test of the 8-bit delay register. Checks that reset
// clears q, that q shows d one rising edge later, and that q holds between
// edges while d changes.
module tb_dff8;
  import iir_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  data_t d, q, prev;
  int checks = 0, failures = 0;

  dff8 dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'hA5;
    @(posedge clk); #1;
    checks++;
    if (q != '0) begin failures++; $display("FAIL reset q=%0h", q); end
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      d = data_t'($urandom);
      prev = d;
      @(posedge clk); #1;
      checks++;
      if (q != prev) begin failures++; $display("FAIL q=%0h exp %0h", q, prev); end
      d = ~prev;                 // change d between edges: q must hold
      #2;
      checks++;
      if (q != prev) begin failures++; $display("FAIL q did not hold"); end
    end
    rst_n = 1'b0; #1;
    checks++;
    if (q != '0) begin failures++; $display("FAIL async reset q=%0h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
