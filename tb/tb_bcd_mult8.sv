// tb_bcd_mult8: exhaustive self-checking test of the 8x8 multiplier.
// All 65536 operand pairs are applied and the 16-bit product is compared
// with the integer product x*y. A watchdog ends the run with a failure if
// the loop does not complete.
module tb_bcd_mult8;
  import iir_pkg::*;

  data_t x, y;
  prod_t p;
  int checks = 0, failures = 0;

  bcd_mult8 dut (.x(x), .y(y), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x = data_t'(i);
        y = data_t'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
