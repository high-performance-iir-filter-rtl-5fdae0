// tb_bcd_mult4: exhaustive self-checking test of the 4x4 decoder multiplier.
// All 256 operand pairs are applied and the product is compared with the
// integer product a*b. A watchdog ends the run with a failure if the loop
// does not complete.
module tb_bcd_mult4;
  import iir_pkg::*;

  nib_t      a, b;
  nib_prod_t p;
  int checks = 0, failures = 0;

  bcd_mult4 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = nib_t'(i);
        b = nib_t'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
