// tb_adder8: self-checking test of the 8-bit loop adder. Corner values and
// random pairs are applied; the sum is compared with (a+b) mod 256, and the
// test counts how many cases wrapped past 255.
module tb_adder8;
  import iir_pkg::*;

  data_t a, b, s;
  int checks = 0, failures = 0, wraps = 0;

  adder8 dut (.a(a), .b(b), .s(s));

  task automatic check(input int ia, input int ib);
    a = data_t'(ia);
    b = data_t'(ib);
    #1;
    checks++;
    if (ia + ib > 255) wraps++;
    if (int'(s) != (ia + ib) % 256) begin
      failures++;
      $display("FAIL %0d+%0d got %0d", ia, ib, s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(255, 1); check(255, 255); check(128, 128); check(1, 254);
    for (int i = 0; i < 2000; i++) check(int'($urandom_range(255)), int'($urandom_range(255)));
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
