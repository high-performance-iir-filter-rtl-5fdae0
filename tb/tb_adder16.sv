// tb_adder16: self-checking test of the 16-bit product adder. Corner values
// and random pairs are applied; the sum is compared with (a+b) mod 65536.
module tb_adder16;
  import iir_pkg::*;

  prod_t a, b, s;
  int checks = 0, failures = 0;

  adder16 dut (.a(a), .b(b), .s(s));

  task automatic check(input int ia, input int ib);
    a = prod_t'(ia);
    b = prod_t'(ib);
    #1;
    checks++;
    if (int'(s) != (ia + ib) % 65536) begin
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
    check(0, 0); check(65535, 1); check(65535, 65535); check(32768, 32768);
    check(255, 1); check(4095, 1);
    for (int i = 0; i < 2000; i++) check(int'($urandom_range(65535)), int'($urandom_range(65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
