// tb_iir_df2_order3: self-checking test of the filter built at third order
// (ORDER = 3: three delay registers, coefficients A0..A2 and h0..h3), the
// size of the filter's block diagram.
//
// It first measures the impulse response with only the newest tap of each
// section non-zero and checks where the echoes appear, then runs random
// samples and coefficients against an integer model of
//   v(n) = (x + A0*v(n-1) + A1*v(n-2) + A2*v(n-3)) mod 256
//   y(n) = (h0*v(n) + h1*v(n-1) + h2*v(n-2) + h3*v(n-3)) mod 65536.
// A watchdog stops the run with a failure after a fixed number of cycles.
module tb_iir_df2_order3;
  import iir_pkg::*;

  localparam int N = 3;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  data_t x;
  data_t a [N];
  data_t h [N+1];
  prod_t y;

  int checks = 0, failures = 0;
  int m [1:N];                      // model delay line, m[k] = v(n-k)

  iir_df2 #(.ORDER(N)) dut (.clk(clk), .rst_n(rst_n), .x(x), .a(a), .h(h), .y(y));

  always #5 clk = ~clk;

  function automatic int model_v();
    int s = int'(x);
    for (int k = 1; k <= N; k++) s += int'(a[k-1]) * m[k];
    return s % 256;
  endfunction

  function automatic int model_y();
    int s = int'(h[0]) * model_v();
    for (int k = 1; k <= N; k++) s += int'(h[k]) * m[k];
    return s % 65536;
  endfunction

  task automatic step();
    int v = model_v();
    @(posedge clk);
    for (int k = N; k > 1; k--) m[k] = m[k-1];
    m[1] = v;
    #1;
  endtask

  task automatic expect_y(input int exp, input string tag);
    checks++;
    if (int'(y) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: y=%0d expected %0d", tag, y, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 1; k <= N; k++) m[k] = 0;
    // impulse through the last tap only: y = 5 at n = 0 and 7 at n = 3
    x = 8'd1;
    foreach (a[i]) a[i] = '0;
    h[0] = 8'd5; h[1] = '0; h[2] = '0; h[3] = 8'd7;
    @(negedge clk);
    rst_n = 1'b1;
    #1 expect_y(5, "impulse n=0");
    step(); x = '0; #1 expect_y(0, "impulse n=1");
    step(); expect_y(0, "impulse n=2");
    step(); expect_y(7, "impulse n=3");
    step(); expect_y(0, "impulse n=4");

    // feedback through the oldest tap: v repeats every third sample
    rst_n = 1'b0; #1; rst_n = 1'b1;
    for (int k = 1; k <= N; k++) m[k] = 0;
    a[2] = 8'd1; h[0] = 8'd1; h[3] = '0;
    x = 8'd9; #1 expect_y(9, "recursive n=0");
    step(); x = '0; #1 expect_y(0, "recursive n=1");
    step(); expect_y(0, "recursive n=2");
    step(); expect_y(9, "recursive n=3");
    step(); step(); step(); expect_y(9, "recursive n=6");

    for (int cyc = 0; cyc < 4000; cyc++) begin
      if (cyc % 400 == 0) begin
        foreach (a[i]) a[i] = data_t'($urandom);
        foreach (h[i]) h[i] = data_t'($urandom);
      end
      x = data_t'($urandom);
      #1 expect_y(model_y(), "random");
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
