// tb_iir_df2: end-to-end self-checking test of the second-order filter at
// its default size (ORDER = 2, 8-bit data, 16-bit output).
//
// Phase 1 replays the published simulation: A0 = 2, A1 = -8 (8'hF8),
// h0 = 2, h1 = 3, h2 = 4, X stepping 0, 1, 2 with X changing between clock
// edges. The expected outputs 0, 2, 9, 11 are fixed numbers, checked both
// after an input change (same-cycle, combinational response) and after a
// clock edge (delay line advance); X then continues to 3 and 4, and the
// sequence is repeated with A1 = +8, both checked against the model below.
// Phase 2 drives random samples and coefficients for many cycles and checks
// y every cycle against an integer model of
//   v(n) = (x + A0*v(n-1) + A1*v(n-2)) mod 256
//   y(n) = (h0*v(n) + h1*v(n-1) + h2*v(n-2)) mod 65536,
// with a reset applied in the middle of the run.
// The test counts how often each mechanism occurred: a non-zero feedback
// contribution, a wrap of the 8-bit state, a wrap of the 16-bit output, and
// a reset clearing a non-zero delay line; any that never occurred counts as
// a failure. A watchdog stops the run with a failure after a fixed number of
// cycles.
module tb_iir_df2;
  import iir_pkg::*;

  localparam int N = 2;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  data_t x;
  data_t a [N];
  data_t h [N+1];
  prod_t y;

  int checks = 0, failures = 0;
  int n_feedback = 0, n_vwrap = 0, n_ywrap = 0, n_reset = 0;
  int m1 = 0, m2 = 0;                 // model of v(n-1), v(n-2)

  iir_df2 dut (.clk(clk), .rst_n(rst_n), .x(x), .a(a), .h(h), .y(y));

  always #5 clk = ~clk;

  function automatic int model_v();
    return (int'(x) + int'(a[0]) * m1 + int'(a[1]) * m2) % 256;
  endfunction

  function automatic int model_y();
    int v = model_v();
    return (int'(h[0]) * v + int'(h[1]) * m1 + int'(h[2]) * m2) % 65536;
  endfunction

  // compare y with the model; note which mechanisms the current state uses
  task automatic check_model(input string tag);
    int full_v, full_y, v;
    full_v = int'(x) + int'(a[0]) * m1 + int'(a[1]) * m2;
    v = full_v % 256;
    full_y = int'(h[0]) * v + int'(h[1]) * m1 + int'(h[2]) * m2;
    if ((full_v - int'(x)) % 256 != 0) n_feedback++;
    if (full_v > 255) n_vwrap++;
    if (full_y > 65535) n_ywrap++;
    checks++;
    if (int'(y) != model_y()) begin
      failures++;
      if (failures < 10) $display("FAIL %s: y=%0d expected %0d", tag, y, model_y());
    end
  endtask

  task automatic expect_y(input int exp, input string tag);
    checks++;
    if (int'(y) != exp) begin
      failures++;
      $display("FAIL %s: y=%0d expected %0d", tag, y, exp);
    end
  endtask

  // clock edge in model and design
  task automatic step();
    int v = model_v();
    @(posedge clk);
    m2 = m1;
    m1 = v;
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---- phase 1: the published waveform -------------------------------
    x = 8'd0;
    a[0] = 8'd2;  a[1] = 8'hF8;
    h[0] = 8'd2;  h[1] = 8'd3;  h[2] = 8'd4;
    @(negedge clk);
    rst_n = 1'b1;
    #1 expect_y(0, "fig X=0");
    step();                         // state stays zero (v = 0)
    expect_y(0, "fig X=0 after edge");
    x = 8'd1; #1;                   // same-cycle response to a new sample
    expect_y(2, "fig X=1");
    step();
    expect_y(9, "fig X=1 after edge");
    x = 8'd2; #1;
    expect_y(11, "fig X=2");
    step();
    check_model("fig X=2 after edge");
    for (int s = 3; s <= 4; s++) begin   // rest of the published X sequence
      x = data_t'(s); #1;
      check_model("fig X=3..4");
      step();
      check_model("fig X=3..4 after edge");
    end
    // same sequence with A1 read as +8 instead of -8
    rst_n = 1'b0; #1; m1 = 0; m2 = 0;
    a[1] = 8'd8;
    @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s <= 4; s++) begin
      x = data_t'(s); #1;
      check_model("fig A1=+8");
      step();
      check_model("fig A1=+8 after edge");
    end

    // ---- phase 2: random samples and coefficients -----------------------
    for (int cyc = 0; cyc < 5000; cyc++) begin
      if (cyc % 500 == 0) begin
        foreach (a[i]) a[i] = data_t'($urandom);
        foreach (h[i]) h[i] = data_t'($urandom);
      end
      if (cyc == 2500) begin
        // asynchronous reset mid-run: delay line must clear
        if (m1 != 0 || m2 != 0) n_reset++;
        rst_n = 1'b0;
        m1 = 0; m2 = 0;
        #1;
        x = 8'd0; #1;
        checks++;
        if (y != '0) begin failures++; $display("FAIL reset: y=%0d", y); end
        @(negedge clk);
        rst_n = 1'b1;
      end
      x = data_t'($urandom);
      #1;
      check_model("random");
      step();
    end

    $display("mechanisms: feedback=%0d state_wrap=%0d output_wrap=%0d reset=%0d",
             n_feedback, n_vwrap, n_ywrap, n_reset);
    checks += 4;
    if (n_feedback == 0) begin failures++; $display("FAIL feedback never exercised"); end
    if (n_vwrap    == 0) begin failures++; $display("FAIL state wrap never exercised"); end
    if (n_ywrap    == 0) begin failures++; $display("FAIL output wrap never exercised"); end
    if (n_reset    == 0) begin failures++; $display("FAIL reset never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
