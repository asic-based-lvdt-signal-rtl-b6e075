// tb_iir_biquad: checks the direct-form-II biquad.
// A floating-point model of w[n] = x + a1 w[n-1] + a2 w[n-2],
// y = b0 w + b1 w[n-1] + b2 w[n-2] runs beside the filter. Three runs: pass-
// through (b0 = 1), the default 1 kHz low-pass on random input (within 2
// LSB, and its DC gain of 1 on a step), and saturation of the output.
module tb_iir_biquad;
  logic               clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] b0, b1, b2, a1, a2;
  logic               in_valid = 1'b0;
  logic signed [10:0] in_x;
  logic               out_valid;
  logic signed [9:0]  out_y;
  int checks = 0, failures = 0;
  real w1, w2;

  always #5 clk = ~clk;

  iir_biquad dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real clampr(input real v, input real lo, input real hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Returns the model output for x and advances the model state.
  function automatic real model(input int x);
    real w, y;
    w = x + (a1 / 16384.0) * w1 + (a2 / 16384.0) * w2;
    y = (b0 / 16384.0) * w + (b1 / 16384.0) * w1 + (b2 / 16384.0) * w2;
    w2 = w1; w1 = w;
    return clampr(y, -512.0, 511.0);
  endfunction

  task automatic run(input int x, input real tol, input string what);
    real ym, d;
    ym = model(x);
    @(negedge clk);
    in_valid = 1'b1; in_x = 11'(x);
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid, "one cycle latency");
    d = out_y - ym;
    if (d < 0) d = -d;
    check(d <= tol, $sformatf("%s: x %0d y %0d model %f", what, x, out_y, ym));
  endtask

  task automatic reset_filter();
    rst_n = 1'b0; w1 = 0; w2 = 0;
    @(negedge clk) rst_n = 1'b1;
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_x = '0;
    // 1. pass-through
    b0 = 16384; b1 = 0; b2 = 0; a1 = 0; a2 = 0;
    reset_filter();
    for (int i = 0; i < 100; i++) run($signed($urandom_range(1022)) - 511, 0.0, "pass-through");
    // 2. default low-pass: random input, then a step
    b0 = 329; b1 = 658; b2 = 329; a1 = 25576; a2 = -10508;
    reset_filter();
    for (int i = 0; i < 400; i++) run($signed($urandom_range(600)) - 300, 2.0, "low-pass random");
    for (int i = 0; i < 200; i++) run(300, 2.0, "low-pass step");
    check(out_y >= 298 && out_y <= 302, $sformatf("DC gain: step 300 settles to %0d", out_y));
    // 3. output saturation: gain 1.9 on a large input
    b0 = 31130; b1 = 0; b2 = 0; a1 = 0; a2 = 0;
    reset_filter();
    run(500, 0.0, "positive saturation");
    check(out_y == 511, "clamps at 511");
    run(-500, 0.0, "negative saturation");
    check(out_y == -512, "clamps at -512");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
