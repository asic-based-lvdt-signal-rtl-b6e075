// tb_motor_3ph: checks the three-phase square-wave drive.
// With a divider of 3 it counts ticks per step and checks the six-step
// pattern: every phase 50 % duty, B a third of a period behind A, C a third
// behind B.
module tb_motor_3ph;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        tick = 1'b0;
  logic [15:0] motor_div;
  logic [2:0]  phase_abc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  motor_3ph dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] hist [$];
    logic [2:0] prev;
    int ticks_since;
    motor_div = 16'd3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(phase_abc == 3'b100, "reset state: only C high");
    prev = phase_abc;
    ticks_since = 0;
    // 6 steps x 3 ticks x 4 periods
    for (int t = 0; t < 72; t++) begin
      @(negedge clk) tick = 1'b1;
      @(negedge clk) tick = 1'b0;
      ticks_since++;
      if (phase_abc != prev) begin
        check(ticks_since == 3, $sformatf("step after %0d ticks", ticks_since));
        ticks_since = 0;
        prev = phase_abc;
      end
      hist.push_back(phase_abc);
    end
    // Sampled once per tick: a period is 18 entries. Phase p is entry i,
    // phase p+1 equals phase p delayed by 6 ticks (120 degrees).
    for (int i = 18; i < 72; i++) begin
      check(hist[i][1] == hist[i-6][0], "B lags A by 120 degrees");
      check(hist[i][2] == hist[i-6][1], "C lags B by 120 degrees");
      check(hist[i] == hist[i-18], "period of six steps");
    end
    begin
      int high = 0;
      for (int i = 0; i < 72; i++) high += hist[i][0];
      check(high == 36, "phase A 50 % duty");
    end
    check(phase_abc != 3'b000 && phase_abc != 3'b111, "never all equal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
