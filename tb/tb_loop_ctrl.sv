// tb_loop_ctrl: checks the PI position controller.
// An independent model computes e = sp - y, I += e, u = (kp e + ki I) >> 8,
// code = clamp(u + 2048); checked for random inputs and gains, for the
// mid-scale output and cleared integrator while disabled, and for clamping.
module tb_loop_ctrl;
  logic               clk = 1'b0, rst_n = 1'b0;
  logic               enable;
  logic signed [15:0] setpoint, kp, ki;
  logic               in_valid = 1'b0;
  logic signed [9:0]  in_y;
  logic [11:0]        dac_data;
  logic               dac_wr;
  int checks = 0, failures = 0;
  longint integ;

  always #5 clk = ~clk;

  loop_ctrl dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic step(input int y);
    longint e, u, code;
    if (enable) begin
      e = setpoint - y;
      integ += e;
      if (integ > 8388607) integ = 8388607;
      if (integ < -8388608) integ = -8388608;
      u = (kp * e + ki * integ) >>> 8;
      code = u + 2048;
      if (code < 0) code = 0;
      if (code > 4095) code = 4095;
    end else begin
      integ = 0;
      code = 2048;
    end
    @(negedge clk);
    in_valid = 1'b1; in_y = 10'(y);
    @(negedge clk);
    in_valid = 1'b0;
    check(dac_wr, "DAC write one cycle after the sample");
    check(longint'(dac_data) == code, $sformatf("y %0d: dac %0d, want %0d", y, dac_data, code));
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_y = '0; integ = 0;
    enable = 1'b0; setpoint = 16'sd100; kp = 16'sd256; ki = 16'sd4;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(dac_data == 12'd2048, "mid-scale after reset");
    for (int i = 0; i < 20; i++) step($signed($urandom_range(1000)) - 500);   // disabled
    enable = 1'b1;
    for (int i = 0; i < 300; i++) step($signed($urandom_range(200)) - 100);
    kp = 16'sd3000; ki = 16'sd0;
    step(-400);     // large positive command: clamps at 4095
    check(dac_data == 12'd4095, "upper clamp");
    setpoint = -16'sd400;
    step(400);      // large negative command: clamps at 0
    check(dac_data == 12'd0, "lower clamp");
    kp = $signed(16'($urandom)) >>> 4; ki = $signed(16'($urandom)) >>> 6;
    for (int i = 0; i < 300; i++) step($signed($urandom_range(1023)) - 512);
    enable = 1'b0;
    step(7);
    check(dac_data == 12'd2048, "mid-scale when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
