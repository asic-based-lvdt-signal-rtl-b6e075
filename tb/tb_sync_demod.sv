// tb_sync_demod: checks the synchronous demodulator.
// Drives an amplitude-modulated carrier sampled at its peaks (positive peak
// +A, negative peak -A, A following a slow ramp) and checks that the output is
// the envelope A at both peaks, one cycle later; also the extreme codes.
module tb_sync_demod;
  import lvdt_pkg::*;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic              in_valid = 1'b0;
  logic signed [9:0] in_sample;
  peak_e             in_peak;
  logic              out_valid;
  logic signed [10:0] out_env;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sync_demod #(.ADC_W(10)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic drive(input int v, input peak_e p, input int want);
    @(negedge clk);
    in_valid = 1'b1; in_sample = 10'(v); in_peak = p;
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid, "out_valid one cycle after in_valid");
    check(int'(out_env) == want, $sformatf("in %0d peak %s: out %0d, want %0d", v, p.name(), out_env, want));
    @(negedge clk);
    check(!out_valid, "out_valid is a single pulse");
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_sample = '0; in_peak = PEAK_POS;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      int a;
      a = int'($floor(400.0 * $sin(2.0 * 3.14159265 * n / 100.0)));
      // carrier at its positive peak carries +a, at its negative peak -a
      drive(a, PEAK_POS, a);
      drive(-a, PEAK_NEG, a);
    end
    drive(-512, PEAK_NEG, 512);
    drive(511, PEAK_NEG, -511);
    drive(-512, PEAK_POS, -512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
