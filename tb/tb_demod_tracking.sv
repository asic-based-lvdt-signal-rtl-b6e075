// tb_demod_tracking: demodulation of a moving core.
// The DDS excites a behavioural LVDT whose core swings sinusoidally
// (x = 0.8 sin(2 pi 50 Hz t), so the envelope changes sign every 10 ms);
// the secondary is sampled at every carrier peak the DDS marks, demodulated
// and low-pass filtered. The filtered output must follow 0.8 * 511 * sin,
// delayed by the filter's group delay, within a few LSB, and cross zero.
// Interface: dds_wavegen + sync_demod + iir_biquad at the 16 MHz master
// clock, 10 kHz carrier, 50 ms of simulated time. Follows the document:
// peak sampling with sign reversal of the negative peak, then low-pass
// filtering. Own choice: the ideal sensor/ADC model, the core motion and the
// 8 LSB tolerance.
module tb_demod_tracking;
  import lvdt_pkg::*;
  logic               clk = 1'b0, rst_n = 1'b0;
  logic [11:0]        dac_data;
  logic               dac_wr, pos_peak, neg_peak;
  logic [5:0]         phase;
  logic               s_valid = 1'b0;
  logic signed [9:0]  s_sample;
  peak_e              s_peak;
  logic               e_valid, y_valid;
  logic signed [10:0] env;
  logic signed [9:0]  y;
  int checks = 0, failures = 0;

  localparam real PI = 3.14159265358979;
  localparam real FM = 50.0;
  localparam real DELAY_S = 0.23e-3;   // low-pass group delay near DC, 1 kHz Butterworth at 20 kHz

  always #31.25 clk = ~clk;

  dds_wavegen u_dds (.clk, .rst_n, .freq_sel(4'd0), .dac_data, .dac_wr, .phase, .pos_peak, .neg_peak);
  sync_demod  u_dem (.clk, .rst_n, .in_valid(s_valid), .in_sample(s_sample), .in_peak(s_peak),
                     .out_valid(e_valid), .out_env(env));
  iir_biquad  u_flt (.clk, .rst_n, .b0(16'sd329), .b1(16'sd658), .b2(16'sd329), .a1(16'sd25576), .a2(-16'sd10508),
                     .in_valid(e_valid), .in_x(env), .out_valid(y_valid), .out_y(y));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic real pos(input real t);
    return 0.8 * $sin(2.0 * PI * FM * t);
  endfunction

  // LVDT + ideal ADC: sample the secondary one cycle after each peak strobe
  always @(posedge clk) begin
    s_valid <= pos_peak | neg_peak;
    if (pos_peak | neg_peak) begin
      real v;
      v = pos($realtime * 1.0e-9) * ((real'(dac_data) - 2047.5) / 2047.5) * 511.0;
      s_sample <= 10'($rtoi(v < 0 ? v - 0.5 : v + 0.5));
      s_peak   <= pos_peak ? PEAK_POS : PEAK_NEG;
    end
  end

  int n_out = 0, n_pos = 0, n_neg = 0, n_cross = 0, worst = 0;
  logic signed [9:0] prev_y = '0;
  always @(posedge clk) if (y_valid && rst_n) begin
    real t, want, d;
    n_out++;
    t = $realtime * 1.0e-9;
    if (t > 5.0e-3) begin
      want = pos(t - DELAY_S) * 511.0;
      d = y - want;
      if (d < 0) d = -d;
      if (int'(d) > worst) worst = int'(d);
      check(d < 8.0, $sformatf("t = %f ms: y %0d, want %f", t * 1e3, y, want));
      if (y > 300) n_pos++;
      if (y < -300) n_neg++;
      if ((y >= 0) != (prev_y >= 0)) n_cross++;
    end
    prev_y = y;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_sample = '0; s_peak = PEAK_POS;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #45ms;
    $display("%0d filtered samples, worst error %0d LSB, %0d zero crossings", n_out, worst, n_cross);
    // 20 kS/s for 45 ms
    check(n_out > 880 && n_out < 920, $sformatf("%0d samples in 45 ms, want 900", n_out));
    check(n_pos > 50 && n_neg > 50, "envelope reaches both signs");
    check(n_cross >= 3 && n_cross <= 6, "envelope crosses zero every 10 ms (4 times from 5 to 45 ms)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
