// tb_iir_freq_response: frequency response of the biquad with its reset
// coefficients (1 kHz Butterworth low-pass at a 20 kHz sample rate).
// Sine inputs from 100 Hz to 8 kHz are run through the filter; after the
// transient the output amplitude must match |H(e^jw)| computed here from the
// coefficients, and the response must fall with frequency.
// Interface: drives iir_biquad directly at a 100 MHz tb clock, one input
// every 4 cycles. Follows the document: a biquad whose frequency response is
// measured by sweeping the input frequency. Own choice: the 1 kHz corner,
// the test frequencies and the tolerances.
module tb_iir_freq_response;
  logic               clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] b0 = 16'sd329, b1 = 16'sd658, b2 = 16'sd329, a1 = 16'sd25576, a2 = -16'sd10508;
  logic               in_valid = 1'b0;
  logic signed [10:0] in_x;
  logic               out_valid;
  logic signed [9:0]  out_y;
  int checks = 0, failures = 0;

  localparam real PI = 3.14159265358979;
  localparam real FS = 20000.0;

  always #5 clk = ~clk;

  iir_biquad dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // |H| with the filter's sign convention: denominator 1 - a1 z^-1 - a2 z^-2
  function automatic real gain(input real f);
    real w, nr, ni, dr, di, B0, B1, B2, A1, A2;
    B0 = b0 / 16384.0; B1 = b1 / 16384.0; B2 = b2 / 16384.0; A1 = a1 / 16384.0; A2 = a2 / 16384.0;
    w  = 2.0 * PI * f / FS;
    nr = B0 + B1 * $cos(w) + B2 * $cos(2.0 * w);
    ni = -B1 * $sin(w) - B2 * $sin(2.0 * w);
    dr = 1.0 - A1 * $cos(w) - A2 * $cos(2.0 * w);
    di = A1 * $sin(w) + A2 * $sin(2.0 * w);
    return $sqrt((nr * nr + ni * ni) / (dr * dr + di * di));
  endfunction

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real freqs[8] = '{100.0, 300.0, 600.0, 1000.0, 1500.0, 2500.0, 4000.0, 8000.0};
    real prev_amp = 1.0e9;
    in_x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (freqs[k]) begin
      int peak;
      real amp, want;
      peak = 0;
      for (int n = 0; n < 1200; n++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_x = 11'($rtoi($floor(400.0 * $sin(2.0 * PI * freqs[k] * n / FS) + 0.5)));
        @(negedge clk);
        in_valid = 1'b0;
        if (n >= 800 && (out_y > peak)) peak = out_y;
      end
      amp  = peak;
      want = 400.0 * gain(freqs[k]);
      $display("f = %6.0f Hz: amplitude %4.0f, |H| predicts %6.1f (%5.2f dB)", freqs[k], amp, want, 20.0 * $log10(gain(freqs[k])));
      check(amp > want * 0.97 - 5.0 && amp < want * 1.03 + 5.0, $sformatf("%0.0f Hz amplitude %0.0f, want %0.1f", freqs[k], amp, want));
      check(amp <= prev_amp + 2.0, "response falls with frequency");
      prev_amp = amp;
    end
    check(gain(1000.0) > 0.69 && gain(1000.0) < 0.73, "corner at 1 kHz (-3 dB)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
