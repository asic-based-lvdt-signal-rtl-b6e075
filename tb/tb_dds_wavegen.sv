// tb_dds_wavegen: checks the excitation synthesiser.
// For several frequency selects it measures the sample spacing against
// N = round(16 MHz / (64 * f)), f = 10 kHz + sel * 10 kHz / 15, compares every
// DAC word of a full period with a sine computed here in floating point, and
// checks that the peak strobes come with the +1 and -1 samples.
module tb_dds_wavegen;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [3:0]  freq_sel;
  logic [11:0] dac_data;
  logic        dac_wr, pos_peak, neg_peak;
  logic [5:0]  phase;
  int checks = 0, failures = 0;

  always #31.25 clk = ~clk;   // 16 MHz

  dds_wavegen dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int expected_sample(input int k);
    real q;
    q = 2047.5 * $sin(2.0 * 3.14159265358979 * k / 64.0);
    if (q < 0) q = -q;
    return (k < 32) ? 2048 + int'($floor(q)) : 2047 - int'($floor(q));
  endfunction

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sels[5] = '{0, 1, 7, 14, 15};
    freq_sel = 4'd0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (sels[s]) begin
      int n_exp, last, nwr, npos, nneg;
      real f;
      freq_sel = 4'(sels[s]);
      f = 10000.0 + sels[s] * 10000.0 / 15.0;
      n_exp = int'($floor(16.0e6 / (64.0 * f) + 0.5));
      // let the new select take effect
      repeat (2) @(posedge clk iff dac_wr);
      // wait for sample 0 of a period
      do @(posedge clk); while (!(dac_wr && phase == 6'd0));
      last = 0; nwr = 0; npos = 0; nneg = 0;
      for (int c = 1; nwr < 64; c++) begin
        @(posedge clk);
        if (pos_peak) begin npos++; check(dac_data == 12'd4095, "positive peak strobe not at 4095"); end
        if (neg_peak) begin nneg++; check(dac_data == 12'd0, "negative peak strobe not at 0"); end
        if (dac_wr) begin
          nwr++;
          check(c - last == n_exp, $sformatf("sel %0d spacing %0d, want %0d", sels[s], c - last, n_exp));
          last = c;
          check(phase == 6'(nwr), "phase index");
          check(int'(dac_data) == expected_sample(nwr % 64),
                $sformatf("sample %0d = %0d, want %0d", nwr % 64, dac_data, expected_sample(nwr % 64)));
        end
      end
      check(npos == 1 && nneg == 1, "one positive and one negative peak per period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
