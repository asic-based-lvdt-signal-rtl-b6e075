// tb_timing_ctrl: checks the timing and hardware-interface pulses.
// Peak strobes must start a sensor conversion one cycle later with the right
// peak tag; the decimation pulse must come every dec_interval cycles; the
// health sequencer must visit channels 0..15 in order, one every daq_interval
// cycles, starting each conversion SETTLE cycles after the address changes.
module tb_timing_ctrl;
  import lvdt_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        pos_peak = 1'b0, neg_peak = 1'b0;
  logic [23:0] dec_interval, daq_interval;
  logic        sens_start, dec_pulse, mux_en, daq_start;
  peak_e       sens_peak;
  logic [3:0]  mx_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  timing_ctrl #(.SETTLE(16)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decimation and health checkers
  int last_dec = -1, ndec = 0, last_addr_chg = -1, last_daq = -1, ndaq = 0, cyc = 0;
  logic [3:0] prev_addr;
  logic [3:0] expect_ch = 4'd0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dec_pulse) begin
      if (last_dec >= 0) check(cyc - last_dec == int'(dec_interval), $sformatf("decimation spacing %0d", cyc - last_dec));
      last_dec = cyc; ndec++;
    end
    if (mx_addr != prev_addr) begin
      check(mx_addr == expect_ch, $sformatf("channel %0d, want %0d", mx_addr, expect_ch));
      expect_ch = expect_ch + 4'd1;
      if (last_addr_chg >= 0) check(cyc - last_addr_chg == int'(daq_interval), "health interval");
      last_addr_chg = cyc;
    end
    if (daq_start) begin
      check(cyc - last_addr_chg == 16, $sformatf("settle delay %0d", cyc - last_addr_chg));
      check(mux_en, "multiplexer enabled");
      ndaq++;
    end
    prev_addr = mx_addr;
  end

  initial begin
    dec_interval = 24'd777; daq_interval = 24'd100;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    prev_addr = 4'hF;
    for (int i = 0; i < 40; i++) begin
      peak_e p;
      p = peak_e'(i % 2);
      repeat (30) @(negedge clk);
      if (p == PEAK_POS) pos_peak = 1'b1; else neg_peak = 1'b1;
      @(negedge clk);
      pos_peak = 1'b0; neg_peak = 1'b0;
      check(sens_start, "sensor start one cycle after the peak");
      check(sens_peak == p, "peak tag");
      @(negedge clk);
      check(!sens_start, "sensor start is one pulse");
    end
    repeat (4000) @(negedge clk);
    check(ndec >= 6, $sformatf("%0d decimation pulses", ndec));
    check(ndaq >= 50, $sformatf("%0d health conversions", ndaq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
