// tb_adc_serial_if: checks the ADC control and serial capture.
// A behavioural serial ADC converts random words; each must come back intact,
// with cs framing the transfer, soc pulsed SOC_CYC cycles, rd held until the
// word completes. A run with the ADC silent must end in a timeout.
module tb_adc_serial_if;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start = 1'b0;
  logic       busy, adc_cs, adc_soc, adc_rd, adc_sclk, adc_sdata, adc_strb;
  logic       data_valid, timeout;
  logic [9:0] data, vin;
  logic       mute = 1'b0;
  logic       strb_m, sclk_m, sdata_m;
  int         words;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial_adc_model #(.W(10), .SCLK_NS(200.0), .CONV_NS(300.0)) u_adc (
    .cs(adc_cs), .soc(adc_soc & ~mute), .rd(adc_rd), .vin,
    .sclk(sclk_m), .sdata(sdata_m), .strb(strb_m), .words
  );
  always_comb begin
    adc_sclk = sclk_m; adc_sdata = sdata_m; adc_strb = strb_m;
  end

  adc_serial_if #(.W(10), .SOC_CYC(4), .TIMEOUT(2000)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int soc_len = 0, soc_runs = 0;
  always @(posedge clk) if (rst_n) begin
    if (adc_soc) soc_len++;
    else if (soc_len != 0) begin
      check(soc_len == 4, $sformatf("soc width %0d", soc_len));
      soc_len = 0; soc_runs++;
    end
    if (adc_soc || adc_rd) check(adc_cs, "cs framing soc and rd");
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vin = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      logic [9:0] v;
      v = 10'($urandom);
      vin = v;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      check(busy && adc_cs, "busy after start");
      @(posedge clk iff (data_valid || timeout));
      check(data_valid && !timeout, "word received");
      check(data == v, $sformatf("data %h, want %h", data, v));
      @(negedge clk);
      check(!adc_cs && !adc_rd && !busy, "cs and rd released");
      vin = 10'($urandom);        // input moves after the sampling instant
      repeat ($urandom_range(20)) @(negedge clk);
    end
    check(words == 40, "one transfer per start");
    // silent ADC: no word, timeout after TIMEOUT cycles
    mute = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    begin
      int n = 0;
      while (!(timeout || data_valid)) begin @(posedge clk); n++; end
      check(timeout && !data_valid, "timeout when the ADC stays silent");
      check(n > 2000 && n < 2100, $sformatf("timeout after %0d cycles", n));
    end
    check(soc_runs == 41, "one soc pulse per start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
