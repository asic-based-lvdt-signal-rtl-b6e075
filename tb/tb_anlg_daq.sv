// tb_anlg_daq: checks the health data acquisition.
// A behavioural 16-channel multiplexer (a fixed random level per channel)
// feeds a behavioural serial ADC. The testbench plays the timing block:
// sets the address, starts a conversion, and moves the address on as soon as
// the conversion has started. Each channel register must end up with its own
// channel's level, for two rounds with different levels.
module tb_anlg_daq;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start = 1'b0;
  logic [3:0] mx_addr;
  logic       adc_cs, adc_soc, adc_rd, adc_sclk, adc_sdata, adc_strb;
  logic [9:0] ch_data [16];
  logic       sample_valid, timeout;
  logic [3:0] sample_ch;
  logic [9:0] level [16];
  int         words;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial_adc_model #(.W(10), .SCLK_NS(200.0), .CONV_NS(300.0)) u_adc (
    .cs(adc_cs), .soc(adc_soc), .rd(adc_rd), .vin(level[mx_addr]),
    .sclk(adc_sclk), .sdata(adc_sdata), .strb(adc_strb), .words
  );

  anlg_daq #(.W(10)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mx_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 2; round++) begin
      foreach (level[i]) level[i] = 10'($urandom);
      for (int c = 0; c < 16; c++) begin
        mx_addr = 4'(c);
        repeat (5) @(negedge clk);
        start = 1'b1;
        @(negedge clk) start = 1'b0;
        wait (adc_soc);
        #1;
        mx_addr = 4'(c + 1);           // next channel while this one is read
        @(posedge clk iff sample_valid);
        check(sample_ch == 4'(c), $sformatf("sample tagged %0d, want %0d", sample_ch, c));
        check(ch_data[c] == level[c], $sformatf("round %0d channel %0d: %0d, want %0d", round, c, ch_data[c], level[c]));
      end
      foreach (level[i]) check(ch_data[i] == level[i], $sformatf("final channel %0d", i));
    end
    check(!timeout, "no timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
