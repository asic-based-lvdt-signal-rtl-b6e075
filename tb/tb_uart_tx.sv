// tb_uart_tx: checks the UART transmitter.
// An independent receiver here samples the line in the middle of each bit
// cell, measured in clock cycles from the start-bit edge, and checks start
// bit, data, stop bit and the bit time for two baud divisors.
module tb_uart_tx;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] baud_div;
  logic        tx_valid = 1'b0;
  logic [7:0]  tx_data;
  logic        tx_ready, sout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart_tx dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic receive(output logic [7:0] b, output int frame_cycles);
    int d = int'(baud_div);
    @(negedge sout);
    @(posedge clk);
    repeat (d / 2) @(posedge clk);
    check(sout == 1'b0, "start bit");
    for (int i = 0; i < 8; i++) begin
      repeat (d) @(posedge clk);
      b[i] = sout;
    end
    repeat (d) @(posedge clk);
    check(sout == 1'b1, "stop bit");
    frame_cycles = 0;
    while (!tx_ready) begin @(posedge clk); frame_cycles++; end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] q [$];
  initial begin
    int divs[2] = '{833, 13};
    tx_data = '0;
    baud_div = 16'd833;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(sout == 1'b1, "line idles high");
    foreach (divs[k]) begin
      baud_div = 16'(divs[k]);
      for (int n = 0; n < 12; n++) begin
        logic [7:0] v, got;
        int rest;
        v = 8'($urandom);
        fork
          begin
            @(negedge clk);
            wait (tx_ready);
            @(negedge clk);
            tx_valid = 1'b1; tx_data = v;
            @(negedge clk);
            tx_valid = 1'b0;
            check(!tx_ready, "busy while sending");
          end
          receive(got, rest);
        join
        check(got == v, $sformatf("byte %h, want %h", got, v));
        // remaining time after mid-stop is about half a bit
        check(rest <= divs[k] / 2 + 3, $sformatf("frame length: %0d cycles after mid-stop", rest));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
