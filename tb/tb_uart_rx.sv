// tb_uart_rx: checks the UART receiver.
// Random bytes are sent at two baud divisors, with the transmitter's bit time
// off by +-2 % to test mid-bit sampling; a frame with a low stop bit must be
// flagged and dropped; a short glitch must not start a frame.
module tb_uart_rx;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] baud_div;
  logic        sin = 1'b1;
  logic        rx_valid, frame_err;
  logic [7:0]  rx_data;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr = 0;
  logic [7:0] last;

  always #5 clk = ~clk;

  uart_rx dut (.*);

  always @(posedge clk) begin
    if (rx_valid) begin nvalid++; last = rx_data; end
    if (frame_err) nerr++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input logic [7:0] b, input real bit_ns, input logic stop);
    sin = 1'b0; #(bit_ns);
    for (int i = 0; i < 8; i++) begin sin = b[i]; #(bit_ns); end
    sin = stop; #(bit_ns);
    sin = 1'b1; #(bit_ns);
  endtask

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int divs[2] = '{833, 20};
    real skew[3] = '{1.0, 0.98, 1.02};
    baud_div = 16'd833;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #100;
    foreach (divs[k]) begin
      baud_div = 16'(divs[k]);
      foreach (skew[s]) for (int n = 0; n < 6; n++) begin
        logic [7:0] v;
        int n_prev;
        v = 8'($urandom);
        n_prev = nvalid;
        send(v, divs[k] * 10.0 * skew[s], 1'b1);
        check(nvalid == n_prev + 1, "one byte per frame");
        check(last == v, $sformatf("byte %h, want %h", last, v));
      end
      begin
        int n_prev; n_prev = nvalid;
        send(8'h55, divs[k] * 10.0, 1'b0);   // framing error
        #(divs[k] * 20.0);
        check(nvalid == n_prev, "bad frame dropped");
        check(nerr == k + 1, "framing error flagged");
      end
    end
    begin
      int n_prev; n_prev = nvalid;
      baud_div = 16'd833;
      sin = 1'b0; #(100); sin = 1'b1;          // 10-cycle glitch
      #(833 * 10 * 12);
      check(nvalid == n_prev, "glitch ignored");
      send(8'hC3, 8330.0, 1'b1);
      check(last == 8'hC3, "receives after a glitch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
