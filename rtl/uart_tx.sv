// uart_tx: UART transmitter with a run-time selectable baud rate.
//
// Sends one byte per handshake as 8N1: a low start bit, eight data bits LSB
// first, one high stop bit; the line idles high. Each bit lasts `baud_div`
// master-clock cycles (833 for 19.2 kbit/s at 16 MHz), so the operator selects
// the baud rate by writing that divisor. A selectable baud rate follows the
// document; the frame format and the divisor scheme are this design's choices.
//
// Handshake: the byte is taken in the cycle where `tx_valid` and `tx_ready`
// are both high; `tx_ready` is low until the stop bit has been sent. A divisor
// below 2 is treated as 2.
module uart_tx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] baud_div,
  input  logic        tx_valid,
  input  logic [7:0]  tx_data,
  output logic        tx_ready,
  output logic        sout
);

  logic [15:0] bcnt, div;
  logic [3:0]  bitn;        // 0 = start, 1..8 = data, 9 = stop
  logic [8:0]  sh;
  logic        active;

  always_comb begin
    div      = (baud_div < 16'd2) ? 16'd2 : baud_div;
    tx_ready = !active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      bcnt   <= '0;
      bitn   <= '0;
      sh     <= '1;
      sout   <= 1'b1;
    end else if (!active) begin
      sout <= 1'b1;
      if (tx_valid) begin
        active <= 1'b1;
        sh     <= {1'b1, tx_data};
        sout   <= 1'b0;                 // start bit
        bcnt   <= '0;
        bitn   <= '0;
      end
    end else if (bcnt + 16'd1 >= div) begin
      bcnt <= '0;
      if (bitn == 4'd9) begin
        active <= 1'b0;
        sout   <= 1'b1;
      end else begin
        bitn <= bitn + 4'd1;
        sout <= sh[0];
        sh   <= {1'b1, sh[8:1]};
      end
    end else begin
      bcnt <= bcnt + 16'd1;
    end
  end

  // The line is high whenever the transmitter is idle.
  a_idle_high: assert property (@(posedge clk) disable iff (!rst_n) !active |-> sout);

endmodule
