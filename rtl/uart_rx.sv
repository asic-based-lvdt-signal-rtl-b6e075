// uart_rx: UART receiver for the supervisory inputs.
//
// Receives 8N1 frames (start bit, eight data bits LSB first, stop bit) at the
// same run-time selectable rate as the transmitter: `baud_div` master-clock
// cycles per bit. The line passes a two-flop synchroniser; a falling edge
// starts a frame, the start bit is re-checked half a bit later, and every
// further bit is sampled in the middle of its cell. A byte whose stop bit is
// low is dropped and flagged on `frame_err`. The frame format and sampling
// scheme are this design's choices; the receiver itself follows the document.
//
// Timing: `rx_valid` pulses for one cycle with `rx_data` in the middle of the
// stop bit.
module uart_rx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] baud_div,
  input  logic        sin,
  output logic        rx_valid,
  output logic [7:0]  rx_data,
  output logic        frame_err
);

  logic [2:0]  s;
  logic [15:0] bcnt, div;
  logic [3:0]  bitn;      // 0 = start, 1..8 = data, 9 = stop
  logic [7:0]  sh;
  logic        active;
  logic        line;

  always_comb begin
    div  = (baud_div < 16'd2) ? 16'd2 : baud_div;
    line = s[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s         <= '1;
      active    <= 1'b0;
      bcnt      <= '0;
      bitn      <= '0;
      sh        <= '0;
      rx_valid  <= 1'b0;
      rx_data   <= '0;
      frame_err <= 1'b0;
    end else begin
      s         <= {s[1:0], sin};
      rx_valid  <= 1'b0;
      frame_err <= 1'b0;
      if (!active) begin
        if (s[2] && !s[1]) begin          // falling edge: start bit begins
          active <= 1'b1;
          bcnt   <= '0;
          bitn   <= '0;
        end
      end else begin
        // Sample at half a bit for the start bit, then one bit later each time.
        if (bcnt + 16'd1 >= ((bitn == 4'd0) ? (div >> 1) : div)) begin
          bcnt <= '0;
          if (bitn == 4'd0) begin
            if (line) active <= 1'b0;      // glitch, not a start bit
            else      bitn   <= 4'd1;
          end else if (bitn == 4'd9) begin
            active <= 1'b0;
            if (line) begin
              rx_valid <= 1'b1;
              rx_data  <= sh;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            sh   <= {line, sh[7:1]};
            bitn <= bitn + 4'd1;
          end
        end else begin
          bcnt <= bcnt + 16'd1;
        end
      end
    end
  end

endmodule
