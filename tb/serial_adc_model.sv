// serial_adc_model: behavioural model of an external serial ADC (testbench only).
//
// Not synthesizable. It stands in for the converter chips in front of the
// signal conditioner: on a rising `soc` while `cs` is high it samples the
// signed value `vin` (already quantised by the caller), waits CONV_NS, then,
// once `rd` is high, frames W bits MSB first with `strb`, changing `sdata` on
// the falling edge of a free-running `sclk` so that the receiver can take
// each bit on the rising edge. `words` counts completed transfers.
module serial_adc_model #(
  parameter int  W        = 10,
  parameter real SCLK_NS  = 200.0,
  parameter real CONV_NS  = 500.0
) (
  input  logic          cs,
  input  logic          soc,
  input  logic          rd,
  input  logic [W-1:0]  vin,
  output logic          sclk,
  output logic          sdata,
  output logic          strb,
  output int            words
);

  logic [W-1:0] held;

  initial begin
    sclk  = 1'b0;
    sdata = 1'b0;
    strb  = 1'b0;
    words = 0;
    held  = '0;
    forever #(SCLK_NS / 2.0) sclk = ~sclk;
  end

  always @(posedge soc) begin
    if (cs) begin
      held = vin;
      #(CONV_NS);
      wait (rd);
      @(negedge sclk);
      strb = 1'b1;
      for (int i = W - 1; i >= 0; i--) begin
        sdata = held[i];
        @(negedge sclk);
      end
      strb  = 1'b0;
      words = words + 1;
    end
  end

endmodule
