// dmux16: 16-way demultiplexer of health-monitoring samples into channel registers.
//
// Each word converted by the health ADC belongs to the channel the external
// analog multiplexer was set to; on `wr` the word is stored in that channel's
// register, where it stays until the channel comes round again. All 16
// registers are outputs, so the packet builder can read any channel at any
// time. The document names a 16-channel block of this name; its insides are
// this design's choice. Registers clear on reset; a write shows on the output
// the cycle after `wr`.
module dmux16 #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr,
  input  logic [3:0]   ch,
  input  logic [W-1:0] din,
  output logic [W-1:0] ch_data [16]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) ch_data[i] <= '0;
    end else if (wr) begin
      ch_data[ch] <= din;
    end
  end

endmodule
