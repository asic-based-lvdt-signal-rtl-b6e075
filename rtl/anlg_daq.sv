// anlg_daq: 16-channel analog data acquisition for system health monitoring.
//
// Supply levels, temperature, reference voltages, carrier amplitude and the
// like reach the ASIC through an external 16-channel analog multiplexer and an
// ADC. The timing block chooses the channel (`mx_addr`) and starts each
// conversion (`start`); this block runs the ADC handshake through an
// adc_serial_if, remembers which channel the conversion belongs to, and files
// the result into that channel's register through a dmux16. The split into
// timing, ADC interface and demultiplexer is this design's choice; the block
// itself and its 16 channels follow the document.
//
// Timing: a channel register is updated one cycle after the ADC word
// completes; `sample_valid` / `sample_ch` pulse with that update.
module anlg_daq #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [3:0]   mx_addr,
  output logic         adc_cs,
  output logic         adc_soc,
  output logic         adc_rd,
  input  logic         adc_sclk,
  input  logic         adc_sdata,
  input  logic         adc_strb,
  output logic [W-1:0] ch_data [16],
  output logic         sample_valid,
  output logic [3:0]   sample_ch,
  output logic         timeout
);

  logic         busy, dv;
  logic [W-1:0] d;
  logic [3:0]   conv_ch;

  adc_serial_if #(.W(W)) u_adc (
    .clk, .rst_n, .start, .busy,
    .adc_cs, .adc_soc, .adc_rd, .adc_sclk, .adc_sdata, .adc_strb,
    .data_valid(dv), .data(d), .timeout
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conv_ch      <= '0;
      sample_valid <= 1'b0;
      sample_ch    <= '0;
    end else begin
      if (start && !busy) conv_ch <= mx_addr;
      sample_valid <= dv;
      if (dv) sample_ch <= conv_ch;
    end
  end

  dmux16 #(.W(W)) u_dmux (
    .clk, .rst_n, .wr(dv), .ch(conv_ch), .din(d), .ch_data
  );

endmodule
