// sync_demod: synchronous (phase-sensitive) demodulation of the LVDT output.
//
// The LVDT secondary carries the core position as a double-sideband
// suppressed-carrier AM signal. Because the excitation is generated on chip,
// the sensor ADC is triggered exactly at the positive and negative carrier
// peaks, and demodulation reduces to multiplying each sample by the sign of
// the carrier there: a positive-peak sample passes unchanged, a negative-peak
// sample is inverted, and the stream of both interleaved is the envelope, i.e.
// the signed core displacement. This follows the document; the extra output
// bit that keeps the negation of the most negative code exact is this design's
// choice.
//
// Interface: `in_valid` with `in_sample` (two's complement ADC word) and
// `in_peak` (which carrier peak it was taken at). One cycle later `out_valid`
// pulses with `out_env`, ADC_W+1 bits signed.
module sync_demod
  import lvdt_pkg::*;
#(
  parameter int unsigned ADC_W = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ADC_W-1:0] in_sample,
  input  peak_e                   in_peak,
  output logic                    out_valid,
  output logic signed [ADC_W:0]   out_env
);

  logic signed [ADC_W:0] ext;
  always_comb ext = {in_sample[ADC_W-1], in_sample};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_env   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_env <= (in_peak == PEAK_POS) ? ext : -ext;
    end
  end

endmodule
