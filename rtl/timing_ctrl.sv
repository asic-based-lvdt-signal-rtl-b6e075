// timing_ctrl: timing and hardware-interface pulses of the sensor processing.
//
// Three independent jobs, all named by the document:
//  * Sensor sampling. Each carrier-peak strobe from the DDS starts one sensor
//    ADC conversion (`sens_start`) and records which peak it was
//    (`sens_peak`), which the demodulator needs to decide the sign.
//  * Decimation interval. A free-running counter pulses `dec_pulse` once every
//    `dec_interval` master-clock cycles (320000 cycles = 50 Hz at 16 MHz).
//  * Health multiplexer. Every `daq_interval` cycles the next of the 16
//    channels is put on the external multiplexer address `mx_addr`; SETTLE
//    cycles later, once the analog path has settled, `daq_start` starts the
//    health ADC. `mux_en` enables the multiplexer from the first cycle after
//    reset on.
// Intervals of 0 or 1 give a pulse every cycle (decimation) or are treated as
// SETTLE+2 (health) so the sequencer cannot stall. Counter widths, the settle
// delay and the round-robin channel order are this design's choices.
//
// All outputs are registered; the pulses are one cycle wide.
module timing_ctrl
  import lvdt_pkg::*;
#(
  parameter int unsigned SETTLE = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pos_peak,
  input  logic        neg_peak,
  input  logic [23:0] dec_interval,
  input  logic [23:0] daq_interval,
  output logic        sens_start,
  output peak_e       sens_peak,
  output logic        dec_pulse,
  output logic [3:0]  mx_addr,
  output logic        mux_en,
  output logic        daq_start
);

  logic [23:0] dec_cnt, daq_cnt, daq_len;

  always_comb daq_len = (daq_interval < 24'(SETTLE + 2)) ? 24'(SETTLE + 2) : daq_interval;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sens_start <= 1'b0;
      sens_peak  <= PEAK_POS;
      dec_pulse  <= 1'b0;
      dec_cnt    <= '0;
      daq_cnt    <= '0;
      mx_addr    <= '1;     // the first interval selects channel 0
      mux_en     <= 1'b0;
      daq_start  <= 1'b0;
    end else begin
      // Sensor ADC at the carrier peaks.
      sens_start <= pos_peak | neg_peak;
      if (pos_peak)      sens_peak <= PEAK_POS;
      else if (neg_peak) sens_peak <= PEAK_NEG;

      // Decimation interval.
      if (dec_cnt + 24'd1 >= dec_interval) begin
        dec_cnt   <= '0;
        dec_pulse <= 1'b1;
      end else begin
        dec_cnt   <= dec_cnt + 24'd1;
        dec_pulse <= 1'b0;
      end

      // Health channel sequencing.
      mux_en    <= 1'b1;
      daq_start <= (daq_cnt == 24'(SETTLE));
      if (daq_cnt == 24'd0) mx_addr <= mx_addr + 4'd1;
      daq_cnt <= (daq_cnt + 24'd1 >= daq_len) ? '0 : daq_cnt + 24'd1;
    end
  end

endmodule
