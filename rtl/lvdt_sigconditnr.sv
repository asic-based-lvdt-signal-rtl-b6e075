// lvdt_sigconditnr: digital LVDT signal conditioner, top level.
//
// The chip excites the LVDT primary with a sine it synthesises itself, samples
// the secondary with an external ADC exactly at the carrier peaks, and turns
// those samples into a position measurement:
//
//   dds_wavegen --sine--> excitation DAC (db_po_dac / wr_po_dac)
//        | peak strobes
//   timing_ctrl --start--> adc_serial_if (sensor ADC) --> sync_demod
//        --> iir_biquad --> loop_ctrl --> control DAC (torque generator)
//                     \--> decimator --> packetizer --> uart_tx --> sout
//   timing_ctrl --mux/start--> anlg_daq (16 health channels) --> packetizer
//   sin --> uart_rx --> config_regs --> every block's tuning constants
//   dds sample strobe --> motor_3ph --> three-phase motor drive
//
// The partition (DDS waveform generation, sensor processing with its
// demodulator, filter and loop control, decimation and timing, analog data
// acquisition, UART controller) follows the document's block diagrams; the
// external parts (LVDT, ADCs, DACs, multiplexer, processor) are outside and
// reached through the ports below. The status byte of each packet reports,
// since the previous packet: bit 0 loop enabled, bit 1 an ADC read timed out,
// bit 2 a command had an unknown address, bit 3 a UART framing error, bit 4 a
// packet was dropped because the previous one was still being sent.
//
// Clocking: a single master clock (CLK_HZ, 16 MHz) and an active-low
// asynchronous reset. The ADC serial inputs and `sin` are synchronised
// inside.
module lvdt_sigconditnr
  import lvdt_pkg::*;
#(
  parameter int unsigned CLK_HZ = 16_000_000,
  parameter int unsigned ADC_W  = 10,
  parameter int unsigned DAQ_W  = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // LVDT secondary ADC
  output logic        cs_adc,
  output logic        soc_adc,
  output logic        rd_adc,
  input  logic        sclk_adc,
  input  logic        sdata_adc,
  input  logic        strb_adc,
  // excitation DAC (LVDT primary)
  output logic [11:0] db_po_dac,
  output logic        wr_po_dac,
  // closed loop control DAC (torque generator)
  output logic [11:0] ctl_dac,
  output logic        wr_ctl_dac,
  // core drive motor
  output logic [2:0]  motor_abc,
  // health monitoring multiplexer and ADC
  output logic [3:0]  mx_addr,
  output logic        mux_en,
  output logic        cs_daq,
  output logic        soc_daq,
  output logic        rd_daq,
  input  logic        sclk_daq,
  input  logic        sdata_daq,
  input  logic        strb_daq,
  // supervisory UART
  input  logic        sin,
  output logic        sout
);

  localparam int unsigned Y_W = 10;

  // Configuration.
  cfg_t        cfg;
  logic        rx_valid, frame_err, bad_addr;
  logic [7:0]  rx_data, reg_addr;
  logic [23:0] reg_data;

  uart_rx u_rx (
    .clk, .rst_n, .baud_div(cfg.baud_div), .sin,
    .rx_valid, .rx_data, .frame_err
  );

  config_regs u_cfg (
    .clk, .rst_n, .rx_valid, .rx_data, .cfg, .wr_pulse(), .bad_addr,
    .rd_addr(reg_addr), .rd_data(reg_data)
  );

  // Excitation and motor drive.
  logic       pos_peak, neg_peak;

  dds_wavegen #(.CLK_HZ(CLK_HZ)) u_dds (
    .clk, .rst_n, .freq_sel(cfg.freq_sel),
    .dac_data(db_po_dac), .dac_wr(wr_po_dac), .phase(), .pos_peak, .neg_peak
  );

  motor_3ph u_motor (
    .clk, .rst_n, .tick(wr_po_dac), .motor_div(cfg.motor_div), .phase_abc(motor_abc)
  );

  // Timing.
  logic  sens_start, dec_pulse, daq_start;
  peak_e sens_peak;

  timing_ctrl u_timing (
    .clk, .rst_n, .pos_peak, .neg_peak,
    .dec_interval(cfg.dec_interval), .daq_interval(cfg.daq_interval),
    .sens_start, .sens_peak, .dec_pulse, .mx_addr, .mux_en, .daq_start
  );

  // Sensor processing: ADC, demodulation, filter, loop control, decimation.
  logic             sens_busy, sens_dv, sens_to;
  logic [ADC_W-1:0] sens_data;
  peak_e            conv_peak;

  adc_serial_if #(.W(ADC_W)) u_sens_adc (
    .clk, .rst_n, .start(sens_start), .busy(sens_busy),
    .adc_cs(cs_adc), .adc_soc(soc_adc), .adc_rd(rd_adc),
    .adc_sclk(sclk_adc), .adc_sdata(sdata_adc), .adc_strb(strb_adc),
    .data_valid(sens_dv), .data(sens_data), .timeout(sens_to)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       conv_peak <= PEAK_POS;
    else if (sens_start && !sens_busy) conv_peak <= sens_peak;
  end

  logic                    env_valid, filt_valid, dec_valid;
  logic signed [ADC_W:0]   env;
  logic signed [Y_W-1:0]   filt_y, filt_last;
  logic signed [23:0]      dec_sum;
  logic [15:0]             dec_count;

  sync_demod #(.ADC_W(ADC_W)) u_demod (
    .clk, .rst_n, .in_valid(sens_dv), .in_sample(sens_data), .in_peak(conv_peak),
    .out_valid(env_valid), .out_env(env)
  );

  iir_biquad #(.X_W(ADC_W + 1), .Y_W(Y_W)) u_filter (
    .clk, .rst_n, .b0(cfg.b0), .b1(cfg.b1), .b2(cfg.b2), .a1(cfg.a1), .a2(cfg.a2),
    .in_valid(env_valid), .in_x(env), .out_valid(filt_valid), .out_y(filt_y)
  );

  loop_ctrl #(.Y_W(Y_W)) u_ctrl (
    .clk, .rst_n, .enable(cfg.ctrl_en), .setpoint(cfg.setpoint), .kp(cfg.kp), .ki(cfg.ki),
    .in_valid(filt_valid), .in_y(filt_y), .dac_data(ctl_dac), .dac_wr(wr_ctl_dac)
  );

  decimator #(.Y_W(Y_W)) u_dec (
    .clk, .rst_n, .in_valid(filt_valid), .in_y(filt_y), .dec_pulse,
    .out_valid(dec_valid), .out_sum(dec_sum), .out_count(dec_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          filt_last <= '0;
    else if (filt_valid) filt_last <= filt_y;
  end

  // Health monitoring.
  logic [DAQ_W-1:0] ch_data [16];
  logic             daq_to;
  logic [3:0]       hl_idx;

  anlg_daq #(.W(DAQ_W)) u_daq (
    .clk, .rst_n, .start(daq_start), .mx_addr,
    .adc_cs(cs_daq), .adc_soc(soc_daq), .adc_rd(rd_daq),
    .adc_sclk(sclk_daq), .adc_sdata(sdata_daq), .adc_strb(strb_daq),
    .ch_data, .sample_valid(), .sample_ch(), .timeout(daq_to)
  );

  // Telemetry: status flags collected since the previous packet.
  logic [2:0] flags;
  logic       overrun_seen;
  logic [7:0] status;
  logic       tx_valid, tx_ready, pk_busy, overrun;
  logic [7:0] tx_data;

  always_comb status = {3'd0, overrun_seen, flags, cfg.ctrl_en};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags        <= '0;
      overrun_seen <= 1'b0;
    end else if (dec_valid && !pk_busy) begin
      flags        <= '0;
      overrun_seen <= 1'b0;
    end else begin
      if (sens_to || daq_to) flags[0] <= 1'b1;
      if (bad_addr)          flags[1] <= 1'b1;
      if (frame_err)         flags[2] <= 1'b1;
      if (overrun)           overrun_seen <= 1'b1;
    end
  end

  packetizer #(.Y_W(Y_W), .H_W(DAQ_W)) u_pkt (
    .clk, .rst_n, .trigger(dec_valid), .dec_sum, .dec_count, .filt_y(filt_last),
    .hl_idx, .hl_data(ch_data[hl_idx]), .reg_addr, .reg_data, .status,
    .tx_valid, .tx_data, .tx_ready, .busy(pk_busy), .overrun
  );

  uart_tx u_tx (
    .clk, .rst_n, .baud_div(cfg.baud_div), .tx_valid, .tx_data, .tx_ready, .sout
  );

endmodule
