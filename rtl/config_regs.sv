// config_regs: supervisory command decoder and configuration registers.
//
// The external processor tunes the conditioner over the UART: excitation
// frequency, filter coefficients, control loop constants, output rate and baud
// rate. Commands are five-byte frames (this design's own format):
//     0x5A, address, data[23:16], data[15:8], data[7:0]
// A byte other than 0x5A where a frame must begin is skipped, and a frame left
// incomplete for GAP_CYC cycles is abandoned, so the decoder resynchronises by
// itself. A write to an unknown address is counted as an error and otherwise
// ignored. Register addresses are in lvdt_pkg. The reset values put the
// conditioner in a usable state straight away: 10 kHz excitation, a
// second-order Butterworth low-pass at 1 kHz for the 20 kHz demodulated sample
// rate, closed loop off, 50 Hz output rate (one packet every 20 ms) and
// 19.2 kbit/s, all for a 16 MHz master clock.
//
// The registers also have a combinational read port (`rd_addr` -> `rd_data`)
// so that the transmitter can echo the constants in its packets.
//
// Timing: the register changes, and `wr_pulse` fires, the cycle after the last
// byte of a frame is received.
module config_regs
  import lvdt_pkg::*;
#(
  parameter int unsigned GAP_CYC = 100_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  output cfg_t        cfg,
  output logic        wr_pulse,
  output logic        bad_addr,
  input  logic [7:0]  rd_addr,
  output logic [23:0] rd_data
);

  localparam logic [7:0] SYNC = 8'h5A;

  // Reset values (16 MHz master clock).
  localparam logic [23:0] DEF_FREQ_SEL  = 24'd0;       // 10 kHz
  localparam logic [23:0] DEF_B0        = 24'd329;     // Butterworth, fc = 1 kHz at fs = 20 kHz
  localparam logic [23:0] DEF_B1        = 24'd658;
  localparam logic [23:0] DEF_B2        = 24'd329;
  localparam logic [23:0] DEF_A1        = 24'd25576;
  localparam logic [23:0] DEF_A2        = 24'hFFD6F4;  // -10508
  localparam logic [23:0] DEF_KP        = 24'd0;
  localparam logic [23:0] DEF_KI        = 24'd0;
  localparam logic [23:0] DEF_SETPOINT  = 24'd0;
  localparam logic [23:0] DEF_CTRL_EN   = 24'd0;
  localparam logic [23:0] DEF_DEC_INT   = 24'd320000;  // 50 Hz
  localparam logic [23:0] DEF_BAUD_DIV  = 24'd833;     // 19.2 kbit/s
  localparam logic [23:0] DEF_MOTOR_DIV = 24'd64;      // one step per carrier period
  localparam logic [23:0] DEF_DAQ_INT   = 24'd1000;    // 16 kHz aggregate health rate

  logic [2:0]  nbyte;      // bytes of the current frame already received
  logic [7:0]  addr;
  logic [15:0] dhi;
  logic [$clog2(GAP_CYC+1)-1:0] gap;
  logic [23:0] wdata;

  always_comb wdata = {dhi, rx_data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbyte    <= '0;
      addr     <= '0;
      dhi      <= '0;
      gap      <= '0;
      wr_pulse <= 1'b0;
      bad_addr <= 1'b0;
      cfg.freq_sel     <= DEF_FREQ_SEL[3:0];
      cfg.b0           <= DEF_B0[15:0];
      cfg.b1           <= DEF_B1[15:0];
      cfg.b2           <= DEF_B2[15:0];
      cfg.a1           <= DEF_A1[15:0];
      cfg.a2           <= DEF_A2[15:0];
      cfg.kp           <= DEF_KP[15:0];
      cfg.ki           <= DEF_KI[15:0];
      cfg.setpoint     <= DEF_SETPOINT[15:0];
      cfg.ctrl_en      <= DEF_CTRL_EN[0];
      cfg.dec_interval <= DEF_DEC_INT;
      cfg.baud_div     <= DEF_BAUD_DIV[15:0];
      cfg.motor_div    <= DEF_MOTOR_DIV[15:0];
      cfg.daq_interval <= DEF_DAQ_INT;
    end else begin
      wr_pulse <= 1'b0;
      bad_addr <= 1'b0;
      if (rx_valid) begin
        gap <= '0;
        case (nbyte)
          3'd0: if (rx_data == SYNC) nbyte <= 3'd1;
          3'd1: begin addr <= rx_data; nbyte <= 3'd2; end
          3'd2: begin dhi[15:8] <= rx_data; nbyte <= 3'd3; end
          3'd3: begin dhi[7:0]  <= rx_data; nbyte <= 3'd4; end
          default: begin
            nbyte    <= 3'd0;
            wr_pulse <= 1'b1;
            case (addr)
              REG_FREQ_SEL:  cfg.freq_sel     <= wdata[3:0];
              REG_B0:        cfg.b0           <= wdata[15:0];
              REG_B1:        cfg.b1           <= wdata[15:0];
              REG_B2:        cfg.b2           <= wdata[15:0];
              REG_A1:        cfg.a1           <= wdata[15:0];
              REG_A2:        cfg.a2           <= wdata[15:0];
              REG_KP:        cfg.kp           <= wdata[15:0];
              REG_KI:        cfg.ki           <= wdata[15:0];
              REG_SETPOINT:  cfg.setpoint     <= wdata[15:0];
              REG_CTRL_EN:   cfg.ctrl_en      <= wdata[0];
              REG_DEC_INT:   cfg.dec_interval <= wdata;
              REG_BAUD_DIV:  cfg.baud_div     <= wdata[15:0];
              REG_MOTOR_DIV: cfg.motor_div    <= wdata[15:0];
              REG_DAQ_INT:   cfg.daq_interval <= wdata;
              default: begin
                wr_pulse <= 1'b0;
                bad_addr <= 1'b1;
              end
            endcase
          end
        endcase
      end else if (nbyte != 3'd0) begin
        if (gap >= GAP_CYC[$bits(gap)-1:0]) begin
          nbyte <= 3'd0;
          gap   <= '0;
        end else begin
          gap <= gap + 1'b1;
        end
      end
    end
  end

  // Read-back port: register values as 24-bit words, signed fields sign-extended.
  always_comb begin
    case (rd_addr)
      REG_FREQ_SEL:  rd_data = {20'd0, cfg.freq_sel};
      REG_B0:        rd_data = 24'(cfg.b0);
      REG_B1:        rd_data = 24'(cfg.b1);
      REG_B2:        rd_data = 24'(cfg.b2);
      REG_A1:        rd_data = 24'(cfg.a1);
      REG_A2:        rd_data = 24'(cfg.a2);
      REG_KP:        rd_data = 24'(cfg.kp);
      REG_KI:        rd_data = 24'(cfg.ki);
      REG_SETPOINT:  rd_data = 24'(cfg.setpoint);
      REG_CTRL_EN:   rd_data = {23'd0, cfg.ctrl_en};
      REG_DEC_INT:   rd_data = cfg.dec_interval;
      REG_BAUD_DIV:  rd_data = {8'd0, cfg.baud_div};
      REG_MOTOR_DIV: rd_data = {8'd0, cfg.motor_div};
      REG_DAQ_INT:   rd_data = cfg.daq_interval;
      default:       rd_data = '0;
    endcase
  end

endmodule
