// lvdt_pkg: types and constants shared by the LVDT signal conditioner.
//
// The configuration register map is this design's own choice: the supervisory
// host writes a 24-bit value to an 8-bit address over the UART (see
// config_regs, which also holds the reset values).
package lvdt_pkg;

  // Register addresses of the supervisory interface.
  typedef enum logic [7:0] {
    REG_FREQ_SEL  = 8'h00,  // [3:0] excitation frequency select
    REG_B0        = 8'h01,  // filter coefficients, signed Q2.14 in [15:0]
    REG_B1        = 8'h02,
    REG_B2        = 8'h03,
    REG_A1        = 8'h04,
    REG_A2        = 8'h05,
    REG_KP        = 8'h06,  // controller gains, signed in [15:0]
    REG_KI        = 8'h07,
    REG_SETPOINT  = 8'h08,  // controller set point, signed in [15:0]
    REG_CTRL_EN   = 8'h09,  // [0] closed loop enable
    REG_DEC_INT   = 8'h0A,  // decimation interval in master-clock cycles
    REG_BAUD_DIV  = 8'h0B,  // master-clock cycles per UART bit
    REG_MOTOR_DIV = 8'h0C,  // excitation samples per motor drive step
    REG_DAQ_INT   = 8'h0D   // master-clock cycles between health conversions
  } reg_addr_e;

  // All configuration that the register file hands to the datapath.
  typedef struct packed {
    logic [3:0]         freq_sel;
    logic signed [15:0] b0, b1, b2, a1, a2;
    logic signed [15:0] kp, ki;
    logic signed [15:0] setpoint;
    logic               ctrl_en;
    logic [23:0]        dec_interval;
    logic [15:0]        baud_div;
    logic [15:0]        motor_div;
    logic [23:0]        daq_interval;
  } cfg_t;

  // Which carrier peak a sensor sample was taken at.
  typedef enum logic {PEAK_POS = 1'b0, PEAK_NEG = 1'b1} peak_e;

endpackage
