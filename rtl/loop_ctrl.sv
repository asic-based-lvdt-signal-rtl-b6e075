// loop_ctrl: closed loop controller for the LVDT core position.
//
// The document feeds the filtered displacement to a controller whose command,
// through a DAC, drives a torque generator that keeps the core inside its
// dynamic range, with tuning parameters loaded after calibration. The control
// law is not given; this design uses a proportional-integral law on the
// position error, which is the simplest that removes a steady offset:
//     e[n]   = setpoint - y[n]
//     I[n]   = I[n-1] + e[n]                 (saturating, I_W bits)
//     u[n]   = (kp*e[n] + ki*I[n]) >>> SHIFT
//     dac[n] = clamp(u[n] + 2^(DAC_W-1), 0, 2^DAC_W - 1)
// The DAC code is offset binary with mid-scale meaning zero torque. While
// `enable` is low the integrator is cleared and the DAC is written mid-scale,
// so switching the loop on starts from rest.
//
// Timing: one update per `in_valid`; `dac_data` and the one-cycle `dac_wr`
// strobe follow one cycle later.
module loop_ctrl #(
  parameter int unsigned Y_W   = 10,
  parameter int unsigned G_W   = 16,
  parameter int unsigned I_W   = 24,
  parameter int unsigned SHIFT = 8,
  parameter int unsigned DAC_W = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic signed [G_W-1:0] setpoint,
  input  logic signed [G_W-1:0] kp,
  input  logic signed [G_W-1:0] ki,
  input  logic                  in_valid,
  input  logic signed [Y_W-1:0] in_y,
  output logic [DAC_W-1:0]      dac_data,
  output logic                  dac_wr
);

  localparam int unsigned E_W = G_W + 2;
  localparam int unsigned U_W = G_W + I_W + 2;

  localparam logic signed [I_W:0] I_MAX = (I_W+1)'((64'sd1 <<< (I_W - 1)) - 1);
  localparam logic signed [I_W:0] I_MIN = -(I_W+1)'(64'sd1 <<< (I_W - 1));
  localparam logic signed [U_W-1:0] D_MID = U_W'(64'sd1 <<< (DAC_W - 1));
  localparam logic signed [U_W-1:0] D_MAX = U_W'((64'sd1 <<< DAC_W) - 1);

  logic signed [I_W-1:0] integ, integ_next;
  logic signed [E_W-1:0] err;
  logic signed [I_W:0]   isum;
  logic signed [U_W-1:0] u, code;

  always_comb begin
    err  = E_W'(setpoint) - E_W'(in_y);
    isum = (I_W+1)'(integ) + (I_W+1)'(err);
    if (isum > I_MAX)      integ_next = I_W'(I_MAX);
    else if (isum < I_MIN) integ_next = I_W'(I_MIN);
    else                   integ_next = I_W'(isum);
    u    = (U_W'(kp) * U_W'(err) + U_W'(ki) * U_W'(integ_next)) >>> SHIFT;
    code = u + D_MID;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ    <= '0;
      dac_data <= DAC_W'(D_MID);
      dac_wr   <= 1'b0;
    end else begin
      dac_wr <= in_valid;
      if (in_valid) begin
        if (!enable) begin
          integ    <= '0;
          dac_data <= DAC_W'(D_MID);
        end else begin
          integ <= integ_next;
          if (code < 0)          dac_data <= '0;
          else if (code > D_MAX) dac_data <= DAC_W'(D_MAX);
          else                   dac_data <= DAC_W'(code);
        end
      end
    end
  end

endmodule
