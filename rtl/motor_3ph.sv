// motor_3ph: three-phase square-wave drive for the motor that moves the LVDT core.
//
// The three square waves are derived, like the excitation sine, from the DDS
// sample clock: every `motor_div` excitation samples a 3-bit Johnson (twisted
// ring) counter takes one step. Its six states give three 50 %-duty square
// waves, phase B lagging A by two steps (120 degrees) and C lagging B by two
// more. That the drive is three-phase square waves made by the DDS follows the
// document; the Johnson counter and the programmable step divider are this
// design's own choices.
//
// Interface: `tick` is the DDS sample strobe (one cycle wide); `motor_div` is
// the number of ticks per step (0 and 1 both mean every tick); `phase_abc`
// bit 0 is A, bit 1 B, bit 2 C. Outputs are registered and change one cycle
// after the tick that completes a step.
module motor_3ph (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic [15:0] motor_div,
  output logic [2:0]  phase_abc
);

  logic [15:0] cnt;
  logic [2:0]  q;    // Johnson counter: 000,100,110,111,011,001

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      q   <= '0;
    end else if (tick) begin
      if (cnt + 16'd1 >= motor_div) begin
        cnt <= '0;
        q   <= {~q[0], q[2:1]};
      end else begin
        cnt <= cnt + 16'd1;
      end
    end
  end

  // A is high in steps 1..3, B in steps 3..5, C in steps 5,0,1.
  always_comb phase_abc = {~q[1], q[0], q[2]};

endmodule
