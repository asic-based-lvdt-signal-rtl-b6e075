// iir_biquad: second-order IIR filter (direct form II) with programmable coefficients.
//
// Structure, as in the document's filter diagram: one delay line w shared by
// the recursive and the direct part,
//     w[n] = x[n] + a1*w[n-1] + a2*w[n-2]
//     y[n] = b0*w[n] + b1*w[n-1] + b2*w[n-2]
// Note the sign convention of that diagram: a1 and a2 are added, so they are
// the negated denominator coefficients of the usual H(z) form. The filter
// removes the carrier harmonics left in the demodulated envelope; the
// coefficients are loaded by the supervisory host after calibration.
//
// Number formats are this design's choice: coefficients are signed Q2.14
// (COEF_FRAC = 14, range -2..2), the state words w carry W_FRAC = 8 fraction
// bits below the input LSB in W_W bits, and both w and y saturate instead of
// wrapping. The output is Y_W = 10 bits, the low-resolution high-rate word
// the document hands to the decimator.
//
// Timing: one sample per `in_valid`; all five products are formed in the same
// cycle and `out_valid` / `out_y` follow one cycle later. A new sample may
// arrive every cycle.
module iir_biquad #(
  parameter int unsigned X_W       = 11,
  parameter int unsigned Y_W       = 10,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned COEF_FRAC = 14,
  parameter int unsigned W_FRAC    = 8,
  parameter int unsigned W_W       = 24
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [COEF_W-1:0] b0, b1, b2, a1, a2,
  input  logic                     in_valid,
  input  logic signed [X_W-1:0]    in_x,
  output logic                     out_valid,
  output logic signed [Y_W-1:0]    out_y
);

  localparam int unsigned ACC_W = COEF_W + W_W + 3;

  localparam logic signed [ACC_W-1:0] W_MAX = ACC_W'((64'sd1 <<< (W_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] W_MIN = -ACC_W'(64'sd1 <<< (W_W - 1));
  localparam logic signed [ACC_W-1:0] Y_MAX = ACC_W'((64'sd1 <<< (Y_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] Y_MIN = -ACC_W'(64'sd1 <<< (Y_W - 1));

  logic signed [W_W-1:0]   w1, w2, w_new;
  logic signed [ACC_W-1:0] acc_w, acc_w_sh, acc_y, acc_y_sh;

  always_comb begin
    // Recursive part, scaled by 2^(COEF_FRAC + W_FRAC).
    acc_w = (ACC_W'(in_x) <<< (COEF_FRAC + W_FRAC))
          + ACC_W'(a1) * ACC_W'(w1)
          + ACC_W'(a2) * ACC_W'(w2);
    acc_w_sh = acc_w >>> COEF_FRAC;
    if (acc_w_sh > W_MAX)      w_new = W_W'(W_MAX);
    else if (acc_w_sh < W_MIN) w_new = W_W'(W_MIN);
    else                       w_new = W_W'(acc_w_sh);
    // Direct part.
    acc_y = ACC_W'(b0) * ACC_W'(w_new)
          + ACC_W'(b1) * ACC_W'(w1)
          + ACC_W'(b2) * ACC_W'(w2);
    acc_y_sh = acc_y >>> (COEF_FRAC + W_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w1        <= '0;
      w2        <= '0;
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        w1 <= w_new;
        w2 <= w1;
        if (acc_y_sh > Y_MAX)      out_y <= Y_W'(Y_MAX);
        else if (acc_y_sh < Y_MIN) out_y <= Y_W'(Y_MIN);
        else                       out_y <= Y_W'(acc_y_sh);
      end
    end
  end

endmodule
