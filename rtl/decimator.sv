// decimator: block averaging of the filtered displacement to a low-rate,
// high-resolution output word.
//
// The filter delivers short words (10 bits) at a high rate; the user wants
// long words (24 bits) at a low rate, for instance 50 Hz. Between two
// decimation pulses from the timing block every filter output is added into a
// saturating accumulator; at the pulse the accumulated block is issued and the
// accumulator restarts. The output is the block sum with every sample weighted
// alike, i.e. the block average scaled by the number of samples, which keeps
// all the resolution the averaging gains instead of dividing it away; the
// sample count is issued with it so that the receiver can normalise. Block
// averaging on a pulse from the timing block follows the document; equal
// weights and issuing the unnormalised sum are this design's choices.
//
// Timing: a sample arriving in the same cycle as `dec_pulse` is included in
// the closing block. `out_valid` pulses one cycle after `dec_pulse`.
module decimator #(
  parameter int unsigned Y_W   = 10,
  parameter int unsigned OUT_W = 24,
  parameter int unsigned CNT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [Y_W-1:0]   in_y,
  input  logic                    dec_pulse,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_sum,
  output logic [CNT_W-1:0]        out_count
);

  localparam logic signed [OUT_W:0] S_MAX = (OUT_W+1)'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [OUT_W:0] S_MIN = -(OUT_W+1)'(64'sd1 <<< (OUT_W - 1));

  logic signed [OUT_W-1:0] acc, acc_next;
  logic [CNT_W-1:0]        cnt, cnt_next;
  logic signed [OUT_W:0]   s;

  always_comb begin
    s = (OUT_W+1)'(acc) + (in_valid ? (OUT_W+1)'(in_y) : '0);
    if (s > S_MAX)      acc_next = OUT_W'(S_MAX);
    else if (s < S_MIN) acc_next = OUT_W'(S_MIN);
    else                acc_next = OUT_W'(s);
    cnt_next = (in_valid && cnt != '1) ? cnt + 1'b1 : cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_sum   <= '0;
      out_count <= '0;
    end else begin
      out_valid <= dec_pulse;
      if (dec_pulse) begin
        out_sum   <= acc_next;
        out_count <= cnt_next;
        acc       <= '0;
        cnt       <= '0;
      end else begin
        acc <= acc_next;
        cnt <= cnt_next;
      end
    end
  end

endmodule
