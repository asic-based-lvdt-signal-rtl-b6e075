// dds_wavegen: direct digital synthesis of the LVDT excitation sine.
//
// Chain, as in the DDS block diagram: user frequency select -> divide-factor
// LUT -> divide-by-N counter -> 6-bit up counter -> 64-entry sine LUT -> DAC.
// The 4-bit select addresses a LUT holding N, the number of master-clock
// cycles per sine sample; every N cycles the up counter advances one of the 64
// sample positions, so f_out = CLK_HZ / (64 * N). The table spans F_MIN..F_MAX
// (10..20 kHz) in 15 equal steps, N rounded to the nearest integer; at a
// 16 MHz clock N runs from 25 down to 13, so neighbouring selects near 20 kHz
// share an N (the table contents are this design's choice, the document gives
// only the range and the clock).
//
// The sine LUT holds a 12-bit offset binary code (0..4095): 2048 + q(k) on the
// rising half and 2047 - q(k) on the falling half, q(k) = floor(2047.5 *
// |sin(2*pi*k/64)|), stored as one quarter wave of 17 words and unfolded by
// symmetry. Index 16 is the positive peak (4095) and index 48 the negative
// peak (0); pos_peak / neg_peak pulse for one cycle when those samples are put
// on the DAC, which is what lets the sensor ADC sample the LVDT output exactly
// at the carrier peaks.
//
// Timing: dac_data, phase and the strobes are registered; dac_wr pulses for
// one cycle with each new sample. A new frequency select is taken at the next
// sample boundary.
module dds_wavegen #(
  parameter int unsigned CLK_HZ = 16_000_000,
  parameter int unsigned F_MIN  = 10_000,
  parameter int unsigned F_MAX  = 20_000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       freq_sel,
  output logic [11:0]      dac_data,   // excitation DAC code (db_po_dac)
  output logic             dac_wr,     // DAC write strobe (wr_po_dac)
  output logic [5:0]       phase,      // current sample index 0..63
  output logic             pos_peak,   // sample 16 (+1) just issued
  output logic             neg_peak    // sample 48 (-1) just issued
);

  localparam int unsigned SAMPLES = 64;
  localparam int unsigned DIV_W   = 16;

  // Divide-factor LUT: N(i) = round(CLK_HZ / (64 * f_i)), f_i = F_MIN + i*(F_MAX-F_MIN)/15.
  function automatic logic [DIV_W-1:0] div_factor(input logic [3:0] sel);
    longint num, den;
    num = longint'(CLK_HZ) * 15;
    den = longint'(SAMPLES) * (longint'(F_MIN) * 15 + longint'(sel) * (longint'(F_MAX) - longint'(F_MIN)));
    return DIV_W'((2 * num + den) / (2 * den));
  endfunction

  // Quarter-wave table: q(k) = floor(2047.5 * sin(2*pi*k/64)), k = 0..16. Within one
  // LSB this is round(2047.5 * (1 + sin)) - 2048, e.g. 465, 345, 242 ... 10, 0 at the trough.
  function automatic logic [10:0] quarter(input logic [4:0] k);
    case (k)
      5'd0:  return 11'd0;
      5'd1:  return 11'd200;
      5'd2:  return 11'd399;
      5'd3:  return 11'd594;
      5'd4:  return 11'd783;
      5'd5:  return 11'd965;
      5'd6:  return 11'd1137;
      5'd7:  return 11'd1298;
      5'd8:  return 11'd1447;
      5'd9:  return 11'd1582;
      5'd10: return 11'd1702;
      5'd11: return 11'd1805;
      5'd12: return 11'd1891;
      5'd13: return 11'd1959;
      5'd14: return 11'd2008;
      5'd15: return 11'd2037;
      default: return 11'd2047;
    endcase
  endfunction

  // 12-bit sine sample for index k: upper half 2048 + q, lower half 2047 - q.
  function automatic logic [11:0] sine_lut(input logic [5:0] k);
    logic [4:0]  qi;
    logic [10:0] q;
    qi = k[4] ? 5'(6'd32 - {1'b0, k[4:0]}) : k[4:0];
    q  = quarter(qi);
    return k[5] ? 12'(12'd2047 - 12'(q)) : 12'(12'd2048 + 12'(q));
  endfunction

  logic [DIV_W-1:0] div_cnt, div_n;
  logic [5:0]       idx;
  logic [11:0]      s;

  always_comb s = sine_lut(idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt  <= '0;
      div_n    <= div_factor(4'd0);
      idx      <= '0;
      dac_data <= '0;
      dac_wr   <= 1'b0;
      phase    <= '0;
      pos_peak <= 1'b0;
      neg_peak <= 1'b0;
    end else begin
      dac_wr   <= 1'b0;
      pos_peak <= 1'b0;
      neg_peak <= 1'b0;
      if (div_cnt >= div_n - 1'b1) begin
        div_cnt  <= '0;
        div_n    <= div_factor(freq_sel);
        dac_data <= s;
        dac_wr   <= 1'b1;
        phase    <= idx;
        pos_peak <= (idx == 6'd16);
        neg_peak <= (idx == 6'd48);
        idx      <= idx + 1'b1;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

endmodule
