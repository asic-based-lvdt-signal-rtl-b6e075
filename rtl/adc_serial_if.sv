// adc_serial_if: control and serial read-out of an external ADC.
//
// The document's ADC needs start-of-conversion, chip-select and read pulses,
// and returns its result on a clock / data / strobe serial link: a data bit is
// taken at each rising edge of the ADC clock while the strobe is high. This
// module issues the control pulses and captures the word; the same module
// serves the LVDT sensor ADC and the health-monitoring ADC.
//
// Sequence (this design's choice; the document gives only the signal names):
//   start -> cs high, soc high for SOC_CYC cycles -> rd high, wait for the
//   strobe -> shift in data bits MSB first on each ADC-clock rising edge while
//   the strobe is high -> on the strobe's falling edge issue the last W bits
//   as `data` with a one-cycle `data_valid`, drop cs and rd.
// If no complete word arrives within TIMEOUT cycles the transfer is abandoned
// and `timeout` pulses. The serial inputs come from another clock domain and
// pass through two-flop synchronisers, so the ADC clock must be slower than a
// quarter of the system clock. A `start` while busy is ignored.
module adc_serial_if #(
  parameter int unsigned W       = 10,
  parameter int unsigned SOC_CYC = 4,
  parameter int unsigned TIMEOUT = 2000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         busy,
  output logic         adc_cs,
  output logic         adc_soc,
  output logic         adc_rd,
  input  logic         adc_sclk,
  input  logic         adc_sdata,
  input  logic         adc_strb,
  output logic         data_valid,
  output logic [W-1:0] data,
  output logic         timeout
);

  typedef enum logic [1:0] {S_IDLE, S_SOC, S_READ} state_e;

  state_e      state;
  logic [2:0]  sclk_s, strb_s;
  logic [1:0]  sdata_s;
  logic [W-1:0] shreg;
  logic [$clog2(TIMEOUT+1)-1:0] tmr;
  logic        sclk_rise, strb_fall;

  always_comb begin
    sclk_rise = sclk_s[1] & ~sclk_s[2];
    strb_fall = ~strb_s[1] & strb_s[2];
    busy      = (state != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s  <= '0;
      strb_s  <= '0;
      sdata_s <= '0;
    end else begin
      sclk_s  <= {sclk_s[1:0], adc_sclk};
      strb_s  <= {strb_s[1:0], adc_strb};
      sdata_s <= {sdata_s[0], adc_sdata};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      adc_cs     <= 1'b0;
      adc_soc    <= 1'b0;
      adc_rd     <= 1'b0;
      shreg      <= '0;
      tmr        <= '0;
      data       <= '0;
      data_valid <= 1'b0;
      timeout    <= 1'b0;
    end else begin
      data_valid <= 1'b0;
      timeout    <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state   <= S_SOC;
          adc_cs  <= 1'b1;
          adc_soc <= 1'b1;
          tmr     <= '0;
        end
        S_SOC: begin
          tmr <= tmr + 1'b1;
          if (tmr + 1'b1 >= SOC_CYC[$bits(tmr)-1:0]) begin
            state   <= S_READ;
            adc_soc <= 1'b0;
            adc_rd  <= 1'b1;
            tmr     <= '0;
          end
        end
        S_READ: begin
          tmr <= tmr + 1'b1;
          if (strb_s[1] && sclk_rise) shreg <= {shreg[W-2:0], sdata_s[1]};
          if (strb_fall) begin
            data       <= shreg;
            data_valid <= 1'b1;
          end
          if (strb_fall || tmr >= TIMEOUT[$bits(tmr)-1:0]) begin
            timeout <= !strb_fall;
            state   <= S_IDLE;
            adc_cs  <= 1'b0;
            adc_rd  <= 1'b0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Control rules of the converter: soc and rd only inside chip select, never together.
  a_cs_frames: assert property (@(posedge clk) disable iff (!rst_n) (adc_soc || adc_rd) |-> adc_cs);
  a_soc_rd:    assert property (@(posedge clk) disable iff (!rst_n) !(adc_soc && adc_rd));

endmodule
