// packetizer: builds the periodic telemetry packet sent over the UART.
//
// Each decimated output word (one per decimation interval, e.g. every 20 ms)
// triggers one packet carrying the position together with the latest filter
// output, one health channel and one configuration register, so that the
// external processor sees the measurement, the health parameters and the
// constants in use. Health channels (0..15) and registers (0..NREGS-1) are
// visited round-robin, one per packet. Layout, 17 bytes, multi-byte fields
// most significant byte first (this design's own format):
//     0      0xA5 start marker
//     1..3   decimated block sum (24-bit signed)
//     4..5   number of samples in that block
//     6..7   latest filter output, sign-extended to 16 bits
//     8      health channel number
//     9..10  that channel's ADC word, zero-extended
//     11     register address
//     12..14 register value
//     15     status byte (input `status`)
//     16     XOR of bytes 0..15
// All fields are captured in the trigger cycle. A trigger that arrives while a
// packet is still being sent is dropped and flagged on `overrun`.
//
// Interface: `hl_idx` / `reg_addr` select what the next packet reads from the
// health registers and the register file (`hl_data` / `reg_data`, read
// combinationally). Bytes leave on a valid/ready handshake towards uart_tx.
module packetizer #(
  parameter int unsigned Y_W   = 10,
  parameter int unsigned H_W   = 10,
  parameter int unsigned NREGS = 14
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  trigger,
  input  logic signed [23:0]    dec_sum,
  input  logic [15:0]           dec_count,
  input  logic signed [Y_W-1:0] filt_y,
  output logic [3:0]            hl_idx,
  input  logic [H_W-1:0]        hl_data,
  output logic [7:0]            reg_addr,
  input  logic [23:0]           reg_data,
  input  logic [7:0]            status,
  output logic                  tx_valid,
  output logic [7:0]            tx_data,
  input  logic                  tx_ready,
  output logic                  busy,
  output logic                  overrun
);

  localparam int unsigned NBYTES = 17;

  logic [7:0] pkt [NBYTES-1];
  logic [4:0] idx;
  logic [7:0] csum;
  logic [15:0] fy, hv;

  always_comb begin
    fy       = 16'(filt_y);
    hv       = 16'(hl_data);
    tx_valid = busy;
    tx_data  = (idx == 5'(NBYTES - 1)) ? csum : pkt[idx[3:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      overrun  <= 1'b0;
      idx      <= '0;
      csum     <= '0;
      hl_idx   <= '0;
      reg_addr <= '0;
      for (int i = 0; i < NBYTES - 1; i++) pkt[i] <= '0;
    end else begin
      overrun <= trigger & busy;
      if (!busy) begin
        if (trigger) begin
          pkt[0]  <= 8'hA5;
          pkt[1]  <= dec_sum[23:16];
          pkt[2]  <= dec_sum[15:8];
          pkt[3]  <= dec_sum[7:0];
          pkt[4]  <= dec_count[15:8];
          pkt[5]  <= dec_count[7:0];
          pkt[6]  <= fy[15:8];
          pkt[7]  <= fy[7:0];
          pkt[8]  <= {4'd0, hl_idx};
          pkt[9]  <= hv[15:8];
          pkt[10] <= hv[7:0];
          pkt[11] <= reg_addr;
          pkt[12] <= reg_data[23:16];
          pkt[13] <= reg_data[15:8];
          pkt[14] <= reg_data[7:0];
          pkt[15] <= status;
          busy    <= 1'b1;
          idx     <= '0;
          csum    <= '0;
        end
      end else if (tx_ready) begin
        csum <= csum ^ tx_data;
        if (idx == 5'(NBYTES - 1)) begin
          busy     <= 1'b0;
          hl_idx   <= hl_idx + 4'd1;
          reg_addr <= (reg_addr + 8'd1 >= 8'(NREGS)) ? 8'd0 : reg_addr + 8'd1;
        end else begin
          idx <= idx + 5'd1;
        end
      end
    end
  end

  // Valid/ready rule: an offered byte stays offered, unchanged, until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));

endmodule
