// tb_config_regs: checks the supervisory command decoder.
// Checks the reset values, then writes every register with random data in
// 0x5A-framed commands (with junk bytes between frames and one frame broken
// off and left to time out) and compares the configuration outputs and the
// read-back port with a shadow copy. A write to an unknown address must be
// flagged and change nothing.
module tb_config_regs;
  import lvdt_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        rx_valid = 1'b0;
  logic [7:0]  rx_data;
  cfg_t        cfg;
  logic        wr_pulse, bad_addr;
  logic [7:0]  rd_addr;
  logic [23:0] rd_data;
  logic [23:0] shadow [14];
  int checks = 0, failures = 0;
  int nbad = 0, nwr = 0;

  always #5 clk = ~clk;

  config_regs #(.GAP_CYC(50)) dut (.*);

  always @(posedge clk) begin
    if (bad_addr) nbad++;
    if (wr_pulse) nwr++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put(input logic [7:0] b);
    @(negedge clk); rx_valid = 1'b1; rx_data = b;
    @(negedge clk); rx_valid = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic write(input logic [7:0] a, input logic [23:0] d);
    put(8'h5A); put(a); put(d[23:16]); put(d[15:8]); put(d[7:0]);
  endtask

  // Field widths of each register, for the shadow copy.
  function automatic logic [23:0] shape(input int a, input logic [23:0] d);
    case (a)
      0:       return {20'd0, d[3:0]};
      9:       return {23'd0, d[0]};
      10, 13:  return d;
      11, 12:  return {8'd0, d[15:0]};
      default: return {{8{d[15]}}, d[15:0]};
    endcase
  endfunction

  task automatic compare(input string when);
    for (int a = 0; a < 14; a++) begin
      @(negedge clk) rd_addr = 8'(a);
      #1 check(rd_data == shadow[a], $sformatf("%s: register %0d reads %h, want %h", when, a, rd_data, shadow[a]));
    end
    check(cfg.freq_sel == shadow[0][3:0], "freq_sel field");
    check(cfg.b0 == shadow[1][15:0] && cfg.b1 == shadow[2][15:0] && cfg.b2 == shadow[3][15:0], "b fields");
    check(cfg.a1 == shadow[4][15:0] && cfg.a2 == shadow[5][15:0], "a fields");
    check(cfg.kp == shadow[6][15:0] && cfg.ki == shadow[7][15:0] && cfg.setpoint == shadow[8][15:0], "loop fields");
    check(cfg.ctrl_en == shadow[9][0] && cfg.dec_interval == shadow[10], "enable and decimation fields");
    check(cfg.baud_div == shadow[11][15:0] && cfg.motor_div == shadow[12][15:0] && cfg.daq_interval == shadow[13], "rate fields");
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx_data = '0; rd_addr = '0;
    // reset values: 10 kHz, 1 kHz low-pass, loop off, 50 Hz, 19.2 kbit/s
    shadow = '{24'd0, 24'd329, 24'd658, 24'd329, 24'd25576, 24'hFFD6F4, 24'd0, 24'd0,
               24'd0, 24'd0, 24'd320000, 24'd833, 24'd64, 24'd1000};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    compare("reset");
    for (int round = 0; round < 3; round++) begin
      for (int a = 0; a < 14; a++) begin
        logic [23:0] d;
        d = 24'($urandom);
        put(8'($urandom_range(255, 0)) & 8'h0F);      // junk byte, never 0x5A
        write(8'(a), d);
        shadow[a] = shape(a, d);
      end
      compare($sformatf("round %0d", round));
    end
    check(nwr == 42, $sformatf("%0d write pulses", nwr));
    // unknown address
    write(8'h40, 24'h123456);
    check(nbad == 1, "unknown address flagged");
    compare("after unknown address");
    // broken-off frame: sync + address only, then a gap longer than GAP_CYC
    put(8'h5A); put(8'h01);
    repeat (80) @(negedge clk);
    write(8'h02, 24'h000777);
    shadow[2] = shape(2, 24'h000777);
    compare("after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
