// tb_lvdt_sigconditnr: end-to-end test of the LVDT signal conditioner at its
// default parameters (16 MHz clock, 10-bit ADCs, 19.2 kbit/s, 50 Hz output).
//
// Around the chip: a behavioural LVDT whose secondary is position x times the
// excitation the chip itself generates, read by a behavioural serial ADC; a
// second serial ADC behind a 16-channel multiplexer holding fixed health
// levels; a core that the control DAC can push (x = x_ext + 0.5 *
// (ctl_dac - 2048) / 2048); and a host that sends commands on `sin` and
// decodes every packet on `sout`.
//
// Every packet is checked (marker, checksum, sample count of the decimation
// block, block average against the position, health channel and register
// echo). The test then makes each mechanism happen and counts it: excitation
// frequency switch, filter coefficient reload, negative displacement, baud
// rate change, closed loop settling on a set point, health read-back,
// register echo, decimation overrun, ADC timeout, unknown-address command and
// motor drive steps. A mechanism that never happened counts as a failure.
module tb_lvdt_sigconditnr;
  localparam real CLK_NS = 62.5;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cs_adc, soc_adc, rd_adc, sclk_adc, sdata_adc, strb_adc;
  logic [11:0] db_po_dac, ctl_dac;
  logic        wr_po_dac, wr_ctl_dac;
  logic [2:0]  motor_abc;
  logic [3:0]  mx_addr;
  logic        mux_en, cs_daq, soc_daq, rd_daq, sclk_daq, sdata_daq, strb_daq;
  logic        sin = 1'b1, sout;

  int checks = 0, failures = 0;

  always #(CLK_NS / 2.0) clk = ~clk;

  lvdt_sigconditnr dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ---------------- LVDT, sensor ADC ----------------
  real  x_ext = 0.0;
  logic adc_mute = 1'b0;
  logic [9:0] lvdt_code;
  int sens_words, daq_words;

  always_comb begin
    real x, carrier, v;
    x       = x_ext + 0.5 * (real'(ctl_dac) - 2048.0) / 2048.0;
    carrier = (real'(db_po_dac) - 2047.5) / 2047.5;
    v       = x * carrier * 511.0;
    if (v > 511.0) v = 511.0;
    if (v < -512.0) v = -512.0;
    lvdt_code = 10'($rtoi(v < 0 ? v - 0.5 : v + 0.5));
  end

  serial_adc_model #(.W(10), .SCLK_NS(500.0), .CONV_NS(500.0)) u_sens_adc (
    .cs(cs_adc), .soc(soc_adc & ~adc_mute), .rd(rd_adc), .vin(lvdt_code),
    .sclk(sclk_adc), .sdata(sdata_adc), .strb(strb_adc), .words(sens_words)
  );

  // ---------------- health multiplexer and ADC ----------------
  logic [9:0] level [16];
  serial_adc_model #(.W(10), .SCLK_NS(500.0), .CONV_NS(500.0)) u_daq_adc (
    .cs(cs_daq), .soc(soc_daq), .rd(rd_daq), .vin(mux_en ? level[mx_addr] : 10'd0),
    .sclk(sclk_daq), .sdata(sdata_daq), .strb(strb_daq), .words(daq_words)
  );

  // ---------------- host: register shadow and command sender ----------------
  int          baud = 833;
  logic [23:0] shadow [14];

  task automatic send_byte(input logic [7:0] b);
    real bit_ns;
    bit_ns = baud * CLK_NS;
    sin = 1'b0; #(bit_ns);
    for (int i = 0; i < 8; i++) begin sin = b[i]; #(bit_ns); end
    sin = 1'b1; #(bit_ns * 2.0);
  endtask

  task automatic command(input logic [7:0] a, input logic [23:0] d);
    send_byte(8'h5A); send_byte(a); send_byte(d[23:16]); send_byte(d[15:8]); send_byte(d[7:0]);
    if (a < 14) begin
      case (a)
        0:       shadow[a] = {20'd0, d[3:0]};
        9:       shadow[a] = {23'd0, d[0]};
        10, 13:  shadow[a] = d;
        11, 12:  shadow[a] = {8'd0, d[15:0]};
        default: shadow[a] = {{8{d[15]}}, d[15:0]};
      endcase
    end
    #(baud * CLK_NS * 2.0);
  endtask

  // ---------------- host: packet receiver ----------------
  logic [7:0] rxq [$];
  int rx_baud = 833;

  initial begin
    forever begin
      logic [7:0] b;
      real bit_ns;
      @(negedge sout);
      bit_ns = rx_baud * CLK_NS;
      #(bit_ns * 1.5);
      for (int i = 0; i < 8; i++) begin b[i] = sout; #(bit_ns); end
      if (sout) rxq.push_back(b);
    end
  end

  typedef struct {
    int   sum, count, filt, ch, hv, raddr, rval;
    logic [7:0] status;
  } pkt_t;

  pkt_t last;
  int   npkt = 0, nresync = 0;
  event got_pkt;

  // expected block average and sample count, updated by the test sequence
  real  exp_avg = 0.0, avg_tol = 3.0;
  int   exp_count = 400;
  bit   check_avg = 1'b0, check_cnt = 1'b0;
  int   n_health = 0, n_echo = 0, n_overrun = 0, n_timeout = 0, n_badaddr = 0;

  initial begin
    forever begin
      @(posedge clk);
      while (rxq.size() >= 17) begin
        logic [7:0] x;
        x = 8'h00;
        for (int i = 0; i < 16; i++) x ^= rxq[i];
        if (rxq[0] == 8'hA5 && x == rxq[16]) begin
          pkt_t p;
          p.sum    = $signed({rxq[1], rxq[2], rxq[3]});
          p.count  = {rxq[4], rxq[5]};
          p.filt   = $signed({rxq[6], rxq[7]});
          p.ch     = rxq[8];
          p.hv     = {rxq[9], rxq[10]};
          p.raddr  = rxq[11];
          p.rval   = {rxq[12], rxq[13], rxq[14]};
          p.status = rxq[15];
          repeat (17) void'(rxq.pop_front());
          npkt++;
          if (p.status[4]) n_overrun++;
          if (p.status[1]) n_timeout++;
          if (p.status[2]) n_badaddr++;
          check(!p.status[3], "no UART framing error reported");
          if (check_cnt)
            check(p.count >= exp_count - 1 && p.count <= exp_count + 1,
                  $sformatf("packet %0d: %0d samples in the block, want %0d", npkt, p.count, exp_count));
          if (check_avg && p.count > 0) begin
            real avg;
            avg = real'(p.sum) / p.count;
            check(avg > exp_avg - avg_tol && avg < exp_avg + avg_tol,
                  $sformatf("packet %0d: block average %f, want %f", npkt, avg, exp_avg));
          end
          if (p.ch < 16 && $time > 2ms) begin
            check(p.hv == int'(level[p.ch]), $sformatf("health channel %0d = %0d, want %0d", p.ch, p.hv, level[p.ch]));
            n_health++;
          end
          if (p.raddr < 14) begin
            check(p.rval == int'(shadow[p.raddr]),
                  $sformatf("register %0d echoed %h, want %h", p.raddr, p.rval, shadow[p.raddr]));
            n_echo++;
          end
          last = p;
          ->got_pkt;
        end else begin
          void'(rxq.pop_front());
          nresync++;
        end
      end
    end
  end

  task automatic wait_packets(input int n);
    repeat (n) @got_pkt;
  endtask

  // ---------------- excitation and motor monitors ----------------
  int last_wr = -1, spacing = 0, cyc = 0, motor_edges = 0;
  logic prev_a = 1'b0;
  always @(posedge clk) begin
    cyc++;
    if (wr_po_dac) begin
      if (last_wr >= 0) spacing = cyc - last_wr;
      last_wr = cyc;
    end
    if (rst_n && motor_abc[0] != prev_a) motor_edges++;
    prev_a = motor_abc[0];
  end

  // ---------------- watchdog ----------------
  initial begin
    #600ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  int n_freq = 0, n_filter = 0, n_neg = 0, n_baud = 0, n_loop = 0;

  initial begin
    shadow = '{24'd0, 24'd329, 24'd658, 24'd329, 24'd25576, 24'hFFD6F4, 24'd0, 24'd0,
               24'd0, 24'd0, 24'd320000, 24'd833, 24'd64, 24'd1000};
    foreach (level[i]) level[i] = 10'(i * 61 + 7);
    x_ext = 0.5;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // 1. Defaults: 10 kHz excitation, 20 ms packets at 19.2 kbit/s.
    repeat (200) @(posedge clk);
    check(spacing == 25, $sformatf("10 kHz: %0d cycles per sample, want 25", spacing));
    exp_avg = 0.5 * 511.0; exp_count = 400;
    wait_packets(1);                 // first block starts at reset, skip it
    check_avg = 1'b1; check_cnt = 1'b1;
    wait_packets(2);
    $display("default: %0d packets, last average %0d / %0d", npkt, last.sum, last.count);

    // 2. Baud rate change to 1 Mbit/s (16 cycles per bit), 2 ms output interval.
    check_avg = 1'b0; check_cnt = 1'b0;
    command(8'h0A, 24'd32000);
    wait_packets(1);
    command(8'h0B, 24'd16);
    baud = 16; rx_baud = 16;
    begin
      int p0;
      p0 = npkt;
      wait_packets(3);
      check(npkt == p0 + 3, "packets at the new baud rate");
      n_baud++;
    end
    exp_count = 40; check_cnt = 1'b1; check_avg = 1'b1;
    wait_packets(3);

    // 3. Negative displacement: envelope changes sign.
    check_avg = 1'b0;
    x_ext = -0.4; exp_avg = -0.4 * 511.0;
    wait_packets(4);
    check_avg = 1'b1;
    wait_packets(3);
    if (last.sum < 0) n_neg++;

    // 4. Frequency switch to select 15 (N = 13): 76.9 kHz sample rate.
    check_avg = 1'b0; check_cnt = 1'b0;
    command(8'h00, 24'd15);
    repeat (300) @(posedge clk);
    check(spacing == 13, $sformatf("select 15: %0d cycles per sample, want 13", spacing));
    if (spacing == 13) n_freq++;
    wait_packets(4);
    exp_count = 2 * 32000 / (64 * 13);
    check_cnt = 1'b1; check_avg = 1'b1;
    wait_packets(3);

    // 5. Filter reload: gain 0.5 pass-through.
    check_avg = 1'b0;
    command(8'h02, 24'd0); command(8'h03, 24'd0); command(8'h04, 24'd0); command(8'h05, 24'd0);
    command(8'h01, 24'd8192);
    wait_packets(2);
    exp_avg = -0.2 * 511.0;
    check_avg = 1'b1;
    wait_packets(3);
    if (last.sum < 0 && last.sum / last.count > -110 && last.sum / last.count < -95) n_filter++;
    // back to the low-pass, designed for 20 kHz, and 10 kHz excitation
    command(8'h01, 24'd329); command(8'h02, 24'd658); command(8'h03, 24'd329);
    command(8'h04, 24'd25576); command(8'h05, 24'hFFD6F4);
    check_cnt = 1'b0;
    command(8'h00, 24'd0);
    exp_count = 40;

    // 6. Closed loop: core pushed away (x_ext = 0.6), loop holds it at set point 100.
    check_avg = 1'b0;
    x_ext = 0.6;
    wait_packets(3);
    check_cnt = 1'b1;
    check(last.sum / last.count > 290, "open loop: core at 0.6");
    command(8'h08, 24'd100); command(8'h06, 24'd256); command(8'h07, 24'd64);
    command(8'h09, 24'd1);
    wait_packets(10);
    exp_avg = 100.0; avg_tol = 4.0;
    check_avg = 1'b1;
    wait_packets(3);
    if (last.sum / last.count > 95 && last.sum / last.count < 105) n_loop++;
    check(ctl_dac < 12'd2048, "control DAC pushes the core back");
    command(8'h09, 24'd0);
    check_avg = 1'b0;
    wait_packets(3);
    check(ctl_dac == 12'd2048, "loop off: control DAC at mid-scale");

    // 7. Overrun: output interval (100 us) shorter than a packet (170 us).
    check_cnt = 1'b0;
    command(8'h0A, 24'd1600);
    #2ms;
    command(8'h0A, 24'd32000);
    wait_packets(2);

    // 8. ADC timeout: sensor ADC silent for a while.
    adc_mute = 1'b1;
    #300us;
    adc_mute = 1'b0;
    wait_packets(2);

    // 9. Unknown register address.
    command(8'h77, 24'h000001);
    wait_packets(2);

    $display("packets %0d, resyncs %0d, health %0d, echo %0d, overrun %0d, timeout %0d, bad address %0d, motor edges %0d",
             npkt, nresync, n_health, n_echo, n_overrun, n_timeout, n_badaddr, motor_edges);
    check(n_freq > 0, "mechanism: frequency switch");
    check(n_filter > 0, "mechanism: filter coefficient reload");
    check(n_neg > 0, "mechanism: negative displacement");
    check(n_baud > 0, "mechanism: baud rate change");
    check(n_loop > 0, "mechanism: closed loop settles on the set point");
    check(n_health >= 16, "mechanism: health channels read back");
    check(n_echo >= 14, "mechanism: every register echoed");
    check(n_overrun > 0, "mechanism: decimation overrun reported");
    check(n_timeout > 0, "mechanism: ADC timeout reported");
    check(n_badaddr > 0, "mechanism: unknown address reported");
    check(motor_edges > 10, "mechanism: motor drive steps");
    check(sens_words > 1000 && daq_words > 100, "both ADCs in use");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
