// tb_packetizer: checks the telemetry packet builder.
// A byte sink with random ready collects each packet; its 17 bytes are
// compared field by field with the values presented at the trigger, the
// checksum is recomputed, the health channel and register index must advance
// by one per packet, and a trigger during a packet must raise overrun.
module tb_packetizer;
  logic               clk = 1'b0, rst_n = 1'b0;
  logic               trigger = 1'b0;
  logic signed [23:0] dec_sum;
  logic [15:0]        dec_count;
  logic signed [9:0]  filt_y;
  logic [3:0]         hl_idx;
  logic [9:0]         hl_data;
  logic [7:0]         reg_addr, status;
  logic [23:0]        reg_data;
  logic               tx_valid, tx_ready, busy, overrun;
  logic [7:0]         tx_data;
  logic [7:0]         got [$];
  int checks = 0, failures = 0, novr = 0;

  always #5 clk = ~clk;

  packetizer dut (.*);

  // health and register contents are functions of their index
  always_comb begin
    hl_data  = 10'(hl_idx * 37 + 5);
    reg_data = 24'(reg_addr * 24'h010203 + 24'h000100);
  end

  always @(posedge clk) begin
    if (tx_valid && tx_ready) got.push_back(tx_data);
    tx_ready <= ($urandom_range(2) == 0);
    if (overrun && rst_n) novr++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dec_sum = '0; dec_count = '0; filt_y = '0; status = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 20; p++) begin
      logic [7:0] x;
      logic [7:0] want [17];
      logic [15:0] fy;
      got.delete();
      @(negedge clk);
      dec_sum = 24'($urandom); dec_count = 16'($urandom); filt_y = 10'($urandom); status = 8'($urandom);
      fy = 16'(filt_y);
      want = '{8'hA5, dec_sum[23:16], dec_sum[15:8], dec_sum[7:0], dec_count[15:8], dec_count[7:0],
               fy[15:8], fy[7:0], 8'(p % 16), 8'(hl_data >> 8), hl_data[7:0], 8'(p % 14),
               reg_data[23:16], reg_data[15:8], reg_data[7:0], status, 8'h00};
      check(hl_idx == 4'(p % 16) && reg_addr == 8'(p % 14), "round-robin indices");
      trigger = 1'b1;
      @(negedge clk) trigger = 1'b0;
      if (p == 5) begin
        repeat (3) @(negedge clk);
        trigger = 1'b1;                 // arrives while busy
        @(negedge clk) trigger = 1'b0;
      end
      dec_sum = '0; status = '0;        // inputs move on; the packet must not
      wait (!busy);
      @(negedge clk);
      check(got.size() == 17, $sformatf("packet %0d has %0d bytes", p, got.size()));
      x = 8'h00;
      for (int i = 0; i < 16; i++) x ^= want[i];
      want[16] = x;
      for (int i = 0; i < 17 && i < got.size(); i++)
        check(got[i] == want[i], $sformatf("packet %0d byte %0d: %h, want %h", p, i, got[i], want[i]));
    end
    check(novr == 1, $sformatf("overrun flagged %0d times, want once", novr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
