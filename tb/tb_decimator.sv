// tb_decimator: checks the block-averaging decimator.
// Random samples arrive on random cycles; at each decimation pulse the output
// must be the sum and count of the samples since the previous pulse
// (including one arriving with the pulse), one cycle later. A run of
// full-scale samples checks the saturation.
module tb_decimator;
  logic               clk = 1'b0, rst_n = 1'b0;
  logic               in_valid = 1'b0, dec_pulse = 1'b0;
  logic signed [9:0]  in_y;
  logic               out_valid;
  logic signed [23:0] out_sum;
  logic [15:0]        out_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  decimator dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum;
    int cnt;
    in_y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 20; blk++) begin
      int len;
      sum = 0; cnt = 0;
      len = 50 + $urandom_range(400);
      for (int c = 0; c < len; c++) begin
        @(negedge clk);
        in_valid  = ($urandom_range(3) == 0);
        in_y      = 10'($signed($urandom_range(1023)) - 512);
        dec_pulse = (c == len - 1);
        if (in_valid) begin sum += in_y; cnt++; end
      end
      @(negedge clk);
      in_valid = 1'b0; dec_pulse = 1'b0;
      check(out_valid, "output one cycle after the pulse");
      check(longint'(out_sum) == sum, $sformatf("block %0d sum %0d, want %0d", blk, out_sum, sum));
      check(int'(out_count) == cnt, $sformatf("block %0d count %0d, want %0d", blk, out_count, cnt));
      @(negedge clk);
      check(!out_valid, "single output pulse");
    end
    // saturation: 20000 samples of 511 exceed 2^23 - 1
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      in_valid = 1'b1; in_y = 10'sd511; dec_pulse = (c == 19999);
    end
    @(negedge clk);
    in_valid = 1'b0; dec_pulse = 1'b0;
    check(out_sum == 24'sh7FFFFF, "positive saturation");
    check(out_count == 16'd20000, "count of a saturated block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
