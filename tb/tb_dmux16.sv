// tb_dmux16: checks the 16-channel demultiplexer.
// Random writes go to random channels; after each, all 16 outputs must match a
// shadow array kept here.
module tb_dmux16;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       wr = 1'b0;
  logic [3:0] ch;
  logic [9:0] din;
  logic [9:0] ch_data [16];
  logic [9:0] shadow [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dmux16 #(.W(10)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ch = '0; din = '0;
    foreach (shadow[i]) shadow[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      wr  = ($urandom_range(3) != 0);
      ch  = 4'($urandom);
      din = 10'($urandom);
      if (wr) shadow[ch] = din;
      @(negedge clk);
      wr = 1'b0;
      foreach (shadow[i]) check(ch_data[i] == shadow[i], $sformatf("channel %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
