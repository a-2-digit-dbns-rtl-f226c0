// tb_dbns_channel_sum -- the registered sum of the channel outputs must equal
// the two's-complement sum of the inputs of the previous cycle.
module tb_dbns_channel_sum;
  localparam int unsigned NCH = 4, ACC_W = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [ACC_W-1:0] ch [NCH];
  logic signed [ACC_W-1:0] y;
  logic signed [ACC_W-1:0] expect_y;
  int checks = 0, failures = 0;

  dbns_channel_sum #(.NCH(NCH), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ch[i]) ch[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      expect_y = '0;
      foreach (ch[i]) begin
        ch[i] = ACC_W'($urandom);
        expect_y = expect_y + ch[i];
      end
      @(posedge clk);
      #1;
      checks++;
      if (y != expect_y) begin
        failures++;
        $display("FAIL n=%0d y=%0d expected %0d", n, y, expect_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
