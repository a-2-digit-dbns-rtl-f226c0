// dbns_channel_sum -- adds the outputs of all channels of the filter.
//
// In a multi-digit DBNS filter every pair (coefficient digit, data digit)
// has its own channel, and the filter output is the plain binary sum of the
// channel outputs. This block adds NCH signed words (two's complement,
// wrapping) and registers the result, so its latency is one cycle; the
// register and the reset value of zero are this design's own choices.
module dbns_channel_sum #(
  parameter int unsigned NCH   = 4,
  parameter int unsigned ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ACC_W-1:0] ch [NCH],  // channel outputs
  output logic signed [ACC_W-1:0] y          // registered sum
);

  logic signed [ACC_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < int'(NCH); i++) sum = sum + ch[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) y <= '0;
    else        y <= sum;
  end

endmodule
