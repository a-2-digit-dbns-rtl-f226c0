// dbns2_fir -- FIR filter with 2-digit DBNS data and 2-digit DBNS
// coefficients (top level).
//
// Every coefficient h[k] = h[k][0] + h[k][1] and every input sample
// x = x[0] + x[1] is a sum of two DBNS digits s * 2^b * 3^t. Their product
// expands into four single-digit products, (c0,d0), (c0,d1), (c1,d0),
// (c1,d1), so the filter is built as four identical channels, one per pair
// of coefficient digit and data digit. Each channel is a systolic convolver
// of NTAPS single-digit DBNS ALU nodes, which multiply in the exponent
// (index) domain and accumulate in binary; a final adder sums the four
// channel outputs. The output is therefore an ordinary two's-complement
// fixed-point number with FRAC_W fractional bits.
//
// Input samples arrive as DW-bit two's-complement numbers and are turned
// into two DBNS digits by a lookup-table converter (dbns_bin2dbns2).
//
// Interface: one input sample per clock on x_bin; coefficients on coef are
// held static (coef[k] multiplies the sample k cycles older). Timing:
//     y_out(n) = sum_{k=0}^{NTAPS-1} coef[k] * xd(n - (NTAPS+2) - k),
// where xd is the 2-digit DBNS form of the sample x_bin (within 0.36 of it),
// i.e. NTAPS+1 cycles through a channel plus one cycle in the final adder.
// sat is a registered flag: some product in the array saturated in the
// previous cycle. Reset is synchronous, active low, and clears the pipeline.
// The channel structure, the node and the 53-tap, 5-bit/4-bit default
// sizes follow the design; the fixed-point widths, the mantissa width, the
// converter table, the coefficient port and the reset are this design's own
// choices.
module dbns2_fir
  import dbns_pkg::*;
#(
  parameter int unsigned NTAPS  = 53,
  parameter int unsigned DW     = 10,    // input sample width
  parameter int unsigned MW     = 16,
  parameter int unsigned ACC_W  = 32,
  parameter int unsigned FRAC_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  dbns2_t                  coef [NTAPS],  // 2-digit coefficients h[k]
  input  logic signed [DW-1:0]    x_bin,         // binary input sample
  output logic signed [ACC_W-1:0] y_out,         // filter output
  output logic                    sat            // a product saturated
);

  localparam int unsigned NCH = 4;   // 2 coefficient digits x 2 data digits

  dbns2_t                  x_in;          // 2-digit form of x_bin
  logic signed [ACC_W-1:0] ch_y   [NCH];

  dbns_bin2dbns2 #(.DW(DW)) u_conv (
    .x_bin (x_bin),
    .dbns  (x_in)
  );
  logic        [NCH-1:0]   ch_sat;

  for (genvar cd = 0; cd < 2; cd++) begin : g_cdig
    // Node i of a channel holds coefficient h[NTAPS-1-i] (see dbns_channel).
    dbns_digit_t w [NTAPS];
    for (genvar i = 0; i < int'(NTAPS); i++) begin : g_w
      assign w[i] = coef[NTAPS-1-i][cd];
    end
    for (genvar dd = 0; dd < 2; dd++) begin : g_ddig
      dbns_channel #(.NTAPS(NTAPS), .MW(MW), .ACC_W(ACC_W), .FRAC_W(FRAC_W)) u_ch (
        .clk   (clk),
        .rst_n (rst_n),
        .w     (w),
        .x_in  (x_in[dd]),
        .y_out (ch_y[2*cd+dd]),
        .sat   (ch_sat[2*cd+dd])
      );
    end
  end

  dbns_channel_sum #(.NCH(NCH), .ACC_W(ACC_W)) u_sum (
    .clk   (clk),
    .rst_n (rst_n),
    .ch    (ch_y),
    .y     (y_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) sat <= 1'b0;
    else        sat <= |ch_sat;
  end

endmodule
