// dbns_channel -- one channel of the 2-digit DBNS filter: a systolic FIR
// convolver of NTAPS single-digit DBNS nodes.
//
// A channel multiplies one digit stream of the data (x_in) by one digit of
// every coefficient. Node i holds weight w[i]; the data digit enters node 0
// and moves one node per cycle, and the partial sum starts at zero at node 0
// and moves one node every two cycles. With registers at each node's outputs
// the channel computes
//     y_out(n) = sum_{i=0}^{NTAPS-1} w[i] * x(n - 2*NTAPS + i),
// so with w[i] = h[NTAPS-1-i] it is the FIR convolution
//     y_out(n) = sum_k h[k] * x(n - (NTAPS+1) - k)
// with a latency of NTAPS+1 cycles. The caller chooses the weight order.
// sat is the OR of all nodes' product-saturation flags in this cycle.
module dbns_channel
  import dbns_pkg::*;
#(
  parameter int unsigned NTAPS  = 53,
  parameter int unsigned MW     = 16,
  parameter int unsigned ACC_W  = 32,
  parameter int unsigned FRAC_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  dbns_digit_t             w [NTAPS],  // weight of node i
  input  dbns_digit_t             x_in,       // data digit stream
  output logic signed [ACC_W-1:0] y_out,      // channel output
  output logic                    sat
);

  dbns_digit_t             x_chain [NTAPS+1];
  logic signed [ACC_W-1:0] y_chain [NTAPS+1];
  logic        [NTAPS-1:0] sat_v;

  assign x_chain[0] = x_in;
  assign y_chain[0] = '0;

  for (genvar i = 0; i < int'(NTAPS); i++) begin : g_node
    dbns_systolic_cell #(.MW(MW), .ACC_W(ACC_W), .FRAC_W(FRAC_W)) u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .w     (w[i]),
      .x_in  (x_chain[i]),
      .y_in  (y_chain[i]),
      .x_out (x_chain[i+1]),
      .y_out (y_chain[i+1]),
      .sat   (sat_v[i])
    );
  end

  assign y_out = y_chain[NTAPS];
  assign sat   = |sat_v;

endmodule
