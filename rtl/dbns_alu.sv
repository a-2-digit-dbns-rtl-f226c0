// dbns_alu -- single-digit DBNS inner-product step: y_out = y_in + h_c * h_d.
//
// The coefficient digit h_c = s_c 2^b_c 3^t_c and the data digit
// h_d = s_d 2^b_d 3^t_d are multiplied in the index domain: the binary
// exponents are added, the ternary exponents are added, and the signs are
// multiplied. The ternary sum addresses a ROM that returns 3^t as a binary
// floating-point number M_T * 2^b_T; b_T is added to the binary sum, and a
// barrel shifter turns the result into a fixed-point product that is added
// to the incoming partial sum in ordinary two's complement binary. This
// structure (two exponent adders, ROM, exponent-sum adder, shifter,
// accumulating adder) is the one the design is built from. The accumulator
// wraps on overflow (enough integer bits are assumed); the product saturates
// and raises sat when a single product exceeds the word.
//
// Combinational; a systolic cell around it supplies the registers.
module dbns_alu
  import dbns_pkg::*;
#(
  parameter int unsigned MW     = 16,
  parameter int unsigned ACC_W  = 32,
  parameter int unsigned FRAC_W = 16
) (
  input  dbns_digit_t              hc,     // coefficient digit
  input  dbns_digit_t              hd,     // data digit
  input  logic signed [ACC_W-1:0]  y_in,   // y(n)
  output logic signed [ACC_W-1:0]  y_out,  // y(n+1) = y(n) + hc*hd
  output logic                     sat     // product saturated
);

  logic signed [SUM_BW-1:0] b_sum;
  logic signed [SUM_TW-1:0] t_sum;
  logic                     p_nz, p_neg;
  logic        [MW-1:0]     mant;
  logic signed [EXP_W-1:0]  exp_t;
  logic signed [ACC_W-1:0]  prod;

  // Index-domain multiplication (binary and ternary exponent adders, sign).
  always_comb begin
    b_sum = SUM_BW'(hc.b) + SUM_BW'(hd.b);
    t_sum = SUM_TW'(hc.t) + SUM_TW'(hd.t);
    p_nz  = hc.nz & hd.nz;
    p_neg = hc.neg ^ hd.neg;
  end

  dbns_ternary_rom #(.MW(MW)) u_rom (
    .t_sum (t_sum),
    .mant  (mant),
    .exp   (exp_t)
  );

  dbns_fp2fix #(.MW(MW), .ACC_W(ACC_W), .FRAC_W(FRAC_W)) u_shift (
    .mant  (mant),
    .exp_t (exp_t),
    .b_sum (b_sum),
    .nz    (p_nz),
    .neg   (p_neg),
    .prod  (prod),
    .sat   (sat)
  );

  assign y_out = y_in + prod;

endmodule
