// dbns_fp2fix -- exponent-sum adder and barrel shifter of the DBNS ALU.
//
// After the ternary ROM the product of two DBNS digits is a binary
// floating-point number: mantissa M_T (MW bits, value M_T / 2^(MW-1) in
// [1,2)) times 2^(b_T + b), where b is the sum of the two binary exponents.
// This block performs the second exponent addition (b_T + b) and then shifts
// the mantissa into a signed fixed-point word of ACC_W bits with FRAC_W
// fractional bits, applying the product sign. These two steps are the ones of
// the ALU the design follows; the fixed-point format, truncation of bits
// shifted out to the right (toward zero on the magnitude), and saturation of
// products too large for the word (flagged on sat) are this design's choices.
//
// Combinational; no clock.
module dbns_fp2fix
  import dbns_pkg::*;
#(
  parameter int unsigned MW     = 16,    // mantissa bits, leading one included
  parameter int unsigned ACC_W  = 32,    // fixed-point product width (signed)
  parameter int unsigned FRAC_W = 16     // fractional bits of the product
) (
  input  logic        [MW-1:0]     mant,   // M_T from the ROM
  input  logic signed [EXP_W-1:0]  exp_t,  // b_T from the ROM
  input  logic signed [SUM_BW-1:0] b_sum,  // binary exponent sum b_c + b_d
  input  logic                     nz,     // product is non-zero
  input  logic                     neg,    // product is negative
  output logic signed [ACC_W-1:0]  prod,   // sign * M_T * 2^(b_T+b), fixed point
  output logic                     sat     // magnitude saturated
);

  localparam logic [ACC_W-1:0] MAX_MAG = {1'b0, {(ACC_W-1){1'b1}}};
  // Signed constants of the shift logic.
  localparam logic signed [EXP_W-1:0] SH_OFS = EXP_W'(int'(FRAC_W) - int'(MW) + 1);
  localparam logic signed [EXP_W-1:0] SH_SAT = EXP_W'(int'(ACC_W) - int'(MW));
  localparam logic signed [EXP_W-1:0] SH_UNF = EXP_W'(int'(MW));

  // Shift distance: the exponent sum, corrected for the mantissa's binary
  // point (MW-1) and the output's binary point (FRAC_W).
  logic signed [EXP_W-1:0] exp_sum;
  logic signed [EXP_W-1:0] sh;
  logic        [ACC_W-1:0] mag;

  always_comb begin
    exp_sum = exp_t + EXP_W'(b_sum);
    sh      = exp_sum + SH_OFS;
    sat     = 1'b0;
    if (sh >= SH_SAT) begin
      mag = MAX_MAG;                              // leading one beyond bit ACC_W-2
      sat = nz;
    end else if (sh >= 0) begin
      mag = ACC_W'(mant) << sh;
    end else if (-sh < SH_UNF) begin
      mag = ACC_W'(mant >> (-sh));
    end else begin
      mag = '0;                                   // underflow: all bits shifted out
    end
    if (!nz)      prod = '0;
    else if (neg) prod = -signed'(mag);
    else          prod = signed'(mag);
  end

endmodule
