// tb_dbns_fp2fix -- random and corner checks of the exponent-sum adder and
// barrel shifter. The expected product is floor(mant * 2^(e - MW + 1 +
// FRAC_W)) in real arithmetic, clamped to the largest positive word, with the
// sign applied afterwards; left shifts, right shifts, underflow to zero and
// saturation must all occur.
module tb_dbns_fp2fix;
  import dbns_pkg::*;
  import dbns_tb_pkg::*;

  localparam int unsigned MW = 16, ACC_W = 32, FRAC_W = 16;

  logic        [MW-1:0]     mant;
  logic signed [EXP_W-1:0]  exp_t;
  logic signed [SUM_BW-1:0] b_sum;
  logic                     nz, neg;
  logic signed [ACC_W-1:0]  prod;
  logic                     sat;
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_unf = 0, n_sat = 0;

  dbns_fp2fix #(.MW(MW), .ACC_W(ACC_W), .FRAC_W(FRAC_W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real    v, maxv;
    longint exp_mag, exp_prod;
    logic   exp_sat;
    int     e;
    maxv = pow2(ACC_W - 1) - 1.0;
    for (int n = 0; n < 4000; n++) begin
      mant  = {1'b1, (MW-1)'($urandom)};
      exp_t = EXP_W'(urange(-26, 22));
      b_sum = SUM_BW'(urange(-32, 30));
      nz    = ($urandom % 8) != 0;
      neg   = 1'($urandom);
      #1;
      e = int'(exp_t) + int'(b_sum) - int'(MW) + 1 + int'(FRAC_W);
      v = real'(mant) * pow2(e);
      exp_sat = 1'b0;
      if (v > maxv) begin
        exp_mag = longint'(maxv);
        exp_sat = nz;
      end else begin
        exp_mag = longint'($floor(v));
      end
      exp_prod = !nz ? 0 : (neg ? -exp_mag : exp_mag);
      if (nz && exp_sat) n_sat++;
      else if (nz && exp_mag == 0) n_unf++;
      else if (nz && e >= 0) n_left++;
      else if (nz) n_right++;
      checks++;
      if (longint'(prod) != exp_prod || sat != exp_sat) begin
        failures++;
        if (failures < 10)
          $display("FAIL mant=%h exp_t=%0d b_sum=%0d nz=%b neg=%b prod=%0d sat=%b exp=%0d/%b",
                   mant, exp_t, b_sum, nz, neg, prod, sat, exp_prod, exp_sat);
      end
    end
    checks++;
    if (n_left == 0 || n_right == 0 || n_unf == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL coverage left=%0d right=%0d underflow=%0d sat=%0d",
               n_left, n_right, n_unf, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
