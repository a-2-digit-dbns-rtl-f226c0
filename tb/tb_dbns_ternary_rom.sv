// tb_dbns_ternary_rom -- exhaustive check of the ternary exponent ROM.
//
// For every ternary exponent sum t the ROM must return a normalised mantissa
// (top bit set) and an exponent such that mant * 2^(exp-(MW-1)) is 3^t
// rounded to the nearest mantissa step, computed here in real arithmetic.
module tb_dbns_ternary_rom;
  import dbns_pkg::*;
  import dbns_tb_pkg::*;

  localparam int unsigned MW = 16;

  logic signed [SUM_TW-1:0] t_sum;
  logic        [MW-1:0]     mant;
  logic signed [EXP_W-1:0]  exp;
  int checks = 0, failures = 0;

  dbns_ternary_rom #(.MW(MW)) dut (.t_sum(t_sum), .mant(mant), .exp(exp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real exact, got, step;
    for (int t = T_MIN; t <= T_MAX; t++) begin
      t_sum = SUM_TW'(t);
      #1;
      exact = pow3(t);
      step  = pow2(int'(exp) - int'(MW) + 1);
      got   = real'(mant) * step;
      checks++;
      if (!mant[MW-1] || fabs(got - exact) > 0.5 * step + 1e-30) begin
        failures++;
        $display("FAIL t=%0d mant=%h exp=%0d got=%g exact=%g", t, mant, exp, got, exact);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
