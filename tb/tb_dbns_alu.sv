// tb_dbns_alu -- random checks of the single-digit DBNS ALU.
//
// y_out must equal y_in + s_c s_d 2^(b_c+b_d) 3^(t_c+t_d) in fixed point
// (FRAC_W fractional bits), within the error of an MW-bit rounded mantissa
// plus one truncated LSB; products beyond the word must saturate and set sat.
module tb_dbns_alu;
  import dbns_pkg::*;
  import dbns_tb_pkg::*;

  localparam int unsigned MW = 16, ACC_W = 32, FRAC_W = 16;

  dbns_digit_t             hc, hd;
  logic signed [ACC_W-1:0] y_in, y_out;
  logic                    sat;
  int checks = 0, failures = 0, n_sat = 0;

  dbns_alu #(.MW(MW), .ACC_W(ACC_W), .FRAC_W(FRAC_W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real p, tol, got, maxv;
    logic exp_sat;
    maxv = pow2(ACC_W - 1) - 1.0;
    for (int n = 0; n < 5000; n++) begin
      hc   = rand_digit(-16, 15, -8, 7, 10);
      hd   = rand_digit(-16, 15, -8, 7, 10);
      y_in = ACC_W'(int'($urandom % 2000000) - 1000000);
      #1;
      p = digit_val(hc) * digit_val(hd) * pow2(FRAC_W);
      exp_sat = fabs(p) > maxv;
      checks++;
      if (exp_sat) begin
        n_sat++;
        if (!sat || (y_out - y_in) != (p > 0 ? ACC_W'(maxv) : -ACC_W'(maxv))) begin
          failures++;
          $display("FAIL sat case p=%g y_out-y_in=%0d sat=%b", p, y_out - y_in, sat);
        end
      end else begin
        got = real'(y_out) - real'(y_in);
        tol = fabs(p) * pow2(-int'(MW)) + 1.0;
        if (sat || fabs(got - p) > tol) begin
          failures++;
          if (failures < 10)
            $display("FAIL hc=%p hd=%p p=%g got=%g sat=%b", hc, hd, p, got, sat);
        end
      end
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL no saturating product drawn");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
