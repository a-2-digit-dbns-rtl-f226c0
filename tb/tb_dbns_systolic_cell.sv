// tb_dbns_systolic_cell -- checks one systolic node cycle by cycle.
//
// With random weight, data and partial sums each cycle, x_out must be x_in
// of one cycle earlier and y_out must be y_in + w * x_in of two cycles
// earlier (within mantissa rounding and one LSB), zero right after reset.
module tb_dbns_systolic_cell;
  import dbns_pkg::*;
  import dbns_tb_pkg::*;

  localparam int unsigned MW = 16, ACC_W = 32, FRAC_W = 16;
  localparam int NCYC = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  dbns_digit_t             w, x_in, x_out;
  logic signed [ACC_W-1:0] y_in, y_out;
  logic                    sat;
  int checks = 0, failures = 0;

  dbns_systolic_cell #(.MW(MW), .ACC_W(ACC_W), .FRAC_W(FRAC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real         ref_y [NCYC];
  real         ref_p [NCYC];
  dbns_digit_t ref_x [NCYC];

  initial begin
    real tol;
    w = DIGIT_ZERO; x_in = DIGIT_ZERO; y_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (x_out != DIGIT_ZERO || y_out != 0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    for (int n = 0; n < NCYC; n++) begin
      w    = rand_digit(-12, 0, -6, 2, 8);
      x_in = rand_digit(-2, 6, -2, 3, 8);
      y_in = ACC_W'(int'($urandom % 2000000) - 1000000);
      ref_x[n] = x_in;
      ref_p[n] = digit_val(w) * digit_val(x_in) * pow2(FRAC_W);
      ref_y[n] = real'(y_in) + ref_p[n];
      @(posedge clk);
      #1;
      checks++;
      if (x_out != ref_x[n]) begin
        failures++;
        $display("FAIL cycle %0d x_out", n);
      end
      if (n >= 1) begin
        tol = fabs(ref_p[n-1]) * pow2(-int'(MW)) + 1.0;
        checks++;
        if (fabs(real'(y_out) - ref_y[n-1]) > tol) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d y_out=%0d ref=%g", n, y_out, ref_y[n-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
