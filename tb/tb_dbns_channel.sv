// tb_dbns_channel -- checks one systolic channel against a direct
// convolution: y_out(n) = sum_i w[i] * x(n - 2*NTAPS + i), with random
// weights and data, within the rounding error of every product.
module tb_dbns_channel;
  import dbns_pkg::*;
  import dbns_tb_pkg::*;

  localparam int unsigned NTAPS = 7, MW = 16, ACC_W = 32, FRAC_W = 16;
  localparam int NCYC = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  dbns_digit_t             w [NTAPS];
  dbns_digit_t             x_in;
  logic signed [ACC_W-1:0] y_out;
  logic                    sat;
  int checks = 0, failures = 0;
  real xv [NCYC];

  dbns_channel #(.NTAPS(NTAPS), .MW(MW), .ACC_W(ACC_W), .FRAC_W(FRAC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r, mag, tol;
    int  k;
    foreach (w[i]) w[i] = rand_digit(-16, -4, -8, 2, 6);
    x_in = DIGIT_ZERO;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      x_in  = rand_digit(0, 6, 0, 2, 6);
      xv[n] = digit_val(x_in);
      @(posedge clk);
      #1;
      // y_out now belongs to output index n+1 (inputs 0..n have been taken)
      r = 0.0; mag = 0.0;
      for (int i = 0; i < int'(NTAPS); i++) begin
        k = n + 1 - 2 * int'(NTAPS) + i;
        if (k >= 0) begin
          r   += digit_val(w[i]) * xv[k];
          mag += fabs(digit_val(w[i]) * xv[k]);
        end
      end
      r   *= pow2(FRAC_W);
      tol  = mag * pow2(FRAC_W) * pow2(-int'(MW)) + real'(NTAPS);
      checks++;
      if (fabs(real'(y_out) - r) > tol || sat) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y_out=%0d ref=%g", n, y_out, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
