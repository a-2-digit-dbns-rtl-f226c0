// tb_dbns2_fir -- end-to-end test of the 2-digit DBNS FIR filter at its
// default size (53 taps, 10-bit samples, 5-bit/4-bit exponents).
//
// Coefficients: a 53-tap low-pass filter (Blackman-windowed sinc, cut-off at
// 0.382 of the Nyquist frequency), each coefficient mapped to its greedy
// 2-digit DBNS form by the testbench. The phases are:
//   1. impulse: a single sample of 1 must reproduce the coefficients, first
//      output exactly NTAPS+2 cycles after the sample is taken;
//   2. random 10-bit samples, compared every cycle with a direct convolution
//      of the DBNS coefficient values and the testbench's own greedy 2-digit
//      form of each sample (tolerance: mantissa rounding of every product plus
//      one LSB per product); then the same with random, asymmetric 2-digit
//      coefficients, so that the order of the taps is checked too;
//   3. saturation: one coefficient is replaced by 2^15 * 3^7, whose products
//      exceed the word; the sat flag must rise;
//   4. reset in mid-stream must clear the output.
// Events counted (each must occur at least once): zero digits in the data,
// zero second digits in the coefficients, negative digits, inexact sample
// conversions, saturation, reset clearing.
module tb_dbns2_fir;
  import dbns_pkg::*;
  import dbns_tb_pkg::*;

  localparam int NTAPS = 53, DW = 10, MW = 16, ACC_W = 32, FRAC_W = 16;
  localparam int LAT   = NTAPS + 2;
  localparam int NRAND = 1500;
  localparam int NRAND2 = 400;
  localparam int NCYC  = 4 * LAT + NRAND + NRAND2 + 200;
  localparam real PI   = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  dbns2_t                  coef [NTAPS];
  logic signed [DW-1:0]    x_bin;
  logic signed [ACC_W-1:0] y_out;
  logic                    sat;

  dbns2_fir dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_zero_data = 0, n_zero_coef = 0, n_neg = 0, n_inexact = 0, n_sat = 0, n_reset = 0;

  task automatic done();
    $display("events: zero_data=%0d zero_coef_digit=%0d negative=%0d inexact_conv=%0d sat=%0d reset=%0d",
             n_zero_data, n_zero_coef, n_neg, n_inexact, n_sat, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    repeat (NCYC) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    done();
  end

  real hv [NTAPS];           // DBNS value of each coefficient
  real xv [NCYC];            // DBNS value of each sample fed, by sample index
  int  nfed = 0;

  // Reference: output visible after the edge that takes sample n.
  function automatic void ref_out(int n, output real r, output real tol);
    real mag;
    int  j;
    r = 0.0; mag = 0.0;
    for (int k = 0; k < NTAPS; k++) begin
      j = n + 1 - LAT - k;
      if (j >= 0) begin
        r   += hv[k] * xv[j];
        mag += fabs(hv[k] * xv[j]);
      end
    end
    r   *= pow2(FRAC_W);
    tol  = mag * pow2(FRAC_W) * pow2(-MW) + 4.0 * NTAPS + 1.0;
  endfunction

  task automatic feed(int x, bit check);
    dbns2_t xd;
    real    r, tol;
    x_bin = DW'(x);
    xd = to_dbns2(real'(x));
    xv[nfed] = word_val(xd);
    if (!xd[0].nz || !xd[1].nz) n_zero_data++;
    if (xd[0].neg || xd[1].neg) n_neg++;
    if (fabs(xv[nfed] - real'(x)) > 1e-9) n_inexact++;
    @(posedge clk);
    #1;
    if (check) begin
      ref_out(nfed, r, tol);
      checks++;
      if (fabs(real'(y_out) - r) > tol || sat) begin
        failures++;
        if (failures < 10)
          $display("FAIL sample %0d y_out=%0d ref=%g tol=%g sat=%b", nfed, y_out, r, tol, sat);
      end
    end
    nfed++;
  endtask

  initial begin
    real h, wn, wc;
    int  first_nz;
    // --- coefficients ---------------------------------------------------
    wc = 0.382 * PI;
    for (int k = 0; k < NTAPS; k++) begin
      real m;
      m  = real'(k) - real'(NTAPS - 1) / 2.0;
      h  = (m == 0.0) ? wc / PI : $sin(wc * m) / (PI * m);
      wn = 0.42 - 0.5 * $cos(2.0 * PI * k / (NTAPS - 1)) + 0.08 * $cos(4.0 * PI * k / (NTAPS - 1));
      coef[k] = to_dbns2(h * wn);
      hv[k]   = word_val(coef[k]);
      if (!coef[k][1].nz) n_zero_coef++;
      if (coef[k][0].neg || coef[k][1].neg) n_neg++;
    end
    x_bin = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // --- 1. impulse -----------------------------------------------------
    first_nz = -1;
    feed(1, 1'b1);
    for (int i = 1; i < LAT + NTAPS + 2; i++) begin
      feed(0, 1'b1);
      if (first_nz < 0 && y_out != 0) first_nz = i;
    end
    checks++;
    // sample 0 taken at the first edge; its response appears LAT edges later
    if (first_nz != LAT - 1 + (hv[0] == 0.0 ? 1 : 0)) begin
      failures++;
      $display("FAIL impulse latency: first output after %0d edges, expected %0d", first_nz + 1, LAT);
    end

    // --- 2. random samples ----------------------------------------------
    for (int i = 0; i < NRAND; i++) feed(urange(-512, 511), 1'b1);

    // --- 2b. random, asymmetric coefficients (tap order matters) ---------
    for (int k = 0; k < NTAPS; k++) begin
      coef[k][0] = rand_digit(-16, -4, -8, 2, 0);
      coef[k][1] = rand_digit(-16, -6, -8, 1, 4);
      hv[k]      = word_val(coef[k]);
    end
    rst_n = 1'b0;
    x_bin = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    nfed = 0;
    for (int i = 0; i < NRAND2; i++) feed(urange(-512, 511), 1'b1);

    // --- 3. saturation --------------------------------------------------
    coef[0][0] = '{nz: 1'b1, neg: 1'b0, b: 5'sd15, t: 4'sd7};
    coef[0][1] = DIGIT_ZERO;
    for (int i = 0; i < 2 * LAT; i++) begin
      x_bin = DW'(511);
      @(posedge clk);
      #1;
      if (sat) n_sat++;
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL sat never asserted");
    end

    // --- 4. reset ---------------------------------------------------------
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (y_out == 0 && !sat) n_reset++;
    else begin
      failures++;
      $display("FAIL reset did not clear the output");
    end

    // --- events -----------------------------------------------------------
    checks++;
    if (n_zero_data == 0 || n_zero_coef == 0 || n_neg == 0 || n_inexact == 0 ||
        n_sat == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL an event never occurred");
    end
    done();
  end
endmodule
