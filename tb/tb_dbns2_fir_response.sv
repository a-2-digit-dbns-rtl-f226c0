// tb_dbns2_fir_response -- frequency response of the 53-tap filter, measured
// on the hardware.
//
// The filter is loaded with a 53-tap low-pass design (Blackman-windowed sinc,
// cut-off 0.382 of Nyquist) whose coefficients are mapped to their greedy
// 2-digit DBNS form. An impulse of height 256 (an exact single DBNS digit) is
// fed in and the 53 output samples, scaled back, give the impulse response
// that the hardware actually realises. Its magnitude response, evaluated at
// 512 frequencies, is compared with that of the unmapped design:
//   - largest difference of the two magnitude responses below 3e-4;
//   - stop-band (0.5 to 1 times Nyquist) level of the hardware below -70 dB;
//   - DC gain of the hardware within 1e-3 of 1.
// The measured numbers are printed. The response is read starting exactly
// NTAPS+2 cycles after the impulse, so the latency is checked as well.
module tb_dbns2_fir_response;
  import dbns_pkg::*;
  import dbns_tb_pkg::*;

  localparam int NTAPS = 53, DW = 10, FRAC_W = 16, ACC_W = 32;
  localparam int LAT   = NTAPS + 2;
  localparam int NF    = 512;
  localparam real PI   = 3.14159265358979323846;
  localparam int IMP   = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  dbns2_t                  coef [NTAPS];
  logic signed [DW-1:0]    x_bin;
  logic signed [ACC_W-1:0] y_out;
  logic                    sat;

  dbns2_fir dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (LAT + NTAPS + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real hd [NTAPS];   // designed (real) coefficients
  real hw [NTAPS];   // impulse response measured on the hardware

  function automatic real mag_resp(real h [NTAPS], real w);
    real re, im;
    re = 0.0; im = 0.0;
    for (int k = 0; k < NTAPS; k++) begin
      re += h[k] * $cos(w * k);
      im -= h[k] * $sin(w * k);
    end
    return $sqrt(re * re + im * im);
  endfunction

  initial begin
    real wc, m, wn, w, a, b, maxerr, sb, dc;
    wc = 0.382 * PI;
    for (int k = 0; k < NTAPS; k++) begin
      m  = real'(k) - real'(NTAPS - 1) / 2.0;
      hd[k] = (m == 0.0) ? wc / PI : $sin(wc * m) / (PI * m);
      wn = 0.42 - 0.5 * $cos(2.0 * PI * k / (NTAPS - 1)) + 0.08 * $cos(4.0 * PI * k / (NTAPS - 1));
      hd[k] = hd[k] * wn;
      coef[k] = to_dbns2(hd[k]);
    end
    x_bin = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    x_bin = DW'(IMP);
    @(posedge clk);
    #1 x_bin = '0;
    // the impulse was taken at the edge above; output k appears LAT-1+k edges later
    repeat (LAT - 2) @(posedge clk);
    #1;
    checks++;
    if (y_out != 0) begin
      failures++;
      $display("FAIL output before the latency has elapsed: %0d", y_out);
    end
    for (int k = 0; k < NTAPS; k++) begin
      @(posedge clk);
      #1;
      hw[k] = real'(y_out) / (real'(IMP) * pow2(FRAC_W));
    end
    maxerr = 0.0; sb = 0.0;
    for (int i = 0; i < NF; i++) begin
      w = PI * i / (NF - 1);
      a = mag_resp(hd, w);
      b = mag_resp(hw, w);
      if (fabs(a - b) > maxerr) maxerr = fabs(a - b);
      if (w >= 0.5 * PI && b > sb) sb = b;
    end
    dc = mag_resp(hw, 0.0);
    $display("largest magnitude-response error %g, stop-band level %0.1f dB, DC gain %f",
             maxerr, 20.0 * $log10(sb), dc);
    checks++;
    if (maxerr > 3e-4) begin
      failures++;
      $display("FAIL response error too large");
    end
    checks++;
    if (20.0 * $log10(sb) > -70.0) begin
      failures++;
      $display("FAIL stop band above -70 dB");
    end
    checks++;
    if (fabs(dc - 1.0) > 1e-3) begin
      failures++;
      $display("FAIL DC gain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
