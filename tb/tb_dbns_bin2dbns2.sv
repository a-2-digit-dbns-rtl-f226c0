// tb_dbns_bin2dbns2 -- exhaustive check of the binary to 2-digit DBNS
// converter. For every 10-bit sample the testbench runs its own greedy search
// (closest digit, then closest digit to the remainder, smallest b then t on
// ties) in real arithmetic and compares the digits; it also checks that the
// value of the two digits is within 0.36 of the sample.
module tb_dbns_bin2dbns2;
  import dbns_pkg::*;
  import dbns_tb_pkg::*;

  localparam int unsigned DW = 10;

  logic signed [DW-1:0] x_bin;
  dbns2_t               dbns;
  int checks = 0, failures = 0, n_inexact = 0;

  dbns_bin2dbns2 #(.DW(DW)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dbns_digit_t d0, d1;
    real         m, err;
    for (int x = -512; x <= 511; x++) begin
      x_bin = DW'(x);
      #1;
      m  = real'(x);
      d0 = nearest(m);
      d1 = nearest(m - digit_val(d0));
      err = fabs(word_val(dbns) - m);
      if (err > 1e-9) n_inexact++;
      checks++;
      if (dbns[0] != d0 || dbns[1] != d1 || err > 0.36) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d got %p expected %p %p err=%g", x, dbns, d0, d1, err);
      end
    end
    $display("inexact conversions: %0d of 1024", n_inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
