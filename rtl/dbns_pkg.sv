// dbns_pkg -- shared types and constants of the 2-digit DBNS FIR filter.
//
// A double-base number system (DBNS) digit is the 3-tuple {s, b, t} with
// value s * 2^b * 3^t, s in {-1, 0, +1} and b, t small signed integers.
// A 2-digit word is the sum of two such digits. Following the filter the
// design is built for, both data and coefficients use a 5-bit binary exponent
// and a 4-bit ternary exponent per digit. The sign is held as two bits
// (nz = digit non-zero, neg = digit negative); that encoding, and the
// two's-complement coding of the exponents, are this design's own choice.
//
// The package also holds ternary_entry(), the constant function that fills
// the ternary ROM of the DBNS ALU: 3^t written as M * 2^e with the mantissa
// M normalised to [1,2) and rounded to MW bits (the leading one included).
package dbns_pkg;

  // Exponent widths of one digit (two's complement).
  localparam int unsigned DBNS_BW = 5;
  localparam int unsigned DBNS_TW = 4;

  // Widths of exponent sums: the product of two digits needs one more bit.
  localparam int unsigned SUM_BW = DBNS_BW + 1;
  localparam int unsigned SUM_TW = DBNS_TW + 1;

  // Range of the ternary exponent sum, i.e. the ROM address range.
  localparam int T_MIN = -(2 ** DBNS_TW);
  localparam int T_MAX = 2 ** DBNS_TW - 2;
  localparam int unsigned ROM_DEPTH = T_MAX - T_MIN + 1;

  // Width of the signed binary exponent inside the ALU after the ROM
  // (b_T plus the binary exponent sum, plus headroom for the shifter offset).
  localparam int unsigned EXP_W = 9;

  typedef struct packed {
    logic                       nz;   // digit is non-zero
    logic                       neg;  // digit is negative (ignored when nz=0)
    logic signed [DBNS_BW-1:0]  b;    // binary exponent
    logic signed [DBNS_TW-1:0]  t;    // ternary exponent
  } dbns_digit_t;

  // Two-digit DBNS word: value = d[0] + d[1].
  typedef dbns_digit_t [1:0] dbns2_t;

  localparam dbns_digit_t DIGIT_ZERO = '{nz: 1'b0, neg: 1'b0, b: '0, t: '0};

  // floor(log2(v)) for v > 0.
  function automatic int flog2(logic [127:0] v);
    int r;
    r = 0;
    for (int i = 0; i < 128; i++)
      if (v[i]) r = i;
    return r;
  endfunction

  // Mantissa (MW bits, leading one at bit MW-1) of 3^t, rounded to nearest,
  // and its exponent e, so that 3^t ~= mant * 2^(e - (MW-1)).
  // Returned packed as {e (32-bit two's complement), mant (32 bits)}.
  function automatic logic [63:0] ternary_entry(int t, int unsigned MW);
    logic [127:0] p3;
    int           e;
    logic [127:0] num;
    logic [127:0] q;
    int           k;
    int           sh;
    p3 = 128'd1;
    k  = (t < 0) ? -t : t;
    for (int i = 0; i < k; i++) p3 = p3 * 3;
    if (t >= 0) begin
      e = flog2(p3);
      sh = e - int'(MW) + 1;               // bits dropped to keep MW bits
      if (sh > 0) q = (p3 + (128'd1 << (sh - 1))) >> sh;
      else        q = p3 << (-sh);
    end else begin
      // 1/3^k, k >= 1, lies strictly between 2^-(L+1) and 2^-L, L = flog2(3^k).
      e   = -(flog2(p3) + 1);
      num = 128'd1 << (int'(MW) - 1 - e);  // 2^(MW-1-e) / 3^k is in [2^(MW-1), 2^MW)
      q   = (num + (p3 >> 1)) / p3;
    end
    if (q >= (128'd1 << MW)) begin       // rounding carried out: renormalise
      q = q >> 1;
      e = e + 1;
    end
    return {32'(e), q[31:0]};
  endfunction

endpackage
