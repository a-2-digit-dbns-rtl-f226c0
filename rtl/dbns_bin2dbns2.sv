// dbns_bin2dbns2 -- converts signed binary samples to 2-digit DBNS words.
//
// The filter takes its data as two DBNS digits per sample. This converter is
// a lookup table indexed by the sample's magnitude (0 .. 2^(DW-1)); the sign
// of the sample is applied afterwards by flipping both digits' signs. Each
// entry follows a greedy rule: the first digit is the single DBNS digit
// s*2^b*3^t (b in [-16,15], t in [-8,7]) closest to the magnitude, and the
// second digit is the one closest to what remains (zero if no digit is
// closer than zero). Among equally close digits the one with the smaller b,
// then the smaller t, is kept. Only the converter's purpose and the exponent
// widths follow the filter this design is built for; the greedy table is
// this design's own choice. It is not exact for every sample (466, for
// instance, has no exact two-digit form with these exponents), but for
// 10-bit samples the two digits always lie within 0.36 of the sample.
//
// The 513 entries are read from dbns_bin2dbns2.hex, one entry per line,
// {second digit, first digit}, each digit packed as dbns_digit_t
// {nz, neg, b[4:0], t[3:0]}. The table is built for DW = 10 and the package's
// 5-bit/4-bit exponents. Combinational: dbns follows x_bin in the same cycle.
module dbns_bin2dbns2
  import dbns_pkg::*;
#(
  parameter int unsigned DW = 10                 // binary sample width (signed)
) (
  input  logic signed [DW-1:0] x_bin,            // two's-complement sample
  output dbns2_t               dbns              // dbns[0] + dbns[1] ~= x_bin
);

  localparam int MAXM = 2 ** (DW - 1);           // largest magnitude, of -2^(DW-1)

  dbns2_t table_q [MAXM+1];

  initial $readmemh("rtl/dbns_bin2dbns2.hex", table_q);

  logic [DW-1:0] mag;
  dbns2_t        ent;

  always_comb begin
    mag = (x_bin < 0) ? DW'(-x_bin) : DW'(x_bin); // -2^(DW-1) gives 2^(DW-1)
    ent = table_q[mag];
    if (x_bin < 0) begin
      ent[0].neg = ent[0].nz & ~ent[0].neg;
      ent[1].neg = ent[1].nz & ~ent[1].neg;
    end
    dbns = ent;
  end

endmodule
