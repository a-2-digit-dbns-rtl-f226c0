// dbns_ternary_rom -- ternary exponent ROM of the single-digit DBNS ALU.
//
// The ALU adds the ternary exponents of coefficient and data and must turn
// 3^t into something a binary datapath can use. This ROM holds, for every
// possible exponent sum t in [T_MIN, T_MAX], the floating-point binary value
// 3^t ~= mant * 2^(exp - (MW-1)), with mant normalised so that its bit MW-1
// is set (value in [1,2)) and rounded to nearest. The ROM, its input (the
// ternary sum) and its two outputs (mantissa M_T and exponent b_T) follow the
// ALU the design is built from; the mantissa width MW and the rounding are
// this design's own choice, since only the mapping itself is specified.
//
// The table is computed at elaboration by dbns_pkg::ternary_entry(), so the
// contents need no data file. Purely combinational: the outputs follow t_sum
// in the same cycle.
module dbns_ternary_rom
  import dbns_pkg::*;
#(
  parameter int unsigned MW = 16           // mantissa bits, leading one included
) (
  input  logic signed [SUM_TW-1:0] t_sum,  // ternary exponent sum
  output logic        [MW-1:0]     mant,   // M_T, bit MW-1 always set
  output logic signed [EXP_W-1:0]  exp     // b_T
);

  logic        [MW-1:0]    mant_tab [ROM_DEPTH];
  logic signed [EXP_W-1:0] exp_tab  [ROM_DEPTH];

  // Entry i holds 3^(T_MIN+i); ternary_entry() packs {exponent, mantissa}.
  for (genvar i = 0; i < int'(ROM_DEPTH); i++) begin : g_tab
    localparam logic [63:0] ENTRY = ternary_entry(T_MIN + i, MW);
    assign mant_tab[i] = ENTRY[MW-1:0];
    assign exp_tab[i]  = ENTRY[32+EXP_W-1:32];
  end

  // Address: offset the signed sum so that T_MIN maps to entry 0.
  logic [SUM_TW-1:0] addr;
  assign addr = SUM_TW'(t_sum - SUM_TW'(T_MIN));

  always_comb begin
    mant = mant_tab[addr];
    exp  = exp_tab[addr];
  end

endmodule
