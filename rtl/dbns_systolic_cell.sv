// dbns_systolic_cell -- one node W_i of the systolic convolver.
//
// Each node holds a fixed DBNS weight digit w and a single-digit DBNS ALU.
// Data and partial sums both travel left to right: the data digit leaves the
// node through one register (delay D) and the updated partial sum
// y_in + w * x_in leaves through two registers (delay 2D). Chaining such
// nodes gives a convolver in which every node sees each sample while the
// partial sum for one output passes by, as in the classic systolic FIR array
// with unequal data and result speeds. The registers are placed at the
// node's outputs, so a chain of N nodes adds N cycles to the data path and
// 2N to the sum path; that placement and the synchronous active-low reset
// (which clears all registers to zero) are this design's own choices.
//
// sat is combinational: it flags a saturated product in the current cycle.
module dbns_systolic_cell
  import dbns_pkg::*;
#(
  parameter int unsigned MW     = 16,
  parameter int unsigned ACC_W  = 32,
  parameter int unsigned FRAC_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  dbns_digit_t             w,      // weight digit of this node
  input  dbns_digit_t             x_in,   // data digit from the left
  input  logic signed [ACC_W-1:0] y_in,   // partial sum from the left
  output dbns_digit_t             x_out,  // data digit, delayed by 1 (D)
  output logic signed [ACC_W-1:0] y_out,  // partial sum, delayed by 2 (2D)
  output logic                    sat
);

  logic signed [ACC_W-1:0] y_next;
  logic signed [ACC_W-1:0] y_mid;

  dbns_alu #(.MW(MW), .ACC_W(ACC_W), .FRAC_W(FRAC_W)) u_alu (
    .hc    (w),
    .hd    (x_in),
    .y_in  (y_in),
    .y_out (y_next),
    .sat   (sat)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_out <= DIGIT_ZERO;
      y_mid <= '0;
      y_out <= '0;
    end else begin
      x_out <= x_in;
      y_mid <= y_next;
      y_out <= y_mid;
    end
  end

endmodule
