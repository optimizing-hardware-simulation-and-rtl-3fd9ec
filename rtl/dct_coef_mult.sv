// dct_coef_mult: partial-product generator of one constant-weight multiplier
// (one cell of a VI unit).
//
// It multiplies a signed BW-bit butterfly output by a fixed cosine weight
// COEF, given in units of 2^-CW (|COEF| < 2^CW). Following the source
// design, each of the CW magnitude bits C(k) gates a copy of the operand
// through a row of AND gates, shifted left by k: for a 9-bit operand the
// rows cover bits 0-8, 1-9, ..., 5-13. The rows are not added here; they
// leave as CW partial products for the shared carry-save tree
// (dct_pp_sum), which replaces the cell's own accumulator.
// A negative weight is this design's choice of sign handling: the operand
// is negated (in BW+1 bits, so -2^(BW-1) is safe) before the AND rows, and
// the rows carry the magnitude bits. Every row is sign-extended to W bits.
// The source design keeps the weight in a register inside the cell; nothing
// ever loads it, so here it is a parameter. With a constant weight the AND
// rows reduce to wiring in synthesis (a set bit passes the shifted operand,
// a clear bit gives zeros): the outputs are plain shifted copies of the
// operand, and the cost of the multiplier lies in the adder tree.
// Purely combinational.
module dct_coef_mult #(
  parameter int BW   = 9,           // operand width (butterfly output)
  parameter int CW   = 6,           // fraction bits of the weight
  parameter int COEF = 63,          // signed weight, value COEF / 2^CW
  parameter int W    = BW + CW + 3  // width of each partial product
) (
  input  logic [BW-1:0]         i,   // operand, signed
  output logic [CW-1:0][W-1:0]  pp   // pp[k] = C(k) ? operand << k : 0
);

  localparam int            MAG = (COEF < 0) ? -COEF : COEF;
  localparam logic [CW-1:0] CM  = CW'(MAG);

  logic [W-1:0] opnd;  // +/- operand, sign-extended to W bits

  always_comb begin
    if (COEF < 0) opnd = -W'($signed(i));
    else          opnd =  W'($signed(i));
    for (int k = 0; k < CW; k++) begin
      pp[k] = {W{CM[k]}} & (opnd << k);
    end
  end

endmodule
