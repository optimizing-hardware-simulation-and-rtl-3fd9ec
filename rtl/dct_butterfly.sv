// dct_butterfly: the N/2 sum and difference cells at the input of an
// N-point 1D-DCT.
//
// Cell i takes the mirrored pair x_i and x_(N-1-i) and forms
// s_i = x_i + x_(N-1-i) and d_i = x_i - x_(N-1-i), all cells at once. The
// sums feed the even output rows (Z0, Z2, ...), the differences the odd
// rows. Inputs are two's-complement IW-bit; results are IW+1 bits, so
// nothing overflows (9 bits for the 8-bit first stage, as in the source
// design). Purely combinational.
module dct_butterfly #(
  parameter int N  = 8,
  parameter int IW = 8
) (
  input  logic [N-1:0][IW-1:0]   x,  // x[i] = sample i, signed
  output logic [N/2-1:0][IW:0]   s,  // s[i] = x_i + x_(N-1-i), signed
  output logic [N/2-1:0][IW:0]   d   // d[i] = x_i - x_(N-1-i), signed
);

  always_comb begin
    for (int i = 0; i < N / 2; i++) begin
      s[i] = (IW+1)'($signed(x[i])) + (IW+1)'($signed(x[N-1-i]));
      d[i] = (IW+1)'($signed(x[i])) - (IW+1)'($signed(x[N-1-i]));
    end
  end

endmodule
