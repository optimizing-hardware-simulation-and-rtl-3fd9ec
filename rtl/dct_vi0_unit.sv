// dct_vi0_unit: output coefficient Z_0 of an N-point 1D-DCT, the source
// design's VI0 unit (VII0 in the second stage).
//
// Row 0 of the DCT has the weight cos(0) = 1 for every input, so no
// multiplier is needed: Z_0 = I0 + I1 + ... + I(N/2-1) over the butterfly
// sums. For N = 8 this is, as in the source design, two carry-save adders
// (I0, I1, I2 first, then I3) and one carry-lookahead adder
// (dct_csa_chain). Operands are sign-extended to a width that holds the sum
// exactly. Interface: i = butterfly sums (signed, BW bits), z = Z_0 (signed,
// OW bits). Purely combinational.
module dct_vi0_unit #(
  parameter int N  = 8,
  parameter int BW = 9,
  parameter int OW = BW + $clog2(N)
) (
  input  logic [N/2-1:0][BW-1:0] i,
  output logic [OW-1:0]          z
);

  localparam int M = N / 2;
  localparam int W = BW + $clog2(M);

  logic [M-1:0][W-1:0] e;
  logic [W-1:0]        acc;

  always_comb begin
    for (int m = 0; m < M; m++) e[m] = W'($signed(i[m]));
  end

  dct_csa_chain #(.W(W), .M(M)) u_add (.v(e), .sum(acc));

  always_comb z = OW'($signed(acc));

endmodule
