// dct_vi_unit: one output coefficient Z_p (p = 1..N-1) of an N-point
// 1D-DCT, the source design's VI unit (VII in the second stage).
//
// Z_p = sum over m = 0..N/2-1 of I_m * C_pm, where I_m are the butterfly
// results that row p uses (sums for even p, differences for odd p) and
// C_pm = cos((2m+1)p*pi/(2N)) is a constant with a CW-bit fraction. One
// dct_coef_mult cell per operand turns it into CW AND-gated partial
// products; the partial products are added by carry-save adders and one
// CLA; the CW fraction bits are then dropped by an arithmetic shift (round
// toward minus infinity). For N = 8 the adder is the source design's tree
// of 22 CSAs (dct_pp_sum); for N = 4 and 16, which the source design sizes
// but does not draw, a CSA chain of the same adder count (dct_csa_chain).
// Interface: i = I0..I(N/2-1) (signed, BW bits), z = Z_p (signed, OW bits).
// Purely combinational; the register that closes the stage is in dct_1d.
// The sign handling and the floor rounding are this design's choices.
module dct_vi_unit
  import dct_pkg::*;
#(
  parameter int N  = 8,              // transform size: 4, 8 or 16
  parameter int P  = 1,              // output row, 1..N-1
  parameter int BW = 9,              // operand width
  parameter int CW = 6,              // weight fraction bits
  parameter int OW = BW + $clog2(N)  // result width
) (
  input  logic [N/2-1:0][BW-1:0] i,
  output logic [OW-1:0]          z
);

  localparam int M  = N / 2;                      // operands
  localparam int W  = BW + 1 + CW + $clog2(M);    // exact width of the sum
  localparam int NP = M * CW;                     // partial products

  logic [NP-1:0][W-1:0] s;  // s[M*k + m]: bit k of weight m times operand m
  logic [W-1:0]         acc;

  for (genvar m = 0; m < M; m++) begin : g_mult
    logic [CW-1:0][W-1:0] pp;
    dct_coef_mult #(.BW(BW), .CW(CW), .COEF(coef(N, P, m)), .W(W)) u_mult (
      .i  (i[m]),
      .pp (pp)
    );
    for (genvar k = 0; k < CW; k++) begin : g_pp
      assign s[M*k+m] = pp[k];
    end
  end

  if (M == 4 && CW == 6) begin : g_tree
    dct_pp_sum #(.W(W)) u_sum (.s(s), .sum(acc));
  end else begin : g_chain
    dct_csa_chain #(.W(W), .M(NP)) u_sum (.v(s), .sum(acc));
  end

  // drop the CW fraction bits
  always_comb z = OW'($signed(acc) >>> CW);

endmodule
