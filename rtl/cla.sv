// cla: W-bit carry-lookahead adder, sum = a + b modulo 2^W.
//
// Bits are taken four at a time. Inside a group every carry is written out
// from the generate (g = a & b) and propagate (p = a ^ b) terms and the
// carry into the group, so no carry ripples through the group's bits; the
// group generate/propagate pair then gives the carry into the next group.
// It closes every adder tree of the DCT, turning the final carry-save pair
// into a binary number. Purely combinational. The source design names a CLA
// for this place; the 4-bit grouping is this design's choice.
module cla #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);

  localparam int NG = (W + 3) / 4;

  logic [4*NG-1:0] g, p, s;

  always_comb begin
    logic c0, c1, c2, c3;
    logic [4*NG-1:0] ae, be;
    ae = '0;
    be = '0;
    ae[W-1:0] = a;
    be[W-1:0] = b;
    g = ae & be;
    p = ae ^ be;
    c0 = 1'b0;
    for (int k = 0; k < NG; k++) begin
      c1 = g[4*k] | (p[4*k] & c0);
      c2 = g[4*k+1] | (p[4*k+1] & g[4*k]) | (p[4*k+1] & p[4*k] & c0);
      c3 = g[4*k+2] | (p[4*k+2] & g[4*k+1]) | (p[4*k+2] & p[4*k+1] & g[4*k])
         | (p[4*k+2] & p[4*k+1] & p[4*k] & c0);
      s[4*k +: 4] = p[4*k +: 4] ^ {c3, c2, c1, c0};
      // carry out of the group from group generate and group propagate
      c0 = g[4*k+3] | (p[4*k+3] & g[4*k+2]) | (p[4*k+3] & p[4*k+2] & g[4*k+1])
         | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k])
         | (p[4*k+3] & p[4*k+2] & p[4*k+1] & p[4*k] & c0);
    end
    sum = s[W-1:0];
  end

endmodule
