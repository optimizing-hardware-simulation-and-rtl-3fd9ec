// dct_pp_sum: adds the 24 partial products of a VI unit with 22 carry-save
// adders and one carry-lookahead adder.
//
// Input s[4k+m] is the partial product of multiplier m (m = 0..3) for
// weight bit k (k = 0..5); the four products of the same shift k form one
// group. The tree below reproduces the source design's wiring node by node,
// the intermediate vectors keeping its names S24..S67: first every group's
// first three products meet in one CSA, then its fourth product joins, then
// neighbouring groups are merged pairwise until one sum/carry pair
// (S67, S66) is left for the CLA. Which output of a CSA is the sum and which
// the carry, and which of a split pair goes to which next CSA, do not change
// the result and were chosen here. All vectors are W bits, arithmetic is
// modulo 2^W. Purely combinational.
module dct_pp_sum #(
  parameter int W = 18
) (
  input  logic [23:0][W-1:0] s,
  output logic [W-1:0]       sum
);

  logic [W-1:0] t [24:67];  // t[n] is the source design's S<n>

  // level 1: three products of each shift group
  csa #(.W(W)) u_c25 (.a(s[0]),  .b(s[1]),  .c(s[2]),  .sum(t[25]), .carry(t[24]));
  csa #(.W(W)) u_c27 (.a(s[4]),  .b(s[5]),  .c(s[6]),  .sum(t[27]), .carry(t[26]));
  csa #(.W(W)) u_c29 (.a(s[8]),  .b(s[9]),  .c(s[10]), .sum(t[29]), .carry(t[28]));
  csa #(.W(W)) u_c31 (.a(s[12]), .b(s[13]), .c(s[14]), .sum(t[31]), .carry(t[30]));
  csa #(.W(W)) u_c33 (.a(s[16]), .b(s[17]), .c(s[18]), .sum(t[33]), .carry(t[32]));
  csa #(.W(W)) u_c35 (.a(s[20]), .b(s[21]), .c(s[22]), .sum(t[35]), .carry(t[34]));
  // level 2: the fourth product of each group
  csa #(.W(W)) u_c37 (.a(t[25]), .b(t[24]), .c(s[3]),  .sum(t[37]), .carry(t[36]));
  csa #(.W(W)) u_c39 (.a(t[27]), .b(t[26]), .c(s[7]),  .sum(t[39]), .carry(t[38]));
  csa #(.W(W)) u_c41 (.a(t[29]), .b(t[28]), .c(s[11]), .sum(t[41]), .carry(t[40]));
  csa #(.W(W)) u_c43 (.a(t[31]), .b(t[30]), .c(s[15]), .sum(t[43]), .carry(t[42]));
  csa #(.W(W)) u_c45 (.a(t[33]), .b(t[32]), .c(s[19]), .sum(t[45]), .carry(t[44]));
  csa #(.W(W)) u_c47 (.a(t[35]), .b(t[34]), .c(s[23]), .sum(t[47]), .carry(t[46]));
  // level 3: groups 1-9 and 4-12 are split over their neighbours
  csa #(.W(W)) u_c49 (.a(t[37]), .b(t[36]), .c(t[39]), .sum(t[49]), .carry(t[48]));
  csa #(.W(W)) u_c51 (.a(t[41]), .b(t[40]), .c(t[38]), .sum(t[51]), .carry(t[50]));
  csa #(.W(W)) u_c53 (.a(t[43]), .b(t[42]), .c(t[45]), .sum(t[53]), .carry(t[52]));
  csa #(.W(W)) u_c55 (.a(t[47]), .b(t[46]), .c(t[44]), .sum(t[55]), .carry(t[54]));
  // level 4
  csa #(.W(W)) u_c57 (.a(t[49]), .b(t[48]), .c(t[51]), .sum(t[57]), .carry(t[56]));
  csa #(.W(W)) u_c59 (.a(t[53]), .b(t[52]), .c(t[50]), .sum(t[59]), .carry(t[58]));
  // level 5
  csa #(.W(W)) u_c63 (.a(t[57]), .b(t[56]), .c(t[59]), .sum(t[63]), .carry(t[62]));
  csa #(.W(W)) u_c61 (.a(t[55]), .b(t[54]), .c(t[58]), .sum(t[61]), .carry(t[60]));
  // level 6 and 7
  csa #(.W(W)) u_c65 (.a(t[63]), .b(t[62]), .c(t[61]), .sum(t[65]), .carry(t[64]));
  csa #(.W(W)) u_c67 (.a(t[65]), .b(t[64]), .c(t[60]), .sum(t[67]), .carry(t[66]));
  // final carry-propagate addition
  cla #(.W(W)) u_cla (.a(t[67]), .b(t[66]), .sum(sum));

endmodule
