// dct_csa_chain: adds M vectors with M-2 carry-save adders in a chain and
// one carry-lookahead adder.
//
// The first CSA takes v0, v1 and v2; every further CSA adds the next
// vector to the running sum/carry pair; the CLA resolves the last pair.
// For M = 4 this is the source design's row-0 adder (two CSAs and a CLA);
// the same chain serves the row-0 unit and, for N other than 8, the
// partial-product sum of the weighted units, where the source design gives
// only its N = 8 tree. For M = 2 only the CLA remains. All vectors are
// W bits, arithmetic is modulo 2^W. Purely combinational.
module dct_csa_chain #(
  parameter int W = 11,
  parameter int M = 4   // number of operands, 2 or more
) (
  input  logic [M-1:0][W-1:0] v,
  output logic [W-1:0]        sum
);

  if (M == 2) begin : g_two
    cla #(.W(W)) u_cla (.a(v[0]), .b(v[1]), .sum(sum));
  end else begin : g_chain
    logic [W-1:0] ps [1:M-2];  // ps[k], pc[k]: pair after adding v[k+1]
    logic [W-1:0] pc [1:M-2];
    csa #(.W(W)) u_csa0 (.a(v[0]), .b(v[1]), .c(v[2]), .sum(ps[1]), .carry(pc[1]));
    for (genvar k = 2; k < M - 1; k++) begin : g_csa
      csa #(.W(W)) u_csa (.a(ps[k-1]), .b(pc[k-1]), .c(v[k+1]), .sum(ps[k]), .carry(pc[k]));
    end
    cla #(.W(W)) u_cla (.a(ps[M-2]), .b(pc[M-2]), .sum(sum));
  end

endmodule
