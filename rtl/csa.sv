// csa: W-bit carry-save adder (a row of full adders, a 3:2 compressor).
//
// Reduces three operands to two whose sum is the same: sum = a ^ b ^ c and
// carry = majority(a, b, c) moved up one bit. No carry travels along the
// word, so the delay is one full adder whatever W is. The carry out of the
// top bit is dropped: the callers sign-extend every operand to a width that
// holds the full result, so arithmetic is modulo 2^W. Purely combinational.
// The source design names CSAs as the building block of its adder trees; the
// insides here are the textbook full-adder row.
module csa #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-2:0] maj;  // majority of the bits below the top one

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    carry = {maj, 1'b0};
  end

endmodule
