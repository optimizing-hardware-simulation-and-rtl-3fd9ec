// dct_2d: two-dimensional DCT of N x N blocks (N = 8 by default) with one
// column in and one row out per clock.
//
// The transform is split into columns and rows:
//   Z_pj = sum_i X_ij * cos((2i+1)p*pi/(2N))     (first 1D-DCT, per column)
//   S_pq = sum_j Z_pj * cos((2j+1)q*pi/(2N))     (second 1D-DCT, per row)
// u_stage1 (the source design's VI0/VI units, 8-bit signed samples) turns
// column j of a block into Z_0j..Z_(N-1)j in one clock; the transpose u_tr
// gathers a block and hands it on as rows; u_stage2 (VII0/VII units, 12-bit
// inputs for N = 8) turns row p into S_p0..S_p(N-1). Each 1D stage is one
// clock of combinational arithmetic closed by a register (10 ns at the
// source design's 100 MHz).
// Outputs are unnormalised: the orthonormal DCT is
// Y_pq = E_p*E_q*(2/N)*S_pq, with E_0 = 1/sqrt(2) and E_x = 1 otherwise.
// Weights carry 6 fraction bits and each stage drops its fraction (floor),
// so S_pq is close to, not equal to, the exact sum.
// Widths: MW = IW + log2(N) + 1 between the stages (12 for N = 8, as in the
// source design) and OUTW = MW + log2(N) + 1 at the output (16 for N = 8);
// both hold the full range of a block of full-scale samples.
// Timing: columns j = 0..N-1 of a block enter with in_valid (idle clocks
// allowed, blocks may follow back to back). Row p = 0 of the result leaves
// 3 clocks after column N-1 was accepted, then one row per clock with
// out_p = p, and out_last on p = N-1. Throughput: one block per N clocks.
// Synchronous active-low reset; a block cut by reset is lost.
// The two stages, their units and the 8/12-bit widths follow the source
// design; the pipelining, signed samples, transpose organisation, output
// width and reset are this design's choices.
module dct_2d #(
  parameter int N  = 8,                  // block size: 4, 8 or 16
  parameter int IW = 8,                  // sample width
  parameter int MW = IW + $clog2(N) + 1, // width between the stages (12)
  parameter int CW = 6,                  // weight fraction bits
  parameter int OUTW = MW + $clog2(N) + 1 // output width (16)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [N-1:0][IW-1:0]     in_col,    // in_col[i] = X_ij, signed
  output logic                     out_valid,
  output logic [$clog2(N)-1:0]     out_p,
  output logic [N-1:0][OUTW-1:0]   out_row,   // out_row[q] = S_pq, signed
  output logic                     out_last
);

  localparam int AW = $clog2(N);

  logic                 s1_valid;
  logic [N-1:0][MW-1:0] s1_z;
  logic                 tr_valid, tr_last;
  logic [AW-1:0]        tr_p;
  logic [N-1:0][MW-1:0] tr_row;

  dct_1d #(.N(N), .IW(IW), .CW(CW), .OW(MW)) u_stage1 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .x(in_col),
    .out_valid(s1_valid), .z(s1_z)
  );

  dct_transpose #(.N(N), .W(MW)) u_tr (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(s1_valid), .wr_col(s1_z),
    .rd_valid(tr_valid), .rd_p(tr_p), .rd_row(tr_row), .rd_last(tr_last)
  );

  dct_1d #(.N(N), .IW(MW), .CW(CW), .OW(OUTW)) u_stage2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(tr_valid), .x(tr_row),
    .out_valid(out_valid), .z(out_row)
  );

  // row index and block end travel alongside the second stage
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_p    <= '0;
      out_last <= 1'b0;
    end else begin
      out_p    <= tr_p;
      out_last <= tr_last;
    end
  end

endmodule
