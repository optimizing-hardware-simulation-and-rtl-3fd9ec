// dct_1d: fully parallel N-point one-dimensional DCT, one vector per clock.
//
// z_p = sum over i = 0..N-1 of x_i * cos((2i+1)p*pi/(2N)), unnormalised,
// with weights of CW fraction bits and the fraction dropped after each sum.
// The structure is the source design's (drawn there for N = 8): N/2
// sum/difference cells (dct_butterfly) pair x_i with x_(N-1-i); the sums
// feed the Z0 unit (dct_vi0_unit, all weights 1) and the VI units of the
// even rows; the differences feed the VI units of the odd rows
// (dct_vi_unit). All N results are computed in one combinational pass and
// registered, so the block takes a new vector every clock and has a latency
// of one clock.
// The same module serves as the first stage (IW = 8, samples) and the second
// stage (IW = 12, first-stage results) of the 2D transform.
// Interface: in_valid/x in; out_valid/z one clock later. A synchronous
// active-low reset clears out_valid and the output registers (reset is this
// design's choice).
module dct_1d #(
  parameter int N  = 8,                   // transform size: 4, 8 or 16
  parameter int IW = 8,                   // input width, signed
  parameter int CW = 6,                   // weight fraction bits
  parameter int OW = IW + $clog2(N) + 1   // output width, signed
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N-1:0][IW-1:0] x,
  output logic                out_valid,
  output logic [N-1:0][OW-1:0] z
);

  localparam int BW = IW + 1;  // butterfly result width

  logic [N/2-1:0][BW-1:0] bs, bd;
  logic [N-1:0][OW-1:0]   zc;  // combinational results

  dct_butterfly #(.N(N), .IW(IW)) u_bfly (.x(x), .s(bs), .d(bd));

  dct_vi0_unit #(.N(N), .BW(BW), .OW(OW)) u_vi0 (.i(bs), .z(zc[0]));

  for (genvar p = 1; p < N; p++) begin : g_vi
    dct_vi_unit #(.N(N), .P(p), .BW(BW), .CW(CW), .OW(OW)) u_vi (
      .i ((p % 2 == 0) ? bs : bd),
      .z (zc[p])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      z         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) z <= zc;
    end
  end

endmodule
