// dct_transpose: double-buffered 8x8 register transpose between the two
// 1D-DCT stages.
//
// The first stage delivers column j of a block (Z_0j..Z_7j) per accepted
// clock; the second stage needs row p (Z_p0..Z_p7). Two banks of 8x8
// registers take turns: columns are written into the write bank, and on the
// clock that writes its eighth column the banks swap roles. The full bank is
// then read one row per clock, on the eight clocks that follow, through an
// 8:1 multiplexer per output word, while the next block fills the other
// bank. Because a bank needs at least eight clocks to fill, reading always
// ends before the bank is written again, and the write side never waits.
// Interface: wr_valid/wr_col in (gaps allowed); rd_valid/rd_p/rd_row/rd_last
// out, driven from the registers through the multiplexers (no extra clock).
// The source design only names "registers and multiplexers" at this point;
// the double-buffered organisation is this design's choice.
module dct_transpose #(
  parameter int N = 8,
  parameter int W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_valid,
  input  logic [N-1:0][W-1:0] wr_col,    // wr_col[i] = Z_ij of column j
  output logic                rd_valid,
  output logic [$clog2(N)-1:0] rd_p,     // row being read
  output logic [N-1:0][W-1:0] rd_row,    // rd_row[j] = Z_pj
  output logic                rd_last    // row N-1 of a block
);

  localparam int AW = $clog2(N);

  logic [N-1:0][W-1:0] bank0 [N];  // bank0[p][j]
  logic [N-1:0][W-1:0] bank1 [N];
  logic          wr_bank;          // bank being filled
  logic [AW-1:0] wr_j;             // next column to write
  logic          rd_bank;          // bank being read
  logic          rd_act;
  logic [AW-1:0] rd_cnt;
  logic          wr_done;          // this write completes a block

  assign wr_done = wr_valid && (wr_j == AW'(N - 1));

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      for (int p = 0; p < N; p++) begin
        if (wr_bank) bank1[p][wr_j] <= wr_col[p];
        else         bank0[p][wr_j] <= wr_col[p];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_bank <= 1'b0;
      wr_j    <= '0;
      rd_bank <= 1'b0;
      rd_act  <= 1'b0;
      rd_cnt  <= '0;
    end else begin
      if (wr_valid) wr_j <= wr_j + 1'b1;
      if (wr_done) begin
        wr_bank <= ~wr_bank;
        rd_bank <= wr_bank;
        rd_act  <= 1'b1;
        rd_cnt  <= '0;
      end else if (rd_act) begin
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_cnt == AW'(N - 1)) rd_act <= 1'b0;
      end
    end
  end

  always_comb begin
    rd_valid = rd_act;
    rd_p     = rd_cnt;
    rd_last  = rd_act && (rd_cnt == AW'(N - 1));
    rd_row   = rd_bank ? bank1[rd_cnt] : bank0[rd_cnt];
  end

  // A new block may only start reading once the previous one is on its last row.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    wr_done |-> (!rd_act || rd_cnt == AW'(N - 1)));

endmodule
