// tb_dct_transpose: writes 8x8 blocks column by column into the double-
// buffered transpose, some back to back and some with random gaps, and
// checks that each block comes out row by row on exactly the eight clocks
// after its last column, with the right row index, rd_last on row 7 and no
// rd_valid at any other time. It counts how often a new block completed
// while the previous one was still being read (the bank swap under load)
// and how often a block was written with gaps; both must happen.
module tb_dct_transpose;
  localparam int N = 8, W = 12, NBLK = 40, MAXIT = 2000;
  logic clk = 0, rst_n = 0;
  logic wr_valid;
  logic [N-1:0][W-1:0] wr_col, rd_row;
  logic rd_valid, rd_last;
  logic [2:0] rd_p;
  int checks = 0, failures = 0;
  int n_overlap = 0, n_gapped = 0;
  logic [W-1:0] data [NBLK][N][N];   // data[b][i][j]
  int exp_b [MAXIT];                 // block expected at iteration, -1 none
  int exp_p [MAXIT];

  always #5 clk = ~clk;

  dct_transpose #(.N(N), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .wr_valid(wr_valid), .wr_col(wr_col),
    .rd_valid(rd_valid), .rd_p(rd_p), .rd_row(rd_row), .rd_last(rd_last));

  initial begin
    repeat (MAXIT + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int it);
    checks++;
    if (rd_valid !== (exp_b[it] >= 0)) begin
      failures++;
      $display("FAIL it=%0d rd_valid=%b exp_b=%0d", it, rd_valid, exp_b[it]);
    end
    if (exp_b[it] >= 0 && rd_valid) begin
      checks += 2;
      if (rd_p != 3'(exp_p[it]) || rd_last != (exp_p[it] == N - 1)) begin
        failures++;
        $display("FAIL it=%0d rd_p=%0d last=%b exp %0d", it, rd_p, rd_last, exp_p[it]);
      end
      for (int j = 0; j < N; j++) begin
        if (rd_row[j] != data[exp_b[it]][exp_p[it]][j]) begin
          failures++;
          $display("FAIL it=%0d blk=%0d p=%0d j=%0d got %h exp %h", it, exp_b[it],
                   exp_p[it], j, rd_row[j], data[exp_b[it]][exp_p[it]][j]);
          break;
        end
      end
    end
  endtask

  initial begin
    int it, b, j;
    bit gaps, had_gap;
    for (int k = 0; k < MAXIT; k++) exp_b[k] = -1;
    for (int bb = 0; bb < NBLK; bb++)
      for (int i = 0; i < N; i++)
        for (int jj = 0; jj < N; jj++) data[bb][i][jj] = W'($urandom);
    wr_valid = 0; wr_col = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    it = 0; b = 0; j = 0; had_gap = 0;
    gaps = 0;
    while (b < NBLK || it < 20) begin
      @(negedge clk);
      check(it);
      wr_valid = 0;
      if (b < NBLK) begin
        if (j == 0) gaps = (b % 3 == 2);
        if (!gaps || $urandom_range(0, 2) == 0) begin
          wr_valid = 1;
          for (int i = 0; i < N; i++) wr_col[i] = data[b][i][j];
          if (j == N - 1) begin
            if (rd_valid) n_overlap++;
            if (had_gap) n_gapped++;
            for (int p = 0; p < N; p++) begin
              exp_b[it + 1 + p] = b;
              exp_p[it + 1 + p] = p;
            end
            b++; j = 0; had_gap = 0;
          end else j++;
        end else if (j != 0) had_gap = 1;
      end
      it++;
      if (b >= NBLK && exp_b[it] < 0 && exp_b[it + 1] < 0) break;
    end
    repeat (3) begin
      @(negedge clk);
      check(it);
      it++;
    end
    checks += 2;
    if (n_overlap == 0) begin failures++; $display("FAIL no back-to-back block"); end
    if (n_gapped == 0)  begin failures++; $display("FAIL no gapped block"); end
    $display("back_to_back=%0d gapped=%0d", n_overlap, n_gapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
