// tb_dct_2d: end-to-end test of the 8x8 2D-DCT at its default parameters.
//
// Blocks of signed 8-bit samples are sent one column per clock: some back
// to back, some with random idle clocks inside the block, some at full
// scale (all -128, all +127, alternating signs) to exercise the widest
// intermediate values. The expected result is computed independently: a
// direct 8-term 1D transform with $cos-derived 1/64 weights and floor, first
// on every column and then on every row of the intermediate block. Each
// output row must match it exactly, arrive on the clocks 3..10 after the
// block's last column, carry out_p and out_last, and stay within a small
// bound of the exact real-valued transform. The test counts back-to-back
// blocks (bank swap while the previous block is still being read), gapped
// blocks, full-scale blocks and a reset in mid-block; each must occur.
module tb_dct_2d;
  import dct_ref_pkg::*;
  localparam int NBLK = 60, MAXIT = 2000;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [7:0][7:0]  in_col;
  logic out_valid, out_last;
  logic [2:0] out_p;
  logic [7:0][15:0] out_row;
  int checks = 0, failures = 0;
  int n_b2b = 0, n_gap = 0, n_full = 0, n_reset = 0;
  int xs [NBLK][8][8];      // xs[b][i][j] = X_ij
  int ex [NBLK][8][8];      // ex[b][p][q] = expected S_pq
  real bnd [NBLK][8][8];    // bound on |S_pq - exact| from weight rounding
  int exp_b [MAXIT];
  int exp_p [MAXIT];
  real max_err = 0.0;

  always #5 clk = ~clk;

  dct_2d dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_col(in_col),
    .out_valid(out_valid), .out_p(out_p), .out_row(out_row), .out_last(out_last));

  initial begin
    repeat (MAXIT + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_block(input int b);
    int col[8], z[8], zz[8][8], row[8], s[8];
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        case (b % 10)
          3: xs[b][i][j] = -128;
          6: xs[b][i][j] = 127;
          9: xs[b][i][j] = ((i + j) % 2) ? -128 : 127;
          default: xs[b][i][j] = int'($urandom_range(0, 255)) - 128;
        endcase
    for (int j = 0; j < 8; j++) begin
      for (int i = 0; i < 8; i++) col[i] = xs[b][i][j];
      dct1(col, z);
      for (int p = 0; p < 8; p++) zz[p][j] = z[p];
    end
    // Error bound: each weight is off by dw = w/64 - cos, each stage floors
    // (error < 1). Stage 1: e1_pj = sum_i |x_ij||dw_pi| + 1. Stage 2:
    // sum_j (e1_pj |w_qj|/64 + |Z_pj| |dw_qj|) + 1, with Z the exact stage-1 value.
    for (int p = 0; p < 8; p++)
      for (int q = 0; q < 8; q++) begin
        real acc;
        acc = 1.0;
        for (int jj = 0; jj < 8; jj++) begin
          real e1, zx, dwq, wq;
          e1 = 1.0; zx = 0.0;
          for (int i = 0; i < 8; i++) begin
            real c;
            c  = $cos((2.0 * i + 1.0) * p * PI / 16.0);
            e1 += ((xs[b][i][jj] < 0) ? -xs[b][i][jj] : xs[b][i][jj]) * rabs(w(p, i) / 64.0 - c);
            zx += xs[b][i][jj] * c;
          end
          wq  = rabs(w(q, jj) / 64.0);
          dwq = rabs(w(q, jj) / 64.0 - $cos((2.0 * jj + 1.0) * q * PI / 16.0));
          acc += e1 * wq + rabs(zx) * dwq;
        end
        bnd[b][p][q] = acc;
      end
    for (int p = 0; p < 8; p++) begin
      for (int j = 0; j < 8; j++) row[j] = zz[p][j];
      dct1(row, s);
      for (int q = 0; q < 8; q++) ex[b][p][q] = s[q];
    end
  endfunction

  task automatic check(input int it);
    int b, p;
    checks++;
    b = exp_b[it];
    if (out_valid !== (b >= 0)) begin
      failures++;
      $display("FAIL it=%0d out_valid=%b expected block %0d", it, out_valid, b);
    end
    if (b >= 0 && out_valid) begin
      p = exp_p[it];
      checks++;
      if (out_p != 3'(p) || out_last != (p == 7)) begin
        failures++;
        $display("FAIL it=%0d out_p=%0d out_last=%b exp p=%0d", it, out_p, out_last, p);
      end
      for (int q = 0; q < 8; q++) begin
        real e, d;
        int g;
        g = int'($signed(out_row[q]));
        checks += 2;
        if (g != ex[b][p][q]) begin
          failures++;
          $display("FAIL blk=%0d p=%0d q=%0d got %0d exp %0d", b, p, q, g, ex[b][p][q]);
        end
        e = dct2_real(xs[b], p, q);
        d = rabs(real'(g) - e);
        if (d > max_err) max_err = d;
        if (d > bnd[b][p][q]) begin
          failures++;
          $display("FAIL blk=%0d p=%0d q=%0d got %0d exact %f bound %f", b, p, q, g, e,
                   bnd[b][p][q]);
        end
      end
    end
  endtask

  initial begin
    int it, b, j;
    bit gaps, had_gap, did_reset;
    for (int k = 0; k < MAXIT; k++) exp_b[k] = -1;
    for (int bb = 0; bb < NBLK; bb++) make_block(bb);
    in_valid = 0; in_col = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    it = 0; b = 0; j = 0; had_gap = 0; gaps = 0; did_reset = 0;
    while (1) begin
      @(negedge clk);
      check(it);
      in_valid = 0;
      rst_n = 1;
      // one reset in the middle of block 20: it is dropped and sent again
      if (b == 20 && j == 5 && !did_reset) begin
        rst_n = 0;
        did_reset = 1;
        n_reset++;
        j = 0;
        // anything already scheduled is lost with the reset
        for (int k = it + 1; k < MAXIT; k++) exp_b[k] = -1;
      end else if (b < NBLK) begin
        if (j == 0) gaps = (b % 4 == 1);
        if (!gaps || $urandom_range(0, 2) == 0) begin
          in_valid = 1;
          for (int i = 0; i < 8; i++) in_col[i] = 8'(xs[b][i][j]);
          if (j == 7) begin
            if (exp_b[it] >= 0 || exp_b[it + 1] >= 0 || exp_b[it + 2] >= 0) n_b2b++;
            if (had_gap) n_gap++;
            if (b % 10 == 3 || b % 10 == 6 || b % 10 == 9) n_full++;
            for (int p = 0; p < 8; p++) begin
              exp_b[it + 3 + p] = b;
              exp_p[it + 3 + p] = p;
            end
            b++; j = 0; had_gap = 0;
          end else j++;
        end else if (j != 0) had_gap = 1;
      end
      it++;
      if (b >= NBLK && exp_b[it] < 0 && exp_b[it + 1] < 0 && exp_b[it + 2] < 0 && exp_b[it + 3] < 0)
        break;
    end
    repeat (4) begin
      @(negedge clk);
      check(it);
      it++;
    end
    checks += 4;
    if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back block"); end
    if (n_gap == 0)   begin failures++; $display("FAIL no gapped block"); end
    if (n_full == 0)  begin failures++; $display("FAIL no full-scale block"); end
    if (n_reset == 0) begin failures++; $display("FAIL no reset"); end
    $display("blocks=%0d back_to_back=%0d gapped=%0d full_scale=%0d resets=%0d max|S-exact|=%f",
             NBLK, n_b2b, n_gap, n_full, n_reset, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
