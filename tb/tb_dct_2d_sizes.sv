// tb_dct_2d_sizes: runs the 2D-DCT at the two other block sizes the design
// supports, N = 4 and N = 16, with the other parameters at their defaults
// (stage widths then follow N). Random and full-scale blocks of signed
// 8-bit samples are streamed back to back, one column per clock, into both
// instances; every output row is compared with an independent bit-exact
// model (1D transform with $cos-derived 1/64 weights and floor, on columns
// then rows) and must appear on the clocks 3..N+2 after the block's last
// column.
module tb_dct_2d_sizes;
  import dct_ref_pkg::*;
  localparam int NBLK = 12;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- N = 4 ----
  logic             v4_in, v4_out, l4;
  logic [3:0][7:0]  c4;
  logic [1:0]       p4;
  logic [3:0][13:0] r4;
  dct_2d #(.N(4))  dut4 (.clk(clk), .rst_n(rst_n), .in_valid(v4_in), .in_col(c4),
                         .out_valid(v4_out), .out_p(p4), .out_row(r4), .out_last(l4));
  // ---- N = 16 ----
  logic              v16_in, v16_out, l16;
  logic [15:0][7:0]  c16;
  logic [3:0]        p16;
  logic [15:0][17:0] r16;
  dct_2d #(.N(16)) dut16 (.clk(clk), .rst_n(rst_n), .in_valid(v16_in), .in_col(c16),
                          .out_valid(v16_out), .out_p(p16), .out_row(r16), .out_last(l16));

  int xs4 [NBLK][16][16], ex4 [NBLK][16][16];
  int xs16 [NBLK][16][16], ex16 [NBLK][16][16];

  function automatic void make(input int n, input int b, output int xs[16][16],
                               output int ex[16][16]);
    int col[16], z[16], zz[16][16], row[16], s[16];
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        case (b % 4)
          1: xs[i][j] = -128;
          2: xs[i][j] = ((i + j) % 2) ? -128 : 127;
          3: xs[i][j] = 127;
          default: xs[i][j] = int'($urandom_range(0, 255)) - 128;
        endcase
        if (i >= n || j >= n) xs[i][j] = 0;
      end
    for (int j = 0; j < n; j++) begin
      for (int i = 0; i < 16; i++) col[i] = xs[i][j];
      dct1n(n, col, z);
      for (int p = 0; p < 16; p++) zz[p][j] = z[p];
    end
    for (int p = 0; p < 16; p++) begin
      for (int j = 0; j < 16; j++) row[j] = (j < n) ? zz[p][j] : 0;
      dct1n(n, row, s);
      for (int q = 0; q < 16; q++) ex[p][q] = s[q];
    end
  endfunction

  // drive one size: blocks back to back, check outputs on the expected clocks
  task automatic run4();
    int it = 0;
    for (int b = 0; b < NBLK; b++) begin
      for (int j = 0; j < 4; j++) begin
        @(negedge clk);
        v4_in = 1;
        for (int i = 0; i < 4; i++) c4[i] = 8'(xs4[b][i][j]);
      end
    end
    @(negedge clk);
    v4_in = 0;
  endtask

  task automatic run16();
    for (int b = 0; b < NBLK; b++) begin
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        v16_in = 1;
        for (int i = 0; i < 16; i++) c16[i] = 8'(xs16[b][i][j]);
      end
    end
    @(negedge clk);
    v16_in = 0;
  endtask

  // Column j of block b goes in on drive clock n*b + j (counted from 0);
  // row p comes out at the negedge n*b + (n-1) + 3 + p.
  task automatic mon4();
    for (int t = 0; t < 4 * NBLK + 10; t++) begin
      int b, p, rel;
      @(negedge clk);
      #1;
      rel = t - 3 - 3;               // clocks since the first block's last column + 3
      b = (rel >= 0) ? rel / 4 : -1;
      p = (rel >= 0) ? rel % 4 : 0;
      checks++;
      if (v4_out !== (b >= 0 && b < NBLK)) begin
        failures++;
        $display("FAIL N=4 t=%0d out_valid=%b", t, v4_out);
      end else if (v4_out) begin
        checks++;
        if (p4 != 2'(p) || l4 != (p == 3)) begin
          failures++;
          $display("FAIL N=4 t=%0d out_p=%0d exp %0d", t, p4, p);
        end
        for (int q = 0; q < 4; q++) begin
          logic signed [13:0] g;
          g = r4[q];
          checks++;
          if (int'(g) != ex4[b][p][q]) begin
            failures++;
            $display("FAIL N=4 blk=%0d p=%0d q=%0d got %0d exp %0d", b, p, q, g,
                     ex4[b][p][q]);
          end
        end
      end
    end
  endtask

  task automatic mon16();
    for (int t = 0; t < 16 * NBLK + 22; t++) begin
      int b, p, rel;
      @(negedge clk);
      #1;
      rel = t - 15 - 3;
      b = (rel >= 0) ? rel / 16 : -1;
      p = (rel >= 0) ? rel % 16 : 0;
      checks++;
      if (v16_out !== (b >= 0 && b < NBLK)) begin
        failures++;
        $display("FAIL N=16 t=%0d out_valid=%b", t, v16_out);
      end else if (v16_out) begin
        checks++;
        if (p16 != 4'(p) || l16 != (p == 15)) begin
          failures++;
          $display("FAIL N=16 t=%0d out_p=%0d exp %0d", t, p16, p);
        end
        for (int q = 0; q < 16; q++) begin
          logic signed [17:0] g;
          g = r16[q];
          checks++;
          if (int'(g) != ex16[b][p][q]) begin
            failures++;
            $display("FAIL N=16 blk=%0d p=%0d q=%0d got %0d exp %0d", b, p, q, g,
                     ex16[b][p][q]);
          end
        end
      end
    end
  endtask

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      make(4, b, xs4[b], ex4[b]);
      make(16, b, xs16[b], ex16[b]);
    end
    v4_in = 0; v16_in = 0; c4 = '0; c16 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // the drive and monitor of each size start on the same negedge (t = 0)
    fork
      run4();
      mon4();
      run16();
      mon16();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
